// packet_sync: packet synchronizer for one channel.
//
// Divides the chip ticks into packet slots of SLOT_LEN ticks, all nodes sharing the same
// slot boundaries. tx_start marks the tick after which transmitters launch a packet;
// rx_start marks the tick in which the first bit of that packet is at the receivers,
// PIPE_LAT ticks later. Receivers therefore know where a packet begins without a
// correlator searching all the time. Interface: chip_en in, tx_start/rx_start out
// (both are single-cycle pulses that coincide with chip_en).
// The purpose follows the document; slot counting and the fixed pipeline offset are this
// design's own.
module packet_sync #(
  parameter int unsigned SLOT_LEN = 19,
  parameter int unsigned PIPE_LAT = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic chip_en,
  output logic tx_start,
  output logic rx_start
);

  localparam int unsigned CW = (SLOT_LEN > 1) ? $clog2(SLOT_LEN) : 1;

  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_q <= '0;
    else if (chip_en) begin
      if (cnt_q == CW'(SLOT_LEN - 1)) cnt_q <= '0;
      else cnt_q <= cnt_q + 1'b1;
    end
  end

  assign tx_start = chip_en && (cnt_q == '0);
  assign rx_start = chip_en && (cnt_q == CW'(PIPE_LAT % SLOT_LEN));

endmodule
