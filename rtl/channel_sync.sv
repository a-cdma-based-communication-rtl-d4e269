// channel_sync: channel synchronizer for one channel.
//
// Produces the common chip-sync tick (a clock enable) that every CNI on the channel uses,
// so that all codewords are sent and sampled in the same chip period and stay orthogonal.
// The tick is high one clock in every DIV clocks; with DIV = 1 the chip rate equals the
// clock rate. Interface: chip_en out. The document says only that the synchronizer
// supplies a channel sync clock; generating it as an enable divided from the system
// clock is this design's choice.
module channel_sync #(
  parameter int unsigned DIV = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic chip_en
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_q <= '0;
    else if (cnt_q == CW'(DIV - 1)) cnt_q <= '0;
    else cnt_q <= cnt_q + 1'b1;
  end

  assign chip_en = (cnt_q == CW'(DIV - 1));

endmodule
