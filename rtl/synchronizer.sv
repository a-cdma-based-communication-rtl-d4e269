// synchronizer: the synchronizer block of a network.
//
// Holds a channel synchronizer and a packet synchronizer for each of the forward channel
// (data packets, slots of FWD_SLOT ticks) and the reverse channel (ACK packets, slots of
// REV_SLOT ticks) and bundles their strobes into one sync_t per channel for the CNIs.
// Interface: fwd and rev out. The four sub-blocks follow the document's synchronizer
// figure; slot lengths and the clock-enable form are this design's own.
module synchronizer
  import cdma_pkg::*;
#(
  parameter int unsigned FWD_SLOT = 19,
  parameter int unsigned REV_SLOT = ACK_LEN,
  parameter int unsigned SYNC_DIV = 1,
  parameter int unsigned PIPE_LAT = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  output sync_t fwd,
  output sync_t rev
);

  logic fwd_en, rev_en;

  channel_sync #(.DIV(SYNC_DIV)) u_fwd_chan (.clk, .rst_n, .chip_en(fwd_en));
  channel_sync #(.DIV(SYNC_DIV)) u_rev_chan (.clk, .rst_n, .chip_en(rev_en));

  packet_sync #(.SLOT_LEN(FWD_SLOT), .PIPE_LAT(PIPE_LAT)) u_fwd_pkt (
    .clk, .rst_n, .chip_en(fwd_en), .tx_start(fwd.tx_start), .rx_start(fwd.rx_start)
  );
  packet_sync #(.SLOT_LEN(REV_SLOT), .PIPE_LAT(PIPE_LAT)) u_rev_pkt (
    .clk, .rst_n, .chip_en(rev_en), .tx_start(rev.tx_start), .rx_start(rev.rx_start)
  );

  assign fwd.chip_en = fwd_en;
  assign rev.chip_en = rev_en;

endmodule
