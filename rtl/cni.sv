// cni: CDMA-based network interface of one node.
//
// Joins a master CNI (sends data packets on the forward channel, hears ACK packets on the
// reverse channel) and a slave CNI (receives data packets from the forward channel,
// answers on the reverse channel). The resource only fills the TX buffer and empties the
// RX buffers; everything about the channels is handled here, which decouples computation
// from communication. Both halves use the node's own PN code (code MY_ID) to send.
// Interface: tx_* and rx_* to the resource, fwd_code/rev_code to the two channels,
// fwd_chips/rev_chips from them, fwd/rev strobes from the synchronizer, and the event
// pulses of both halves. Timing is that of mni and sni.
// HAS_MNI / HAS_SNI leave out one half, for a node that only sends or only receives. A
// missing half still drives its channel with the plain codeword, exactly as an idle half
// would, so the majority on the channel stays balanced; its resource ports are inert.
// The MNI/SNI split and the option to fit only one of them follow the published
// description; driving the idle codeword for a missing half is this design's choice.
module cni
  import cdma_pkg::*;
#(
  parameter int unsigned MY_ID     = 1,
  parameter int unsigned N_NODES   = MAX_NODES,
  parameter int unsigned PAYLOAD_W = 13,
  parameter int unsigned TX_DEPTH  = 4,
  parameter int unsigned RX_DEPTH  = 2,
  parameter bit          HAS_MNI   = 1'b1,
  parameter bit          HAS_SNI   = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  sync_t                fwd,
  input  sync_t                rev,
  // resource side
  input  logic                 tx_valid,
  output logic                 tx_ready,
  input  node_id_t             tx_dst,
  input  logic [PAYLOAD_W-1:0] tx_payload,
  output logic                 rx_valid,
  input  logic                 rx_ready,
  output node_id_t             rx_src,
  output logic [PAYLOAD_W-1:0] rx_payload,
  // channels
  output code_t                fwd_code,
  output code_t                rev_code,
  input  code_t                fwd_chips,
  input  code_t                rev_chips,
  // status
  output logic                 sent_evt,
  output logic                 got_ack_evt,
  output logic                 got_nack_evt,
  output logic                 gave_ack_evt,
  output logic                 gave_nack_evt
);

  if (HAS_MNI) begin : g_mni
    logic busy_unused;

    mni #(.MY_ID(MY_ID), .N_NODES(N_NODES), .PAYLOAD_W(PAYLOAD_W), .TX_DEPTH(TX_DEPTH)) u_mni (
      .clk, .rst_n, .fwd, .rev,
      .tx_valid, .tx_ready, .tx_dst, .tx_payload,
      .fwd_code, .rev_chips,
      .sent_evt, .ack_evt(got_ack_evt), .nack_evt(got_nack_evt), .busy(busy_unused)
    );
  end else begin : g_no_mni
    assign fwd_code     = pn_code(MY_ID);
    assign tx_ready     = 1'b0;
    assign sent_evt     = 1'b0;
    assign got_ack_evt  = 1'b0;
    assign got_nack_evt = 1'b0;
  end

  if (HAS_SNI) begin : g_sni
    sni #(.MY_ID(MY_ID), .N_NODES(N_NODES), .PAYLOAD_W(PAYLOAD_W), .RX_DEPTH(RX_DEPTH)) u_sni (
      .clk, .rst_n, .fwd, .rev,
      .fwd_chips, .rev_code,
      .rx_valid, .rx_ready, .rx_src, .rx_payload,
      .ack_evt(gave_ack_evt), .nack_evt(gave_nack_evt)
    );
  end else begin : g_no_sni
    assign rev_code      = pn_code(MY_ID);
    assign rx_valid      = 1'b0;
    assign rx_src        = NO_ID;
    assign rx_payload    = '0;
    assign gave_ack_evt  = 1'b0;
    assign gave_nack_evt = 1'b0;
  end

endmodule
