// subnetwork: seven nodes on one CDMA communication channel pair.
//
// N_NODES CNIs (node IDs 1..N_NODES) share a forward channel, which carries the data
// packets of all master CNIs at once, and a reverse channel, which carries the ACK packets
// of all slave CNIs at once. Each channel adds the codewords of its transmitters and
// truncates every chip to one bit, so a channel is just CODE_LEN wires. A synchronizer
// gives every CNI the common chip tick and the packet-slot starts of both channels.
// The hubnetwork that joins subnetworks is this same module.
// Interface: per-node resource ports, arrays indexed by node ID - 1; event pulses per node.
// Timing: a data packet of PKT_LEN = 6 + PAYLOAD_W bits, started at a forward slot, is in
// the destination's RX buffer PKT_LEN + 2 ticks after the slot start.
// The structure follows the document's architecture figure; slot lengths are this
// design's own (data slot = one packet, ACK slot = ACK_LEN).
module subnetwork
  import cdma_pkg::*;
#(
  parameter int unsigned N_NODES   = MAX_NODES,
  parameter int unsigned PAYLOAD_W = 13,
  parameter int unsigned TX_DEPTH  = 4,
  parameter int unsigned RX_DEPTH  = 2,
  parameter int unsigned SYNC_DIV  = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tx_valid  [N_NODES],
  output logic                 tx_ready  [N_NODES],
  input  node_id_t             tx_dst    [N_NODES],
  input  logic [PAYLOAD_W-1:0] tx_payload[N_NODES],
  output logic                 rx_valid  [N_NODES],
  input  logic                 rx_ready  [N_NODES],
  output node_id_t             rx_src    [N_NODES],
  output logic [PAYLOAD_W-1:0] rx_payload[N_NODES],
  output logic [N_NODES-1:0]   sent_evt,
  output logic [N_NODES-1:0]   got_ack_evt,
  output logic [N_NODES-1:0]   got_nack_evt,
  output logic [N_NODES-1:0]   gave_ack_evt,
  output logic [N_NODES-1:0]   gave_nack_evt
);

  localparam int unsigned PKT_LEN = 2 * ID_W + PAYLOAD_W;

  sync_t fwd, rev;
  code_t fwd_codes[N_NODES];
  code_t rev_codes[N_NODES];
  code_t fwd_chips, rev_chips;

  synchronizer #(.FWD_SLOT(PKT_LEN), .REV_SLOT(ACK_LEN), .SYNC_DIV(SYNC_DIV)) u_sync (
    .clk, .rst_n, .fwd, .rev
  );

  comm_channel #(.N_PORTS(N_NODES)) u_fwd_channel (
    .clk, .rst_n, .chip_en(fwd.chip_en), .tx_codes(fwd_codes), .chips(fwd_chips)
  );

  comm_channel #(.N_PORTS(N_NODES)) u_rev_channel (
    .clk, .rst_n, .chip_en(rev.chip_en), .tx_codes(rev_codes), .chips(rev_chips)
  );

  for (genvar i = 0; i < N_NODES; i++) begin : g_node
    cni #(
      .MY_ID(i + 1), .N_NODES(N_NODES), .PAYLOAD_W(PAYLOAD_W),
      .TX_DEPTH(TX_DEPTH), .RX_DEPTH(RX_DEPTH)
    ) u_cni (
      .clk, .rst_n, .fwd, .rev,
      .tx_valid(tx_valid[i]), .tx_ready(tx_ready[i]), .tx_dst(tx_dst[i]),
      .tx_payload(tx_payload[i]),
      .rx_valid(rx_valid[i]), .rx_ready(rx_ready[i]), .rx_src(rx_src[i]),
      .rx_payload(rx_payload[i]),
      .fwd_code(fwd_codes[i]), .rev_code(rev_codes[i]),
      .fwd_chips, .rev_chips,
      .sent_evt(sent_evt[i]), .got_ack_evt(got_ack_evt[i]), .got_nack_evt(got_nack_evt[i]),
      .gave_ack_evt(gave_ack_evt[i]), .gave_nack_evt(gave_nack_evt[i])
    );
  end

endmodule
