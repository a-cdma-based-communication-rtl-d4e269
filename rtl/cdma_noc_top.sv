// cdma_noc_top: scaled CDMA on-chip network for N_SUB x 6 resources (42 by default).
//
// Seven-node subnetworks are the building block. In each subnetwork, nodes 1..6 serve
// resources and node 7 is taken by a hubnetwork interface (HI). The seven HIs are joined
// by a hubnetwork, which is the same seven-node network; hub node k serves subnetwork k.
// All levels reuse the same seven PN codes.
// A resource addresses another by {subnet, node}. A packet for its own subnetwork goes
// straight to the destination node; any other packet goes to the HI, crosses the
// hubnetwork to the destination subnetwork's HI and is delivered from there. Every hop is
// flow-controlled by its own network (ACK/NACK on that network's reverse channel), and
// the HIs hold packets between hops.
// The subnetwork payload carries a routing header in front of the data:
// {dst subnet, dst node, src subnet, src node, DATA_W data bits}.
// Interface: per-resource arrays [subnet-1][node-1]: tx_valid/tx_ready/tx_dst_sub/
// tx_dst_node/tx_data and rx_valid/rx_ready/rx_src_sub/rx_src_node/rx_data; event pulses
// for statistics. Timing: a local packet arrives PKT_LEN + 2 ticks after its slot starts,
// a remote one crosses three networks.
// The two-level structure and code reuse follow the document; addressing, the header
// layout and the HI position (node 7) are this design's own.
module cdma_noc_top
  import cdma_pkg::*;
#(
  parameter int unsigned N_SUB    = MAX_NODES,
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned TX_DEPTH = 4,
  parameter int unsigned RX_DEPTH = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tx_valid   [N_SUB][MAX_NODES-1],
  output logic              tx_ready   [N_SUB][MAX_NODES-1],
  input  node_id_t          tx_dst_sub [N_SUB][MAX_NODES-1],
  input  node_id_t          tx_dst_node[N_SUB][MAX_NODES-1],
  input  logic [DATA_W-1:0] tx_data    [N_SUB][MAX_NODES-1],
  output logic              rx_valid   [N_SUB][MAX_NODES-1],
  input  logic              rx_ready   [N_SUB][MAX_NODES-1],
  output node_id_t          rx_src_sub [N_SUB][MAX_NODES-1],
  output node_id_t          rx_src_node[N_SUB][MAX_NODES-1],
  output logic [DATA_W-1:0] rx_data    [N_SUB][MAX_NODES-1],
  // statistics: per subnetwork, and for the hubnetwork
  output logic [MAX_NODES-1:0] sub_sent_evt [N_SUB],
  output logic [MAX_NODES-1:0] sub_nack_evt [N_SUB],
  output logic [MAX_NODES-1:0] hub_sent_evt,
  output logic [MAX_NODES-1:0] hub_nack_evt,
  output logic [N_SUB-1:0]     hi_up_evt,
  output logic [N_SUB-1:0]     hi_down_evt
);

  localparam int unsigned NN = MAX_NODES;
  localparam int unsigned NR = MAX_NODES - 1;        // resources per subnetwork
  localparam int unsigned PW = 4 * ID_W + DATA_W;    // subnetwork payload width
  localparam node_id_t HI_ID = node_id_t'(MAX_NODES);

  // hubnetwork resource-side ports
  logic              h_tx_valid[NN], h_tx_ready[NN], h_rx_valid[NN], h_rx_ready[NN];
  node_id_t          h_tx_dst[NN], h_rx_src[NN];
  logic [PW-1:0]     h_tx_payload[NN], h_rx_payload[NN];
  logic [NN-1:0]     h_ack_u, h_gack_u, h_gnack_u;

  subnetwork #(.N_NODES(NN), .PAYLOAD_W(PW), .TX_DEPTH(TX_DEPTH), .RX_DEPTH(RX_DEPTH)) u_hub (
    .clk, .rst_n,
    .tx_valid(h_tx_valid), .tx_ready(h_tx_ready), .tx_dst(h_tx_dst), .tx_payload(h_tx_payload),
    .rx_valid(h_rx_valid), .rx_ready(h_rx_ready), .rx_src(h_rx_src), .rx_payload(h_rx_payload),
    .sent_evt(hub_sent_evt), .got_ack_evt(h_ack_u), .got_nack_evt(hub_nack_evt),
    .gave_ack_evt(h_gack_u), .gave_nack_evt(h_gnack_u)
  );

  // hub nodes without a subnetwork stay idle
  for (genvar k = N_SUB; k < NN; k++) begin : g_hub_idle
    assign h_tx_valid[k]   = 1'b0;
    assign h_tx_dst[k]     = NO_ID;
    assign h_tx_payload[k] = '0;
    assign h_rx_ready[k]   = 1'b1;
  end

  for (genvar s = 0; s < N_SUB; s++) begin : g_sub
    logic          s_tx_valid[NN], s_tx_ready[NN], s_rx_valid[NN], s_rx_ready[NN];
    node_id_t      s_tx_dst[NN], s_rx_src[NN];
    logic [PW-1:0] s_tx_payload[NN], s_rx_payload[NN];
    logic [NN-1:0] s_ack_u, s_gack_u, s_gnack_u;

    subnetwork #(.N_NODES(NN), .PAYLOAD_W(PW), .TX_DEPTH(TX_DEPTH), .RX_DEPTH(RX_DEPTH)) u_subnet (
      .clk, .rst_n,
      .tx_valid(s_tx_valid), .tx_ready(s_tx_ready), .tx_dst(s_tx_dst), .tx_payload(s_tx_payload),
      .rx_valid(s_rx_valid), .rx_ready(s_rx_ready), .rx_src(s_rx_src), .rx_payload(s_rx_payload),
      .sent_evt(sub_sent_evt[s]), .got_ack_evt(s_ack_u), .got_nack_evt(sub_nack_evt[s]),
      .gave_ack_evt(s_gack_u), .gave_nack_evt(s_gnack_u)
    );

    // resources on nodes 1..6
    for (genvar r = 0; r < NR; r++) begin : g_res
      assign s_tx_valid[r]   = tx_valid[s][r];
      assign tx_ready[s][r]  = s_tx_ready[r];
      assign s_tx_dst[r]     = (tx_dst_sub[s][r] == node_id_t'(s + 1)) ? tx_dst_node[s][r] : HI_ID;
      assign s_tx_payload[r] = {tx_dst_sub[s][r], tx_dst_node[s][r],
                                node_id_t'(s + 1), node_id_t'(r + 1), tx_data[s][r]};
      assign rx_valid[s][r]    = s_rx_valid[r];
      assign s_rx_ready[r]     = rx_ready[s][r];
      assign rx_src_sub[s][r]  = s_rx_payload[r][DATA_W + ID_W +: ID_W];
      assign rx_src_node[s][r] = s_rx_payload[r][DATA_W +: ID_W];
      assign rx_data[s][r]     = s_rx_payload[r][DATA_W-1:0];
    end

    // node 7 is the hubnetwork interface, wired to hub node s+1
    hub_interface #(.PAYLOAD_W(PW)) u_hi (
      .clk, .rst_n,
      .sub_rx_valid(s_rx_valid[NN-1]), .sub_rx_ready(s_rx_ready[NN-1]),
      .sub_rx_payload(s_rx_payload[NN-1]),
      .hub_tx_valid(h_tx_valid[s]), .hub_tx_ready(h_tx_ready[s]), .hub_tx_dst(h_tx_dst[s]),
      .hub_tx_payload(h_tx_payload[s]),
      .hub_rx_valid(h_rx_valid[s]), .hub_rx_ready(h_rx_ready[s]),
      .hub_rx_payload(h_rx_payload[s]),
      .sub_tx_valid(s_tx_valid[NN-1]), .sub_tx_ready(s_tx_ready[NN-1]),
      .sub_tx_dst(s_tx_dst[NN-1]), .sub_tx_payload(s_tx_payload[NN-1]),
      .up_evt(hi_up_evt[s]), .down_evt(hi_down_evt[s])
    );
  end

endmodule
