// hub_interface: hubnetwork interface (HI) between one subnetwork and the hubnetwork.
//
// The HI takes the place of one node of its subnetwork and is wired to one node of the
// hubnetwork. It forwards packets between the two networks, each with its own flow
// control, and rewrites the destination ID for the next network from the routing header
// at the front of the payload, {dst subnet, dst node, src subnet, src node, data}:
//   up   (subnetwork -> hubnetwork): next destination = dst subnet
//   down (hubnetwork -> subnetwork): next destination = dst node
// Each direction has a one-entry holding register with valid/ready on both sides, so a
// packet waits in the HI while the next network's TX buffer is full.
// Interface: sub_rx_* / hub_tx_* for the up direction, hub_rx_* / sub_tx_* for down; all
// are the resource-side ports of the adjoining CNIs. Latency: one clock per direction.
// That the HI links two networks hop by hop follows the document; the header layout and
// the holding registers are this design's own.
module hub_interface
  import cdma_pkg::*;
#(
  parameter int unsigned PAYLOAD_W = 28
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // from the subnetwork CNI's RX side
  input  logic                 sub_rx_valid,
  output logic                 sub_rx_ready,
  input  logic [PAYLOAD_W-1:0] sub_rx_payload,
  // to the hubnetwork CNI's TX side
  output logic                 hub_tx_valid,
  input  logic                 hub_tx_ready,
  output node_id_t             hub_tx_dst,
  output logic [PAYLOAD_W-1:0] hub_tx_payload,
  // from the hubnetwork CNI's RX side
  input  logic                 hub_rx_valid,
  output logic                 hub_rx_ready,
  input  logic [PAYLOAD_W-1:0] hub_rx_payload,
  // to the subnetwork CNI's TX side
  output logic                 sub_tx_valid,
  input  logic                 sub_tx_ready,
  output node_id_t             sub_tx_dst,
  output logic [PAYLOAD_W-1:0] sub_tx_payload,
  // status
  output logic                 up_evt,
  output logic                 down_evt
);

  localparam int unsigned SUB_MSB  = PAYLOAD_W - 1;           // dst subnet field
  localparam int unsigned NODE_MSB = PAYLOAD_W - 1 - ID_W;    // dst node field

  logic                 up_v_q, dn_v_q;
  logic [PAYLOAD_W-1:0] up_q, dn_q;

  assign sub_rx_ready   = !up_v_q || hub_tx_ready;
  assign hub_tx_valid   = up_v_q;
  assign hub_tx_payload = up_q;
  assign hub_tx_dst     = up_q[SUB_MSB -: ID_W];

  assign hub_rx_ready   = !dn_v_q || sub_tx_ready;
  assign sub_tx_valid   = dn_v_q;
  assign sub_tx_payload = dn_q;
  assign sub_tx_dst     = dn_q[NODE_MSB -: ID_W];

  assign up_evt   = sub_rx_valid && sub_rx_ready;
  assign down_evt = hub_rx_valid && hub_rx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_v_q <= 1'b0;
      dn_v_q <= 1'b0;
    end else begin
      if (sub_rx_ready) up_v_q <= sub_rx_valid;
      if (hub_rx_ready) dn_v_q <= hub_rx_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (sub_rx_valid && sub_rx_ready) up_q <= sub_rx_payload;
    if (hub_rx_valid && hub_rx_ready) dn_q <= hub_rx_payload;
  end

endmodule
