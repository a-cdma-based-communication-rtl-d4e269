// mni: master CNI, the sending half of a CDMA network interface.
//
// The resource pushes {destination ID, payload} into a TX buffer and is then free to go
// on computing. At each forward packet-slot start, if no packet is outstanding, the MNI
// loads the buffer head as {dst, own ID, payload} and sends it MSB first, one bit per chip
// tick, through its modulator with its own PN code. It keeps the packet in the buffer
// until the destination answers on the reverse channel: an ACK frees it, a NACK (receiver
// buffer full) makes the MNI send it again in a later slot. To hear the answer the MNI
// despreads every PN code on the reverse channel and reassembles 4-bit ACK packets
// {source ID, ack}; the one that carries its own ID is its answer.
// Interface: tx_valid/tx_ready/tx_dst/tx_payload from the resource, fwd_code to the
// forward channel, rev_chips from the reverse channel, fwd/rev strobes from the
// synchronizer, and single-cycle ack_evt/nack_evt/sent_evt pulses for statistics.
// Timing: bit k of a packet started at tx_start tick s is on fwd_code in tick s+1+k.
// The packet layout, the per-code despreading and ACK/NACK flow control follow the
// document; one outstanding packet and retransmission on NACK are this design's reading.
module mni
  import cdma_pkg::*;
#(
  parameter int unsigned MY_ID     = 1,
  parameter int unsigned N_NODES   = MAX_NODES,
  parameter int unsigned PAYLOAD_W = 13,
  parameter int unsigned TX_DEPTH  = 4
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
  // channels
  output code_t                fwd_code,
  input  code_t                rev_chips,
  // status
  output logic                 sent_evt,
  output logic                 ack_evt,
  output logic                 nack_evt,
  output logic                 busy
);

  localparam int unsigned PKT_LEN = 2 * ID_W + PAYLOAD_W;
  localparam int unsigned BW = $clog2(PKT_LEN + 1);
  localparam int unsigned AW = $clog2(ACK_LEN + 1);
  localparam node_id_t SELF = node_id_t'(MY_ID);

  // ---------------- TX buffer ----------------
  logic                        head_valid, head_pop;
  logic [ID_W+PAYLOAD_W-1:0]   head;
  logic [$clog2(TX_DEPTH+1)-1:0] tx_level;

  sync_fifo #(.W(ID_W + PAYLOAD_W), .DEPTH(TX_DEPTH)) u_txbuf (
    .clk, .rst_n,
    .wr_valid(tx_valid), .wr_ready(tx_ready), .wr_data({tx_dst, tx_payload}),
    .rd_valid(head_valid), .rd_ready(head_pop), .rd_data(head), .level(tx_level)
  );

  // ---------------- packet serializer ----------------
  logic [PKT_LEN-1:0] sreg_q;
  logic [BW-1:0]      bitcnt_q;
  logic               sending_q, wait_q;
  logic               load;
  logic               resp_hit, resp_ack;

  assign load = fwd.tx_start && head_valid && !wait_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg_q    <= '0;
      bitcnt_q  <= '0;
      sending_q <= 1'b0;
    end else if (load) begin
      sreg_q    <= {head[ID_W+PAYLOAD_W-1 -: ID_W], SELF, head[PAYLOAD_W-1:0]};
      bitcnt_q  <= '0;
      sending_q <= 1'b1;
    end else if (fwd.chip_en && sending_q) begin
      sreg_q   <= sreg_q << 1;
      bitcnt_q <= bitcnt_q + 1'b1;
      if (bitcnt_q == BW'(PKT_LEN - 1)) sending_q <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wait_q <= 1'b0;
    else if (load) wait_q <= 1'b1;
    else if (resp_hit) wait_q <= 1'b0;
  end

  assign head_pop = resp_hit && resp_ack;
  assign sent_evt = load;
  assign ack_evt  = resp_hit && resp_ack;
  assign nack_evt = resp_hit && !resp_ack;
  assign busy     = wait_q || head_valid;

  cni_modulator #(.CODE_ID(MY_ID)) u_mod (
    .clk, .rst_n, .code_we(1'b0), .code_in('0),
    .data_valid(sending_q), .data_bit(sreg_q[PKT_LEN-1]), .mod_code(fwd_code)
  );

  // ---------------- ACK receiver: one despreader per PN code ----------------
  logic [N_NODES-1:0] lane_hit, lane_ack;

  for (genvar i = 0; i < N_NODES; i++) begin : g_ack_lane
    logic                 dbit;
    logic [CNT_W-1:0]     cnt_unused;
    logic [ACK_LEN-2:0]   sh_q;
    logic [AW-1:0]        pos_q;
    logic [AW-1:0]        pos_cur;
    logic [ACK_LEN-1:0]   pkt;

    cni_demodulator #(.CODE_ID(i + 1)) u_dem (
      .clk, .rst_n, .code_we(1'b0), .code_in('0),
      .chips(rev_chips), .count(cnt_unused), .despread_bit(dbit)
    );

    // pos_q == ACK_LEN means "between packets": nothing is collected until rx_start
    assign pos_cur = rev.rx_start ? '0 : pos_q;
    assign pkt     = {sh_q, dbit};

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        sh_q  <= '0;
        pos_q <= AW'(ACK_LEN);
      end else if (rev.chip_en) begin
        sh_q <= pkt[ACK_LEN-2:0];
        if (pos_cur != AW'(ACK_LEN)) pos_q <= pos_cur + 1'b1;
      end
    end

    assign lane_hit[i] = rev.chip_en && (pos_cur == AW'(ACK_LEN - 1)) &&
                         (pkt[ACK_LEN-1:1] == SELF) && wait_q;
    assign lane_ack[i] = pkt[0];
  end

  assign resp_hit = |lane_hit;
  assign resp_ack = |(lane_hit & lane_ack);

endmodule
