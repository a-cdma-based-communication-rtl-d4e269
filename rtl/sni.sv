// sni: slave CNI, the receiving half of a CDMA network interface.
//
// The SNI despreads every PN code on the forward channel in parallel, so it can receive
// from all other nodes at once. Each code has its own receive lane: a shift register
// aligned to the forward packet slot by rx_start. As soon as the 3-bit destination ID of
// a lane is complete, the lane compares it with the SNI's own ID. On a match the SNI
// decides from the level of that lane's RX buffer: room left means ACK (the packet will be
// kept), a full buffer means NACK (the packet is dropped and the sender will repeat it).
// The answer is queued as a pending ACK packet {source ID, ack}; pending answers are sent
// one per reverse slot, lowest source ID first, with the SNI's own code on the reverse
// channel. A kept packet enters the lane's RX buffer when its last bit arrives; the
// resource reads the RX buffers through a round-robin arbiter and sees {src, payload}.
// Interface: fwd_chips in, rev_code out, rx_valid/rx_ready/rx_src/rx_payload to the
// resource, single-cycle ack_evt/nack_evt pulses (one per answer decided).
// Timing: a packet whose first bit reaches the SNI at rx_start tick t is readable in the
// tick after t + PKT_LEN - 1.
// Despreading all codes, destination check and buffer-level ACK/NACK follow the document;
// per-source buffers, answer ordering and the arbiter are this design's own.
module sni
  import cdma_pkg::*;
#(
  parameter int unsigned MY_ID     = 1,
  parameter int unsigned N_NODES   = MAX_NODES,
  parameter int unsigned PAYLOAD_W = 13,
  parameter int unsigned RX_DEPTH  = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  sync_t                fwd,
  input  sync_t                rev,
  // channels
  input  code_t                fwd_chips,
  output code_t                rev_code,
  // resource side
  output logic                 rx_valid,
  input  logic                 rx_ready,
  output node_id_t             rx_src,
  output logic [PAYLOAD_W-1:0] rx_payload,
  // status
  output logic                 ack_evt,
  output logic                 nack_evt
);

  localparam int unsigned PKT_LEN = 2 * ID_W + PAYLOAD_W;
  localparam int unsigned BW = $clog2(PKT_LEN + 1);
  localparam int unsigned EW = ID_W + PAYLOAD_W;  // stored entry: {src, payload}
  localparam int unsigned LI = (N_NODES > 1) ? $clog2(N_NODES) : 1;
  localparam node_id_t SELF = node_id_t'(MY_ID);

  logic [N_NODES-1:0] dec_hit, dec_room;
  logic [N_NODES-1:0] buf_valid, buf_pop;
  logic [EW-1:0]      buf_data[N_NODES];

  // ---------------- receive lanes ----------------
  for (genvar i = 0; i < N_NODES; i++) begin : g_lane
    logic               dbit;
    logic [CNT_W-1:0]   cnt_unused;
    logic [PKT_LEN-2:0] sh_q;
    logic [BW-1:0]      pos_q, pos_cur;
    logic [PKT_LEN-1:0] pkt;
    logic               keep_q;
    logic               wr_ready;
    logic               wr_valid;
    logic [$clog2(RX_DEPTH+1)-1:0] level_unused;

    cni_demodulator #(.CODE_ID(i + 1)) u_dem (
      .clk, .rst_n, .code_we(1'b0), .code_in('0),
      .chips(fwd_chips), .count(cnt_unused), .despread_bit(dbit)
    );

    // pos_q == PKT_LEN means "between packets": nothing is collected until rx_start
    assign pos_cur = fwd.rx_start ? '0 : pos_q;
    assign pkt     = {sh_q, dbit};

    assign dec_hit[i]  = fwd.chip_en && (pos_cur == BW'(ID_W - 1)) &&
                         (pkt[ID_W-1:0] == SELF);
    assign dec_room[i] = wr_ready;
    assign wr_valid    = fwd.chip_en && (pos_cur == BW'(PKT_LEN - 1)) && keep_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        sh_q   <= '0;
        pos_q  <= BW'(PKT_LEN);
        keep_q <= 1'b0;
      end else if (fwd.chip_en) begin
        sh_q <= pkt[PKT_LEN-2:0];
        if (pos_cur != BW'(PKT_LEN)) pos_q <= pos_cur + 1'b1;
        if (dec_hit[i]) keep_q <= wr_ready;
        else if (pos_cur == BW'(PKT_LEN - 1)) keep_q <= 1'b0;
      end
    end

    sync_fifo #(.W(EW), .DEPTH(RX_DEPTH)) u_rxbuf (
      .clk, .rst_n,
      .wr_valid(wr_valid), .wr_ready(wr_ready), .wr_data(pkt[EW-1:0]),
      .rd_valid(buf_valid[i]), .rd_ready(buf_pop[i]), .rd_data(buf_data[i]),
      .level(level_unused)
    );
  end

  assign ack_evt  = |(dec_hit & dec_room);
  assign nack_evt = |(dec_hit & ~dec_room);

  // ---------------- ACK/NACK transmitter on the reverse channel ----------------
  logic [N_NODES-1:0] pend_q, pend_ack_q;
  logic [N_NODES-1:0] pick;
  logic [ACK_LEN-1:0] ack_sh_q;
  logic [$clog2(ACK_LEN+1)-1:0] ack_cnt_q;
  logic               ack_send_q;
  logic               ack_load;
  node_id_t           pick_id;
  logic               pick_bit;

  always_comb begin
    pick     = '0;
    pick_id  = NO_ID;
    pick_bit = 1'b0;
    for (int i = N_NODES - 1; i >= 0; i--) begin
      if (pend_q[i]) begin
        pick     = '0;
        pick[i]  = 1'b1;
        pick_id  = node_id_t'(i + 1);
        pick_bit = pend_ack_q[i];
      end
    end
  end

  assign ack_load = rev.tx_start && (pend_q != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q     <= '0;
      pend_ack_q <= '0;
    end else begin
      pend_q     <= (pend_q & ~(ack_load ? pick : '0)) | dec_hit;
      pend_ack_q <= (pend_ack_q & ~dec_hit) | (dec_hit & dec_room);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_sh_q   <= '0;
      ack_cnt_q  <= '0;
      ack_send_q <= 1'b0;
    end else if (ack_load) begin
      ack_sh_q   <= {pick_id, pick_bit};
      ack_cnt_q  <= '0;
      ack_send_q <= 1'b1;
    end else if (rev.chip_en && ack_send_q) begin
      ack_sh_q  <= ack_sh_q << 1;
      ack_cnt_q <= ack_cnt_q + 1'b1;
      if (ack_cnt_q == ($clog2(ACK_LEN+1))'(ACK_LEN - 1)) ack_send_q <= 1'b0;
    end
  end

  cni_modulator #(.CODE_ID(MY_ID)) u_mod (
    .clk, .rst_n, .code_we(1'b0), .code_in('0),
    .data_valid(ack_send_q), .data_bit(ack_sh_q[ACK_LEN-1]), .mod_code(rev_code)
  );

  // ---------------- round-robin read-out to the resource ----------------
  logic [LI-1:0] rr_q;
  logic [LI-1:0] sel;
  logic          sel_valid;

  always_comb begin
    sel       = '0;
    sel_valid = 1'b0;
    for (int k = N_NODES - 1; k >= 0; k--) begin
      int unsigned idx;
      idx = (int'(rr_q) + k) % N_NODES;
      if (buf_valid[idx]) begin
        sel       = LI'(idx);
        sel_valid = 1'b1;
      end
    end
  end

  assign rx_valid   = sel_valid;
  assign rx_src     = buf_data[sel][EW-1 -: ID_W];
  assign rx_payload = buf_data[sel][PAYLOAD_W-1:0];

  always_comb begin
    buf_pop = '0;
    if (sel_valid && rx_ready) buf_pop[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr_q <= '0;
    else if (sel_valid && rx_ready) rr_q <= (sel == LI'(N_NODES - 1)) ? '0 : sel + 1'b1;
  end

endmodule
