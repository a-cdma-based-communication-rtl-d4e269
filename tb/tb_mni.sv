// tb_mni: master CNI (node 2) against a scripted reverse channel.
// Four packets are queued. The testbench plays the destination's ACK packets on the
// reverse channel through the reference channel model: the first transmission gets a
// NACK (it must be resent in the next slot), one answer comes late (the MNI must skip
// slots until it arrives), one ACK addressed to another node must be ignored, the rest
// are ACKs. Every tick the forward codeword is compared with the expected modulated bit:
// bit k of a packet started at slot tick s must be on the channel in tick s + 1 + k.
module tb_mni;
  import cdma_pkg::*;
  import tb_cdma_ref::*;
  localparam int PW = 13, L = 19, ME = 2, PEER = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sync_t fwd, rev;
  logic tx_valid, tx_ready;
  node_id_t tx_dst;
  logic [PW-1:0] tx_payload;
  code_t fwd_code, rev_chips;
  logic sent_evt, ack_evt, nack_evt, busy;
  int checks = 0, failures = 0;

  synchronizer u_sync (.clk, .rst_n, .fwd, .rev);
  mni #(.MY_ID(ME), .PAYLOAD_W(PW)) dut (.clk, .rst_n, .fwd, .rev, .tx_valid, .tx_ready,
    .tx_dst, .tx_payload, .fwd_code, .rev_chips, .sent_evt, .ack_evt, .nack_evt, .busy);

  typedef struct { int at; int id; bit ack; } resp_t;
  logic [ID_W+PW-1:0] q[$];
  resp_t plan[$];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit waiting = 0;
    int bitpos = -1, sends = 0, nacks = 0, acks = 0, skipped = 0, tick = 0;
    logic [L-1:0] cur;
    bit r_on = 0; int rb = 0; resp_t r;
    logic [3:0] rword;
    bit v[8], b[8];
    logic [ID_W+PW-1:0] pk;

    tx_valid = 0; tx_dst = '0; tx_payload = '0; rev_chips = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // queue four packets (one per clock; the first slot starts at once)
    for (int i = 0; i < 4; i++) begin
      pk = {3'(i == 0 ? PEER : 1 + (i % 7)), 13'($urandom)};
      tx_valid = 1; tx_dst = pk[ID_W+PW-1 -: ID_W]; tx_payload = pk[PW-1:0];
      #1 chk(tx_ready, "tx_ready");
      @(negedge clk);
      q.push_back(pk);
      tick++;
      if (bitpos >= 0) bitpos++;
    end
    tx_valid = 0;
    // from here on a full cycle model runs tick by tick (tick 0 was the first slot start,
    // which found the buffer empty because the first push was still in flight)
    for (int c = 0; c < 400; c++) begin
      // reverse channel for this tick
      if (!r_on && rev.rx_start && plan.size() != 0 && plan[0].at <= tick) begin
        r = plan.pop_front(); r_on = 1; rb = 0; rword = {3'(r.id), r.ack};
      end
      foreach (v[n]) begin v[n] = 0; b[n] = 0; end
      if (r_on) begin v[PEER] = 1; b[PEER] = rword[3 - rb]; end
      rev_chips = ref_channel(v, b);
      #1;
      // forward codeword of this tick
      chk(fwd_code == (bitpos >= 0 ? ref_mod(ME, 1, cur[L-1-bitpos]) : ref_code(ME)),
          $sformatf("fwd_code tick %0d bitpos %0d", tick, bitpos));
      // events of this tick
      begin
        bit hit;
        hit = r_on && rb == 3 && r.id == ME && waiting;
        chk(ack_evt == (hit && r.ack) && nack_evt == (hit && !r.ack), $sformatf("ack events tick %0d hit %0d ack %0d nack %0d wait %0d rb %0d pos %0d pkt %b", tick, hit, ack_evt, nack_evt, dut.wait_q, rb, dut.g_ack_lane[4].pos_cur, dut.g_ack_lane[4].pkt));
        if (hit) begin
          waiting = 0;
          if (r.ack) begin void'(q.pop_front()); acks++; end else nacks++;
        end
      end
      if (r_on) begin rb++; if (rb == 4) r_on = 0; end
      // what the coming clock edge does on the forward side
      if (bitpos >= 0) bitpos = (bitpos == L - 1) ? -1 : bitpos + 1;
      chk(sent_evt == (fwd.tx_start && !waiting && q.size() != 0), $sformatf("sent_evt tick %0d", tick));
      if (fwd.tx_start && waiting) skipped++;
      if (fwd.tx_start && !waiting && q.size() != 0) begin
        cur = {q[0][ID_W+PW-1 -: ID_W], 3'(ME), q[0][PW-1:0]};
        bitpos = 0; waiting = 1;
        case (sends)
          0: plan.push_back('{tick + 6, ME, 1'b0});
          2: begin
               plan.push_back('{tick + 6, 4, 1'b1});
               plan.push_back('{tick + 30, ME, 1'b1});
             end
          default: plan.push_back('{tick + 6, ME, 1'b1});
        endcase
        sends++;
      end
      @(negedge clk);
      tick++;
    end
    chk(sends == 5 && acks == 4 && nacks == 1 && skipped >= 1 && q.size() == 0,
        $sformatf("totals sends %0d acks %0d nacks %0d skipped %0d", sends, acks, nacks, skipped));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
