// tb_sni: slave CNI (node 4) against up to seven simultaneous senders.
// Every forward slot each of the seven codes may carry a packet: to node 4, to another
// node, or nothing; they are overlaid through the reference truncated channel. A cycle
// model predicts, independently of the RTL, the ACK/NACK decision for every packet
// addressed to node 4 (room in that source's RX buffer when the destination ID is
// complete), the ACK packets on the reverse channel (one per reverse slot, lowest source
// first, bit k in tick t + 1 + k after slot start t) and the packets the resource reads
// (per-source order, contents). The resource stops reading for long stretches so that
// buffers fill and NACKs occur.
module tb_sni;
  import cdma_pkg::*;
  import tb_cdma_ref::*;
  localparam int PW = 13, L = 19, ME = 4, DEPTH = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sync_t fwd, rev;
  code_t fwd_chips, rev_code;
  logic rx_valid, rx_ready, ack_evt, nack_evt;
  node_id_t rx_src;
  logic [PW-1:0] rx_payload;
  int checks = 0, failures = 0;

  synchronizer u_sync (.clk, .rst_n, .fwd, .rev);
  sni #(.MY_ID(ME), .PAYLOAD_W(PW), .RX_DEPTH(DEPTH)) dut (.clk, .rst_n, .fwd, .rev,
    .fwd_chips, .rev_code, .rx_valid, .rx_ready, .rx_src, .rx_payload, .ack_evt, .nack_evt);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] pkt[8];
    bit sending[8], keep[8], pend[8], pend_ack[8];
    int level[8];
    logic [PW-1:0] expq[8][$];
    int bitpos = -1;
    bit v[8], b[8];
    bit a_on = 0; int abit = 0; logic [3:0] aword;
    int n_ack = 0, n_nack = 0, n_multi = 0, n_other = 0, n_deep = 0, n_read = 0, n_sent_acks = 0;

    rx_ready = 0; fwd_chips = '0;
    foreach (level[n]) begin level[n] = 0; sending[n] = 0; keep[n] = 0; pend[n] = 0; pend_ack[n] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      bit hit[8];
      int np, npend, pick;
      // forward slot: new packets start when rx_start is high
      if (fwd.rx_start) begin
        int to_me;
        to_me = 0;
        bitpos = 0;
        for (int n = 1; n <= 7; n++) begin
          int r;
          r = $urandom % 10;
          sending[n] = 0;
          if (r < 6 && !pend[n]) begin
            pkt[n] = {3'(ME), 3'(n), 13'($urandom)}; sending[n] = 1; to_me++;
          end else if (r < 8) begin
            int d;
            d = 1 + ($urandom % 7);
            if (d == ME) d = 1 + (d % 7);
            pkt[n] = {3'(d), 3'(n), 13'($urandom)}; sending[n] = 1; n_other++;
          end
        end
        if (to_me >= 2) n_multi++;
      end
      for (int n = 1; n <= 7; n++) begin
        v[n] = sending[n] && bitpos >= 0;
        b[n] = v[n] ? pkt[n][L-1-bitpos] : 1'b0;
      end
      v[0] = 0; b[0] = 0;
      fwd_chips = ref_channel(v, b);
      rx_ready = ((c / 300) % 3 == 1) ? 1'b0 : 1'(($urandom % 4) != 0);
      #1;
      // reverse channel: this tick's ACK bit
      chk(rev_code == (a_on ? ref_mod(ME, 1, aword[3 - abit]) : ref_code(ME)),
          $sformatf("rev_code c=%0d a_on %0d abit %0d", c, a_on, abit));
      // decisions at the third bit
      np = 0; npend = 0;
      for (int n = 1; n <= 7; n++) begin
        hit[n] = bitpos == 2 && sending[n] && pkt[n][L-1 -: 3] == 3'(ME);
        if (pend[n]) npend++;
      end
      if (npend >= 3) n_deep++;
      begin
        bit ea, en;
        ea = 0; en = 0;
        for (int n = 1; n <= 7; n++) if (hit[n]) begin
          if (level[n] < DEPTH) ea = 1; else en = 1;
        end
        chk(ack_evt == ea && nack_evt == en, $sformatf("ack/nack events c=%0d", c));
      end
      // resource read
      if (rx_valid && rx_ready) begin
        int s;
        s = int'(rx_src);
        chk(s >= 1 && s <= 7 && expq[s].size() != 0 && expq[s][0] == rx_payload,
            $sformatf("read c=%0d src %0d", c, s));
        if (s >= 1 && s <= 7 && expq[s].size() != 0) begin void'(expq[s].pop_front()); level[s]--; end
        n_read++;
      end else begin
        bit any;
        any = 0;
        for (int n = 1; n <= 7; n++) if (expq[n].size() != 0) any = 1;
        chk(rx_valid == any, $sformatf("rx_valid c=%0d dut %0d model %0d sizes %0d %0d %0d %0d %0d %0d %0d bv %b", c, rx_valid, any, expq[1].size(), expq[2].size(), expq[3].size(), expq[4].size(), expq[5].size(), expq[6].size(), expq[7].size(), dut.buf_valid));
      end
      // reverse transmitter: advance, then a new ACK packet at a reverse slot start
      if (a_on) begin abit++; if (abit == 4) a_on = 0; end
      pick = 0;
      for (int n = 7; n >= 1; n--) if (pend[n]) pick = n;
      if (rev.tx_start && pick != 0) begin
        a_on = 1; abit = 0; aword = {3'(pick), pend_ack[pick]}; pend[pick] = 0; n_sent_acks++;
      end
      for (int n = 1; n <= 7; n++) if (hit[n]) begin
        pend[n] = 1;
        pend_ack[n] = level[n] < DEPTH;
        keep[n] = level[n] < DEPTH;
        if (keep[n]) n_ack++; else n_nack++;
      end
      // end of packet: kept packets enter the buffer
      if (bitpos == L - 1) begin
        for (int n = 1; n <= 7; n++) if (sending[n] && keep[n] && pkt[n][L-1 -: 3] == 3'(ME)) begin
          expq[n].push_back(pkt[n][PW-1:0]); level[n]++; keep[n] = 0;
        end
        for (int n = 1; n <= 7; n++) keep[n] = 0;
        bitpos = -1;
      end else if (bitpos >= 0) bitpos++;
      @(negedge clk);
    end
    chk(n_ack > 50 && n_nack > 5 && n_multi > 20 && n_other > 20 && n_deep > 5 && n_read > 50,
        $sformatf("coverage ack %0d nack %0d multi %0d other %0d deep %0d read %0d",
                  n_ack, n_nack, n_multi, n_other, n_deep, n_read));
    $display("coverage ack %0d nack %0d multi %0d other %0d deep %0d read %0d acks sent %0d",
             n_ack, n_nack, n_multi, n_other, n_deep, n_read, n_sent_acks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
