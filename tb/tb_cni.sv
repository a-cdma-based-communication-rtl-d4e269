// tb_cni: one full CNI (node 3) on a forward and a reverse channel, together with a
// send-only CNI (node 5, no SNI) and a receive-only CNI (node 6, no MNI); the other four
// nodes are idle. Node 3 sends 30 packets to itself, so its own SNI answers its own MNI
// over the reverse channel, and then 10 packets to node 6; node 5 sends 12 packets to
// node 3. Checks: every packet arrives once, in order per source, with the right source
// ID; the first packet, started at slot tick s, is readable at tick s + L + 2 (L = 19,
// the packet length); while node 3's resource does not read, its RX buffer fills, NACKs
// are sent and the MNI repeats the packet until it is accepted; the receive-only node
// never accepts a packet to send.
module tb_cni;
  import cdma_pkg::*;
  import tb_cdma_ref::*;
  localparam int PW = 13, L = 19, ME = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sync_t fwd, rev;
  logic tx_valid, tx_ready, rx_valid, rx_ready;
  node_id_t tx_dst, rx_src;
  logic [PW-1:0] tx_payload, rx_payload;
  code_t fwd_codes[7], rev_codes[7];
  code_t fwd_chips, rev_chips;
  logic sent_evt, got_ack, got_nack, gave_ack, gave_nack;
  int checks = 0, failures = 0;

  synchronizer u_sync (.clk, .rst_n, .fwd, .rev);
  comm_channel u_fch (.clk, .rst_n, .chip_en(fwd.chip_en), .tx_codes(fwd_codes), .chips(fwd_chips));
  comm_channel u_rch (.clk, .rst_n, .chip_en(rev.chip_en), .tx_codes(rev_codes), .chips(rev_chips));

  for (genvar n = 0; n < 7; n++) begin : g_idle
    if (n != ME - 1 && n != 4 && n != 5) begin : g_i
      assign fwd_codes[n] = ref_code(n + 1);
      assign rev_codes[n] = ref_code(n + 1);
    end
  end

  cni #(.MY_ID(ME), .PAYLOAD_W(PW)) dut (
    .clk, .rst_n, .fwd, .rev, .tx_valid, .tx_ready, .tx_dst, .tx_payload,
    .rx_valid, .rx_ready, .rx_src, .rx_payload,
    .fwd_code(fwd_codes[ME-1]), .rev_code(rev_codes[ME-1]), .fwd_chips, .rev_chips,
    .sent_evt, .got_ack_evt(got_ack), .got_nack_evt(got_nack),
    .gave_ack_evt(gave_ack), .gave_nack_evt(gave_nack)
  );

  // node 5: send-only CNI; node 6: receive-only CNI
  logic t5_valid, t5_ready, r6_valid, t6_ready;
  logic [PW-1:0] t5_payload, r6_payload;
  node_id_t r6_src;
  logic r5_valid_u, g5_u[4], g6_u[5];
  node_id_t r5_src_u;
  logic [PW-1:0] r5_payload_u;

  cni #(.MY_ID(5), .PAYLOAD_W(PW), .HAS_SNI(1'b0)) u_tx_only (
    .clk, .rst_n, .fwd, .rev, .tx_valid(t5_valid), .tx_ready(t5_ready), .tx_dst(node_id_t'(ME)),
    .tx_payload(t5_payload), .rx_valid(r5_valid_u), .rx_ready(1'b1), .rx_src(r5_src_u),
    .rx_payload(r5_payload_u), .fwd_code(fwd_codes[4]), .rev_code(rev_codes[4]), .fwd_chips,
    .rev_chips, .sent_evt(g5_u[0]), .got_ack_evt(g5_u[1]), .got_nack_evt(g5_u[2]),
    .gave_ack_evt(g5_u[3]), .gave_nack_evt()
  );

  cni #(.MY_ID(6), .PAYLOAD_W(PW), .HAS_MNI(1'b0)) u_rx_only (
    .clk, .rst_n, .fwd, .rev, .tx_valid(1'b1), .tx_ready(t6_ready), .tx_dst(node_id_t'(ME)),
    .tx_payload('0), .rx_valid(r6_valid), .rx_ready(1'b1), .rx_src(r6_src),
    .rx_payload(r6_payload), .fwd_code(fwd_codes[5]), .rev_code(rev_codes[5]), .fwd_chips,
    .rev_chips, .sent_evt(g6_u[0]), .got_ack_evt(g6_u[1]), .got_nack_evt(g6_u[2]),
    .gave_ack_evt(g6_u[3]), .gave_nack_evt(g6_u[4])
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [PW-1:0] pushed[$];
  logic [PW-1:0] pushed5[$];
  logic [PW-1:0] pushed6[$];
  int recv6 = 0, recv5 = 0;
  logic [PW-1:0] inflight[$];
  int last_sent = -1, nacks = 0, gnacks = 0, recv = 0, lat_ok = 0;
  int cyc = 0;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // resource writer of node 3: 30 packets to itself, then 10 to node 6
  initial begin
    tx_valid = 0; tx_dst = node_id_t'(ME); tx_payload = '0;
    wait (rst_n);
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      tx_valid = 1; tx_payload = PW'(i * 97 + 5); tx_dst = node_id_t'(i < 30 ? ME : 6);
      do @(posedge clk); while (!tx_ready);
      if (i < 30) pushed.push_back(tx_payload); else pushed6.push_back(tx_payload);
      inflight.push_back(tx_payload);
    end
    @(negedge clk) tx_valid = 0;
  end

  // resource writer of node 5: 12 packets to node 3, starting after the NACK stretch
  initial begin
    t5_valid = 0; t5_payload = '0;
    wait (rst_n);
    repeat (600) @(negedge clk);
    for (int i = 0; i < 12; i++) begin
      @(negedge clk);
      t5_valid = 1; t5_payload = PW'(i * 31 + 1000);
      do @(posedge clk); while (!t5_ready);
      pushed5.push_back(t5_payload);
    end
    @(negedge clk) t5_valid = 0;
  end

  // receive-only node 6 reads everything at once
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (t6_ready) begin failures++; $display("FAIL receive-only node accepts TX"); end
    if (r6_valid) begin
      checks++;
      if (r6_src != node_id_t'(ME) || pushed6.size() == 0 || r6_payload != pushed6[0]) begin
        failures++; $display("FAIL node 6 got %h from %0d", r6_payload, r6_src);
      end
      if (pushed6.size() != 0) void'(pushed6.pop_front());
      recv6++;
    end
  end

  // monitor
  initial begin
    bit rv_prev = 0;
    rx_ready = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      // stop reading between cycles 100 and 400 so that the RX buffer fills
      rx_ready = (c < 100 || c > 400) && (($urandom % 2) == 0);
      #1;
      if (sent_evt && last_sent < 0) last_sent = c;
      if (got_nack) nacks++;
      if (gave_nack) gnacks++;
      if (got_ack) void'(inflight.pop_front());
      // latency: a packet alone in an empty buffer is readable L + 2 ticks after its slot
      if (rx_valid && !rv_prev && recv == 0) begin
        chk(c - last_sent == L + 2, $sformatf("latency %0d", c - last_sent));
        lat_ok++;
      end
      rv_prev = rx_valid;
      if (rx_valid && rx_ready && rx_src == node_id_t'(5)) begin
        chk(pushed5.size() != 0 && rx_payload == pushed5[0], $sformatf("rx c=%0d from 5 payload %h", c, rx_payload));
        if (pushed5.size() != 0) void'(pushed5.pop_front());
        recv5++;
      end else if (rx_valid && rx_ready) begin
        chk(rx_src == node_id_t'(ME) && pushed.size() != 0 && rx_payload == pushed[0],
            $sformatf("rx c=%0d src %0d payload %h", c, rx_src, rx_payload));
        if (pushed.size() != 0) void'(pushed.pop_front());
        recv++;
      end
      @(negedge clk);
      cyc++;
    end
    chk(recv == 30 && pushed.size() == 0 && inflight.size() == 0, $sformatf("received %0d", recv));
    chk(recv5 == 12 && pushed5.size() == 0 && recv6 == 10 && pushed6.size() == 0,
        $sformatf("send-only -> %0d, receive-only <- %0d", recv5, recv6));
    chk(nacks > 0 && nacks == gnacks && lat_ok == 1, $sformatf("nacks %0d/%0d lat %0d", nacks, gnacks, lat_ok));
    $display("received %0d from itself, %0d from node 5; node 6 received %0d; nacks %0d", recv, recv5, recv6, nacks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
