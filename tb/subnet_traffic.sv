// subnet_traffic: traffic generator and scoreboard for one subnetwork (testbench helper).
// Drives a subnetwork with packet payload PW through four phases: an offered-load sweep
// (each node injects in 20, 40, 60, 80 and 100% of slots on average, receivers always
// ready; throughput and mean latency are reported per step, and up to 60% the throughput
// must follow the offered load), saturation (every node keeps its
// TX buffer full), a stall (node 1 stops reading, so its RX buffers fill and it answers
// NACK) and a drain. Every packet carries {source, sequence number}; the scoreboard checks
// that each packet is read exactly once, by the right node, in order per source and
// destination. Timing: no packet is read earlier than L + 2 ticks (L = 6 + PW, the packet
// length) after the slot in which its last transmission started; at 20-40% load most take
// exactly that long and the rest wait at most N - 1 more clocks in the read-out arbiter.
// Counted mechanisms, each of which must occur: NACK and retransmission, two or more
// packets reaching one node in one slot, back-to-back slots from one node, and, for packets too short to carry
// six ACK slots, slots a node skips while it waits for a late ACK. Saturation throughput is reported.
module subnet_traffic #(
  parameter int PW = 13
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   done
);
  import cdma_pkg::*;
  localparam int N = 7, L = 2 * ID_W + PW;

  logic tx_valid[N], tx_ready[N], rx_valid[N], rx_ready[N];
  node_id_t tx_dst[N], rx_src[N];
  logic [PW-1:0] tx_payload[N], rx_payload[N];
  logic [N-1:0] sent_evt, got_ack, got_nack, gave_ack, gave_nack;
  subnetwork #(.PAYLOAD_W(PW)) dut (.clk, .rst_n, .tx_valid, .tx_ready, .tx_dst, .tx_payload,
    .rx_valid, .rx_ready, .rx_src, .rx_payload, .sent_evt, .got_ack_evt(got_ack),
    .got_nack_evt(got_nack), .gave_ack_evt(gave_ack), .gave_nack_evt(gave_nack));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [PW-1:0] txq[N][$];          // pushed, not yet ACKed (head = packet on the air)
  int            txd[N][$];          // their destinations (0-based)
  logic [PW-1:0] expq[N][N][$];      // [src][dst] packets expected in order
  int            sent_at[N][1024];   // slot tick of latest transmission, by src and seq
  int            seq[N];

  initial begin
    int phase, c, n_ack = 0, n_nack = 0, n_conc = 0, n_b2b = 0, n_skip = 0, n_read = 0;
    int n_pushed = 0, lat_min = 1 << 30, lat_exact = 0, light_reads = 0, light_exact = 0;
    int sat_start = 0, sat_reads = 0, last_sent[N], slot_dst_cnt[N], slot_tick;
    int sat_cycles = 0;
    bit pushing[N];
    int light_max = 0;
    localparam int NSW = 5, SWP = 2500;
    int OFFER[NSW] = '{20, 40, 60, 80, 100};
    int sw_reads[NSW] = '{0, 0, 0, 0, 0};
    longint sw_lat[NSW] = '{0, 0, 0, 0, 0};
    int step;
    foreach (tx_valid[i]) begin tx_valid[i] = 0; tx_dst[i] = '0; tx_payload[i] = '0; rx_ready[i] = 0;
      seq[i] = 0; last_sent[i] = -1000; end
    checks = 0; failures = 0; done = 0;
    wait (rst_n);
    @(negedge clk);
    c = 0; slot_tick = -1;
    while (c < NSW * SWP + 9000) begin
      // phase 0: offered-load sweep, SWP clocks per load step; 1: saturation; 2: stall; 3: drain
      phase = c < NSW * SWP ? 0 : c < NSW * SWP + 3000 ? 1 : c < NSW * SWP + 5000 ? 2 : 3;
      step = phase == 0 ? c / SWP : 0;
      for (int i = 0; i < N; i++) begin
        bit want;
        case (phase)
          0: want = ($urandom % (L * 100)) < OFFER[step];  // OFFER/100 packets per slot
          1, 2: want = 1;
          default: want = 0;
        endcase
        if (!tx_valid[i] && want && seq[i] < 1024) begin
          int d;
          d = $urandom % (N - 1);
          if (d >= i) d++;
          tx_valid[i] = 1; tx_dst[i] = node_id_t'(d + 1);
          tx_payload[i] = {3'(i + 1), (PW - 3)'(seq[i])};
          seq[i]++;
        end
        rx_ready[i] = (phase == 2 && i == 0) ? 1'b0 : (phase == 0 ? 1'b1 : 1'(($urandom % 8) != 0));
      end
      #1;
      if (dut.u_sync.fwd.tx_start) begin
        slot_tick = c;
        foreach (slot_dst_cnt[i]) slot_dst_cnt[i] = 0;
      end
      for (int i = 0; i < N; i++) begin
        if (sent_evt[i]) begin
          chk(txq[i].size() != 0, "sent with empty queue");
          if (txq[i].size() != 0) begin
            sent_at[i][txq[i][0][9:0]] = c;
            slot_dst_cnt[txd[i][0]]++;
            if (slot_dst_cnt[txd[i][0]] == 2) n_conc++;
          end
          if (c - last_sent[i] == L) n_b2b++;
          last_sent[i] = c;
        end else if (dut.u_sync.fwd.tx_start && txq[i].size() != 0 && c - last_sent[i] == L) n_skip++;
        if (got_ack[i]) begin
          n_ack++;
          if (txq[i].size() != 0) begin
            void'(txq[i].pop_front()); void'(txd[i].pop_front());
          end
        end
        if (got_nack[i]) n_nack++;
        if (rx_valid[i] && rx_ready[i]) begin
          int s, lat;
          s = int'(rx_src[i]) - 1;
          chk(s >= 0 && s < N && rx_payload[i][PW-1 -: 3] == 3'(s + 1), $sformatf("rx src node %0d", i));
          if (s >= 0 && s < N) begin
            chk(expq[s][i].size() != 0 && expq[s][i][0] == rx_payload[i],
                $sformatf("order node %0d from %0d got %h", i, s, rx_payload[i]));
            if (expq[s][i].size() != 0) void'(expq[s][i].pop_front());
            lat = c - sent_at[s][rx_payload[i][9:0]];
            if (lat < lat_min) lat_min = lat;
            chk(lat >= L + 2, $sformatf("latency %0d", lat));
            if (phase == 0 && step < 2) begin
              light_reads++; if (lat == L + 2) light_exact++; if (lat > light_max) light_max = lat;
            end
            if (phase == 0) begin sw_reads[step]++; sw_lat[step] += lat; end
            if (phase == 1) sat_reads++;
          end
          n_read++;
        end
      end
      if (phase == 1) sat_cycles++;
      for (int i = 0; i < N; i++) pushing[i] = tx_valid[i] && tx_ready[i];
      @(negedge clk);
      for (int i = 0; i < N; i++)
        if (pushing[i]) begin
          txq[i].push_back(tx_payload[i]); txd[i].push_back(int'(tx_dst[i]) - 1);
          expq[i][int'(tx_dst[i]) - 1].push_back(tx_payload[i]);
          n_pushed++; tx_valid[i] = 0;
        end
      c++;
    end
    begin
      int left;
      left = 0;
      foreach (txq[i]) left += txq[i].size();
      foreach (expq[i, j]) left += expq[i][j].size();
      chk(left == 0 && n_read == n_pushed, $sformatf("undelivered %0d read %0d pushed %0d", left, n_read, n_pushed));
    end
    chk(lat_min == L + 2, $sformatf("minimum latency %0d", lat_min));
    chk(light_reads > 50 && light_exact * 10 >= light_reads * 8 && light_max <= L + 2 + N - 1,
        $sformatf("light load exact latency %0d/%0d, max %0d", light_exact, light_reads, light_max));
    chk(n_nack > 0, "NACK never happened");
    chk(n_conc > 0, "no concurrent reception");
    chk(n_b2b > 0, "no back-to-back slots");
    // a slot can hold the answers to all six other nodes when L >= 6 * ACK_LEN + 9
    if (L < (N - 1) * ACK_LEN + 9) chk(n_skip > 0, "no slot skipped for a late ACK");
    $display("packet length %0d: acks %0d nacks %0d concurrent %0d back-to-back %0d skipped %0d reads %0d",
             L, n_ack, n_nack, n_conc, n_b2b, n_skip, n_read);
    for (int k = 0; k < NSW; k++) begin
      real thr;
      thr = real'(sw_reads[k]) / (N * real'(SWP) / L);
      $display("packet length %0d: offered %.1f -> throughput %.3f, mean latency %.1f ticks",
               L, OFFER[k] / 100.0, thr, sw_reads[k] != 0 ? real'(sw_lat[k]) / sw_reads[k] : 0.0);
      // at loads the network can carry, throughput follows the offered traffic
      if (k < 3) chk(thr > 0.75 * OFFER[k] / 100.0 && thr < 1.25 * OFFER[k] / 100.0,
                     $sformatf("throughput %.3f at offered %0d%%", thr, OFFER[k]));
    end
    $display("packet length %0d: saturation throughput %.3f packets per node per slot",
             L, real'(sat_reads) / (N * real'(sat_cycles) / L));
    done = 1;
  end
endmodule
