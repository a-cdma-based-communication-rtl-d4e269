// tb_cdma_noc_top: the 42-resource scaled network at its default size, end to end.
// Every resource keeps its TX buffer full with packets whose destination is in its own
// subnetwork with probability LOC (the localization factor) and anywhere else otherwise.
// The run sweeps LOC = 1.0, 0.9, 0.5 and 0.0 and reports, for each, the delivered
// throughput as a fraction of capacity (packets per resource per slot), then lets the
// network drain. A stretch in which one resource stops reading forces NACKs.
// Checks: every packet is read exactly once, by the addressed resource, with the right
// source, in order per source/destination pair; a local packet takes at least L + 2
// ticks (L = 34, the subnetwork packet length) and a remote one at least three times
// that, since it crosses the source subnetwork, the hubnetwork and the destination
// subnetwork. Counted mechanisms: local delivery, remote delivery through both HIs,
// NACK in a subnetwork, NACK in the hubnetwork, HI back-pressure.
module tb_cdma_noc_top;
  import cdma_pkg::*;
  localparam int NS = 7, NR = 6, DW = 16, L = 34;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          tx_valid[NS][NR], tx_ready[NS][NR], rx_valid[NS][NR], rx_ready[NS][NR];
  node_id_t      tx_dst_sub[NS][NR], tx_dst_node[NS][NR], rx_src_sub[NS][NR], rx_src_node[NS][NR];
  logic [DW-1:0] tx_data[NS][NR], rx_data[NS][NR];
  logic [6:0]    sub_sent_evt[NS], sub_nack_evt[NS];
  logic [6:0]    hub_sent_evt, hub_nack_evt;
  logic [NS-1:0] hi_up_evt, hi_down_evt;
  int checks = 0, failures = 0;

  cdma_noc_top dut (.*);

  // an HI holds a packet for the hubnetwork whose TX buffer is full
  logic [NS-1:0] hi_wait;
  for (genvar s = 0; s < NS; s++) begin : g_probe
    assign hi_wait[s] = dut.g_sub[s].u_hi.hub_tx_valid && !dut.g_sub[s].u_hi.hub_tx_ready;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected packets per (source resource, destination resource), in push order
  int expq[NS*NR][NS*NR][$];
  int push_t[NS*NR][4096];
  int seq[NS*NR];

  initial begin
    localparam int PH = 4, PHLEN = 6000, DRAIN = 8000;
    real loc[PH] = '{1.0, 0.9, 0.5, 0.0};
    int reads[PH], c, ph;
    int n_local = 0, n_remote = 0, n_subnack = 0, n_hubnack = 0, n_hiwait = 0, n_read = 0, n_push = 0;
    int lmin = 1 << 30, rmin = 1 << 30;
    bit pushing[NS][NR];
    foreach (tx_valid[s, r]) begin
      tx_valid[s][r] = 0; tx_dst_sub[s][r] = '0; tx_dst_node[s][r] = '0; tx_data[s][r] = '0;
      rx_ready[s][r] = 0;
    end
    foreach (seq[i]) seq[i] = 0;
    foreach (reads[p]) reads[p] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (c = 0; c < PH * PHLEN + DRAIN; c++) begin
      ph = c / PHLEN;
      foreach (tx_valid[s, r]) begin
        int g;
        g = s * NR + r;
        if (ph < PH && !tx_valid[s][r] && seq[g] < 4096) begin
          int ds, dn;
          if (real'($urandom % 1000) < loc[ph] * 1000.0) ds = s;
          else begin ds = $urandom % (NS - 1); if (ds >= s) ds++; end
          dn = $urandom % NR;
          if (ds == s && dn == r) dn = (dn + 1) % NR;
          tx_valid[s][r] = 1; tx_dst_sub[s][r] = node_id_t'(ds + 1); tx_dst_node[s][r] = node_id_t'(dn + 1);
          tx_data[s][r] = DW'(seq[g]);
          seq[g]++;
        end
        // resource (subnet 3, node 2) stops reading during part of the LOC = 0.9 phase
        rx_ready[s][r] = (s == 2 && r == 1 && c >= PHLEN + 500 && c < PHLEN + 3500) ? 1'b0 :
                         1'(($urandom % 8) != 0);
      end
      #1;
      for (int s = 0; s < NS; s++) begin
        n_subnack += $countones(sub_nack_evt[s]);
        if (hi_wait[s]) n_hiwait++;
      end
      n_hubnack += $countones(hub_nack_evt);
      foreach (rx_valid[s, r]) begin
        if (rx_valid[s][r] && rx_ready[s][r]) begin
          int ss, sr, g, sg, lat;
          ss = int'(rx_src_sub[s][r]) - 1; sr = int'(rx_src_node[s][r]) - 1;
          g = s * NR + r; sg = ss * NR + sr;
          chk(ss >= 0 && ss < NS && sr >= 0 && sr < NR, $sformatf("source id %0d.%0d", ss + 1, sr + 1));
          if (ss >= 0 && ss < NS && sr >= 0 && sr < NR) begin
            chk(expq[sg][g].size() != 0 && expq[sg][g][0] == int'(rx_data[s][r]),
                $sformatf("order at %0d.%0d from %0d.%0d data %0d", s + 1, r + 1, ss + 1, sr + 1, rx_data[s][r]));
            if (expq[sg][g].size() != 0) void'(expq[sg][g].pop_front());
            lat = c - push_t[sg][int'(rx_data[s][r]) % 4096];
            if (ss == s) begin
              n_local++; if (lat < lmin) lmin = lat;
            end else begin
              n_remote++; if (lat < rmin) rmin = lat;
            end
          end
          if (ph < PH) reads[ph]++;
          n_read++;
        end
      end
      foreach (pushing[s, r]) pushing[s][r] = tx_valid[s][r] && tx_ready[s][r];
      @(negedge clk);
      foreach (pushing[s, r]) if (pushing[s][r]) begin
        int g, dg;
        g = s * NR + r;
        dg = (int'(tx_dst_sub[s][r]) - 1) * NR + int'(tx_dst_node[s][r]) - 1;
        expq[g][dg].push_back(int'(tx_data[s][r]));
        push_t[g][int'(tx_data[s][r]) % 4096] = c;
        tx_valid[s][r] = 0;
        n_push++;
      end
    end
    begin
      int left;
      left = 0;
      foreach (expq[a, b]) left += expq[a][b].size();
      chk(left == 0 && n_read == n_push, $sformatf("undelivered %0d (read %0d pushed %0d)", left, n_read, n_push));
    end
    chk(lmin >= L + 2 && rmin >= 3 * (L + 2), $sformatf("latency minimum local %0d remote %0d", lmin, rmin));
    chk(n_local > 0, "no local delivery");
    chk(n_remote > 0 && hi_up_evt !== 'x, "no remote delivery");
    chk(n_subnack > 0, "no NACK in a subnetwork");
    chk(n_hubnack > 0, "no NACK in the hubnetwork");
    chk(n_hiwait > 0, "HI never held a packet back");
    for (int p = 0; p < PH; p++)
      $display("localization %.1f: throughput %.3f of capacity",
               loc[p], real'(reads[p]) / (NS * NR * real'(PHLEN) / L));
    $display("local %0d remote %0d sub NACK %0d hub NACK %0d HI waits %0d min latency local %0d remote %0d",
             n_local, n_remote, n_subnack, n_hubnack, n_hiwait, lmin, rmin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
