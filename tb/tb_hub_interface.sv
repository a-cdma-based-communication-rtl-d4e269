// tb_hub_interface: random packets in both directions with random back-pressure.
// Each packet must come out once, in order, unchanged, with the next destination taken
// from its routing header (dst subnet going up, dst node going down).
module tb_hub_interface;
  import cdma_pkg::*;
  localparam int PW = 28;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sub_rx_valid, sub_rx_ready, hub_tx_valid, hub_tx_ready;
  logic hub_rx_valid, hub_rx_ready, sub_tx_valid, sub_tx_ready, up_evt, down_evt;
  logic [PW-1:0] sub_rx_payload, hub_tx_payload, hub_rx_payload, sub_tx_payload;
  node_id_t hub_tx_dst, sub_tx_dst;
  int checks = 0, failures = 0;
  logic [PW-1:0] upq[$], dnq[$];
  int n_up = 0, n_dn = 0, stalls = 0;

  hub_interface #(.PAYLOAD_W(PW)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sub_rx_valid = 0; hub_rx_valid = 0; hub_tx_ready = 0; sub_tx_ready = 0;
    sub_rx_payload = '0; hub_rx_payload = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 1000; c++) begin
      bit pu, pd, ou, od;
      if (!sub_rx_valid || sub_rx_ready) begin
        sub_rx_valid = ($urandom % 2) != 0;
        sub_rx_payload = PW'({$urandom, $urandom});
      end
      if (!hub_rx_valid || hub_rx_ready) begin
        hub_rx_valid = ($urandom % 2) != 0;
        hub_rx_payload = PW'({$urandom, $urandom});
      end
      hub_tx_ready = ($urandom % 3) != 0;
      sub_tx_ready = ($urandom % 3) != 0;
      #1;
      pu = sub_rx_valid && sub_rx_ready;
      pd = hub_rx_valid && hub_rx_ready;
      ou = hub_tx_valid && hub_tx_ready;
      od = sub_tx_valid && sub_tx_ready;
      if (sub_rx_valid && !sub_rx_ready) stalls++;
      checks++;
      if (up_evt != pu || down_evt != pd) failures++;
      if (ou) begin
        checks++;
        if (upq.size() == 0 || hub_tx_payload != upq[0] || hub_tx_dst != upq[0][PW-1 -: 3]) begin
          failures++; $display("FAIL up c=%0d", c);
        end
        if (upq.size() != 0) void'(upq.pop_front());
        n_up++;
      end
      if (od) begin
        checks++;
        if (dnq.size() == 0 || sub_tx_payload != dnq[0] || sub_tx_dst != dnq[0][PW-4 -: 3]) begin
          failures++; $display("FAIL down c=%0d", c);
        end
        if (dnq.size() != 0) void'(dnq.pop_front());
        n_dn++;
      end
      if (pu) upq.push_back(sub_rx_payload);
      if (pd) dnq.push_back(hub_rx_payload);
      @(negedge clk);
      if (pu) sub_rx_valid = 0;
      if (pd) hub_rx_valid = 0;
    end
    checks++;
    if (n_up < 100 || n_dn < 100 || stalls == 0) begin
      failures++; $display("FAIL coverage up %0d down %0d stalls %0d", n_up, n_dn, stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
