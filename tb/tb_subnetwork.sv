// tb_subnetwork: one subnetwork with uniformly random destinations at the two packet
// lengths the evaluation uses, 19 bits (the default, PAYLOAD_W = 13) and 35 bits
// (PAYLOAD_W = 29), each driven and checked by subnet_traffic. The latency of a packet at
// light load must be its length plus 2 ticks (21 and 37).
module tb_subnetwork;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int c19, f19, c35, f35;
  bit d19, d35;

  subnet_traffic #(.PW(13)) u_len19 (.clk, .rst_n, .checks(c19), .failures(f19), .done(d19));
  subnet_traffic #(.PW(29)) u_len35 (.clk, .rst_n, .checks(c35), .failures(f35), .done(d35));

  initial begin
    #20000000;
    $display("TB_RESULT checks=%0d failures=%0d", c19 + c35, f19 + f35 + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (d19 && d35);
    $display("TB_RESULT checks=%0d failures=%0d", c19 + c35, f19 + f35);
    $finish;
  end
endmodule
