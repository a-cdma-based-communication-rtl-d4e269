// tb_sync_fifo: random pushes and pops against a queue model; checks data order,
// full/empty flags and the level output.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wv, wr, rv, rr;
  logic [7:0] wd, rd;
  logic [2:0] level;
  int checks = 0, failures = 0;
  logic [7:0] q[$];

  sync_fifo #(.W(8), .DEPTH(4)) dut (
    .clk, .rst_n, .wr_valid(wv), .wr_ready(wr), .wr_data(wd),
    .rd_valid(rv), .rd_ready(rr), .rd_data(rd), .level
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fulls = 0;
    wv = 0; rr = 0; wd = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 500; c++) begin
      wv = ($urandom % 2) != 0;
      rr = ($urandom % 3) == 0;
      wd = 8'($urandom);
      #1;
      checks++;
      if (level != 3'(q.size()) || wr != (q.size() < 4) || rv != (q.size() > 0) ||
          (rv && rd != q[0])) begin
        failures++;
        $display("FAIL c=%0d level %0d model %0d rd %h", c, level, q.size(), rd);
      end
      if (!wr) fulls++;
      begin
        bit do_pop, do_push;
        do_pop = rv && rr;
        do_push = wv && wr;
        @(posedge clk);
        if (do_pop) void'(q.pop_front());
        if (do_push) q.push_back(wd);
      end
      @(negedge clk);
    end
    checks++;
    if (fulls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
