// tb_channel_sync: the chip tick must come exactly once every DIV clocks (DIV = 3 and 1).
module tb_channel_sync;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en3, en1;
  int checks = 0, failures = 0;

  channel_sync #(.DIV(3)) dut3 (.clk, .rst_n, .chip_en(en3));
  channel_sync dut1 (.clk, .rst_n, .chip_en(en1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last = -1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 60; c++) begin
      @(negedge clk);
      checks++;
      if (!en1) failures++;
      if (en3) begin
        if (last >= 0) begin
          checks++;
          if (c - last != 3) begin failures++; $display("FAIL period %0d", c - last); end
        end
        last = c;
      end
    end
    checks++;
    if (last < 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
