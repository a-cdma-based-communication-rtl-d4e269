// tb_synchronizer: with default settings the forward slot is 19 ticks, the reverse slot
// 4 ticks, both chip ticks run every clock and rx_start trails tx_start by 2 ticks.
module tb_synchronizer;
  import cdma_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  sync_t fwd, rev;
  int checks = 0, failures = 0;

  synchronizer dut (.clk, .rst_n, .fwd, .rev);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 120; c++) begin
      #1;
      checks++;
      if (!fwd.chip_en || !rev.chip_en ||
          fwd.tx_start != (c % 19 == 0) || fwd.rx_start != (c % 19 == 2) ||
          rev.tx_start != (c % 4 == 0) || rev.rx_start != (c % 4 == 2)) begin
        failures++;
        $display("FAIL c=%0d fwd %b rev %b", c, fwd, rev);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
