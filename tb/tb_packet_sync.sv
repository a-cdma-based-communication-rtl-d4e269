// tb_packet_sync: slot starts must repeat every SLOT_LEN chip ticks and rx_start must
// follow tx_start by PIPE_LAT ticks, also when the chip tick is slower than the clock.
module tb_packet_sync;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic chip_en, tx_start, rx_start;
  int checks = 0, failures = 0;

  packet_sync #(.SLOT_LEN(5), .PIPE_LAT(2)) dut (.clk, .rst_n, .chip_en, .tx_start, .rx_start);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tick = 0, ntx = 0, nrx = 0;
    chip_en = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 200; c++) begin
      chip_en = ($urandom % 3) != 0;
      #1;
      if (chip_en) begin
        checks++;
        if (tx_start != (tick % 5 == 0) || rx_start != (tick % 5 == 2)) begin
          failures++;
          $display("FAIL tick %0d tx %0d rx %0d", tick, tx_start, rx_start);
        end
        ntx += tx_start; nrx += rx_start;
        tick++;
      end else begin
        checks++;
        if (tx_start || rx_start) failures++;
      end
      @(negedge clk);
    end
    checks++;
    if (ntx < 10 || nrx < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
