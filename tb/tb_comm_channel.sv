// tb_comm_channel: checks summer + binary truncation and the chip-tick register.
// Random codewords from seven transmitters; each output chip must be 1 exactly when four
// or more inputs carry a 1, one tick later, and must hold while chip_en is low.
module tb_comm_channel;
  import cdma_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  chip_en;
  code_t tx[7];
  code_t chips;
  int checks = 0, failures = 0;

  comm_channel #(.N_PORTS(7)) dut (.clk, .rst_n, .chip_en, .tx_codes(tx), .chips);

  function automatic code_t maj(input code_t c[7]);
    code_t w;
    for (int j = 0; j < 7; j++) begin
      int s = 0;
      for (int p = 0; p < 7; p++) s += int'(c[p][j]);
      w[j] = s > 3;
    end
    return w;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    code_t exp, held;
    chip_en = 0;
    foreach (tx[p]) tx[p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      foreach (tx[p]) tx[p] = 7'($urandom);
      chip_en = ($urandom % 4) != 0;
      exp = maj(tx);
      held = chips;
      @(negedge clk);
      checks++;
      if (chips !== (chip_en ? exp : held)) begin
        failures++;
        $display("FAIL t=%0d en=%0d got %b exp %b", t, chip_en, chips, chip_en ? exp : held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
