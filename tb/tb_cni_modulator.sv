// tb_cni_modulator: checks the TX modulator against the reference codeword table.
// For every node ID it checks no-packet, bit 0 and bit 1, then reloads the codeword
// register of one instance and checks the new code is used.
module tb_cni_modulator;
  import cdma_pkg::*;
  import tb_cdma_ref::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       we;
  code_t      cin;
  logic [6:0] valid, dbit;
  code_t      mc[7];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 7; i++) begin : g
    cni_modulator #(.CODE_ID(i + 1)) dut (
      .clk, .rst_n, .code_we(i == 0 ? we : 1'b0), .code_in(cin),
      .data_valid(valid[i]), .data_bit(dbit[i]), .mod_code(mc[i])
    );
  end

  task automatic chk(input logic [6:0] got, input logic [6:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %b exp %b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; cin = '0; valid = '0; dbit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      valid = 7'($urandom); dbit = 7'($urandom);
      #1;
      for (int n = 0; n < 7; n++)
        chk(mc[n], ref_mod(n + 1, valid[n], dbit[n]), $sformatf("node %0d v%0d b%0d", n + 1, valid[n], dbit[n]));
    end
    // every node's code is distinct and has four ones
    for (int n = 0; n < 7; n++) begin
      checks++;
      if ($countones(ref_code(n + 1)) != 4) failures++;
    end
    // reload node 1 with node 5's code
    @(negedge clk); we = 1; cin = ref_code(5);
    @(negedge clk); we = 0; valid[0] = 1; dbit[0] = 1;
    #1 chk(mc[0], ~ref_code(5), "reloaded code");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
