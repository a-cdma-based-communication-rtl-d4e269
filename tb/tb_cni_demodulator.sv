// tb_cni_demodulator: checks the despreader.
// Random chip words are compared against an independently computed ones count and the
// >=4 decision; then every combination of the seven nodes' bits is sent through the
// reference truncated channel and each node's bit must come back unchanged.
module tb_cni_demodulator;
  import cdma_pkg::*;
  import tb_cdma_ref::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  code_t      chips;
  logic [2:0] cnt[7];
  logic [6:0] db;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 7; i++) begin : g
    cni_demodulator #(.CODE_ID(i + 1)) dut (
      .clk, .rst_n, .code_we(1'b0), .code_in('0), .chips(chips),
      .count(cnt[i]), .despread_bit(db[i])
    );
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit v[8], b[8];
    chips = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 128; t++) begin
      chips = 7'(t);
      #1;
      for (int n = 0; n < 7; n++) begin
        checks++;
        if (cnt[n] != 3'($countones(chips ^ ref_code(n + 1))) || db[n] != ref_despread(n + 1, chips)) begin
          failures++;
          $display("FAIL chips %b node %0d cnt %0d bit %0d", chips, n + 1, cnt[n], db[n]);
        end
      end
    end
    // all 128 bit patterns of seven simultaneous users through the truncated channel
    for (int p = 0; p < 128; p++) begin
      for (int n = 1; n <= 7; n++) begin v[n] = 1; b[n] = p[n-1]; end
      chips = ref_channel(v, b);
      #1;
      for (int n = 0; n < 7; n++) begin
        checks++;
        if (db[n] != p[n]) begin
          failures++;
          $display("FAIL pattern %b node %0d got %0d", 7'(p), n + 1, db[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
