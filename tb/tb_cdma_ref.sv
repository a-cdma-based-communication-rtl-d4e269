// tb_cdma_ref: reference model shared by the testbenches.
//
// Recomputes, independently of the RTL, what the CDMA link should do: the seven PN
// codewords (cyclic shifts of the m-sequence 1110100, chip j of node n being element
// (j + n - 1) mod 7 of the sequence), the modulated codeword of a node, the truncated
// channel word (a chip is 1 when four or more of the seven transmitters send 1) and the
// despread bit (four or more chip disagreements with the codeword mean a 1).
package tb_cdma_ref;

  localparam int SEQ[7] = '{1, 1, 1, 0, 1, 0, 0};

  function automatic logic [6:0] ref_code(input int id);
    logic [6:0] c;
    for (int j = 0; j < 7; j++) c[j] = SEQ[(j + id - 1) % 7] != 0;
    return c;
  endfunction

  function automatic logic [6:0] ref_mod(input int id, input bit valid, input bit b);
    return (valid && b) ? ~ref_code(id) : ref_code(id);
  endfunction

  // channel word when node n (1..7) sends bits[n] with valid[n]
  function automatic logic [6:0] ref_channel(input bit valid[8], input bit bits[8]);
    logic [6:0] w;
    for (int j = 0; j < 7; j++) begin
      int s = 0;
      for (int n = 1; n <= 7; n++) s += ref_mod(n, valid[n], bits[n])[j];
      w[j] = (s >= 4);
    end
    return w;
  endfunction

  function automatic bit ref_despread(input int id, input logic [6:0] chips);
    int s = 0;
    logic [6:0] x = chips ^ ref_code(id);
    for (int j = 0; j < 7; j++) s += x[j];
    return s >= 4;
  endfunction

endpackage
