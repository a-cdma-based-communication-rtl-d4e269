// cni_demodulator: one despreader of a CNI's RX channel.
//
// XORs the 7 chips received from the channel with its despread codeword, counts the ones
// (a 3-bit ones counter) and decides the bit: a count of 4 or more is a 1, less is a 0.
// Because the channel is truncated to one bit per chip, this majority decision is what
// separates the seven overlaid users. A CNI holds one of these per PN code so that it
// can receive every other node at once.
// Interface: chips in, despread bit and the raw count out, combinational.
// The codeword register resets to the PN code of CODE_ID and can be reloaded.
// XOR, counter, 3-bit count and the >=4 threshold follow the document; the reload port is
// this design's addition.
module cni_demodulator
  import cdma_pkg::*;
#(
  parameter int unsigned CODE_ID = 1,
  parameter int unsigned THRESH  = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             code_we,
  input  code_t            code_in,
  input  code_t            chips,
  output logic [CNT_W-1:0] count,
  output logic             despread_bit
);

  code_t despread_q;
  code_t xored;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) despread_q <= pn_code(CODE_ID);
    else if (code_we) despread_q <= code_in;
  end

  always_comb begin
    xored = chips ^ despread_q;
    count = '0;
    for (int unsigned j = 0; j < CODE_LEN; j++) begin
      count = count + CNT_W'(xored[j]);
    end
    despread_bit = (count >= CNT_W'(THRESH));
  end

endmodule
