// cni_modulator: TX channel of a CNI (spreading modulator).
//
// Holds the node's 7-bit spread codeword in a register and sends, every chip tick, either
// the codeword itself (data bit 0, or no packet) or its bit-wise inverse (data bit 1).
// All seven chips leave in parallel, so one data bit costs one chip tick.
// The codeword register resets to the PN code of CODE_ID and can be reloaded through
// code_we/code_in, which lets a network reuse the same codes at another level.
// Interface: data_bit/data_valid in, mod_code out; the output is combinational from the
// inputs and the codeword register (the register stage is in the channel).
// The document gives the register, the inverter and the 2:1 selection and the table of
// what is sent; the reload port is this design's addition.
module cni_modulator
  import cdma_pkg::*;
#(
  parameter int unsigned CODE_ID = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  code_we,
  input  code_t code_in,
  input  logic  data_valid,  // a packet bit is being sent this tick
  input  logic  data_bit,
  output code_t mod_code
);

  code_t spread_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) spread_q <= pn_code(CODE_ID);
    else if (code_we) spread_q <= code_in;
  end

  always_comb begin
    if (data_valid && data_bit) mod_code = ~spread_q;
    else mod_code = spread_q;
  end

endmodule
