// comm_channel: one communication channel (forward or reverse) of a network.
//
// Adds the modulated codewords of all N_PORTS transmitters chip by chip (the summer) and
// cuts each sum down to a single bit (extreme binary truncation): a chip is 1 when at
// least THRESH transmitters sent a 1 on it, i.e. a majority for seven transmitters.
// The result is broadcast to every receiver. The truncated word is registered once per
// chip tick, so it reaches the receivers one tick after it was sent.
// Interface: tx_codes[N_PORTS] in, chips out; advances only when chip_en is high.
// Summer plus truncation follow the document; the majority threshold and the output
// register are this design's reading of "binary truncation".
module comm_channel
  import cdma_pkg::*;
#(
  parameter int unsigned N_PORTS = MAX_NODES,
  parameter int unsigned THRESH  = (N_PORTS + 1) / 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  chip_en,
  input  code_t tx_codes[N_PORTS],
  output code_t chips
);

  localparam int unsigned SUM_W = $clog2(N_PORTS + 1);

  logic [SUM_W-1:0] sum[CODE_LEN];
  code_t truncated;

  always_comb begin
    for (int unsigned j = 0; j < CODE_LEN; j++) begin
      sum[j] = '0;
      for (int unsigned p = 0; p < N_PORTS; p++) begin
        sum[j] = sum[j] + SUM_W'(tx_codes[p][j]);
      end
      truncated[j] = (sum[j] >= SUM_W'(THRESH));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chips <= '0;
    else if (chip_en) chips <= truncated;
  end

endmodule
