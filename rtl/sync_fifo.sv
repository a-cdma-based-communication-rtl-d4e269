// sync_fifo: small synchronous FIFO used for the CNI's TX and RX buffers.
//
// DEPTH entries of W bits, valid/ready on both sides, first-word fall-through: rd_data
// shows the oldest entry whenever rd_valid is high. A push and a pop may happen in the
// same cycle. level gives the number of entries held (the "buffer level" the flow control
// looks at). Storage, depth and handshake are this design's own choices.
module sync_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_valid,
  output logic                       wr_ready,
  input  logic [W-1:0]               wr_data,
  output logic                       rd_valid,
  input  logic                       rd_ready,
  output logic [W-1:0]               rd_data,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned LW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem[DEPTH];
  logic [AW-1:0] wp_q, rp_q;
  logic [LW-1:0] cnt_q;
  logic          push, pop;

  assign wr_ready = (cnt_q != LW'(DEPTH));
  assign rd_valid = (cnt_q != '0);
  assign rd_data  = mem[rp_q];
  assign level    = cnt_q;
  assign push     = wr_valid && wr_ready;
  assign pop      = rd_valid && rd_ready;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q  <= '0;
      rp_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wp_q <= next_ptr(wp_q);
      if (pop) rp_q <= next_ptr(rp_q);
      cnt_q <= cnt_q + LW'(push) - LW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp_q] <= wr_data;
  end

endmodule
