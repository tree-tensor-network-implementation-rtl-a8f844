// weight_regs: register block holding the trained weights of one tree layer.
//
// The weights are loaded once through a simple write port (one 16-bit word
// per cycle at address waddr while we is high) and are then read by the
// contraction logic all at once: w presents every stored word in parallel,
// as the full-parallel nodes need all their weights on every cycle. A write
// takes effect on the next clock edge. Reset clears all weights to zero.
// Keeping the trained weights in FPGA registers follows the design; the
// write port, its addressing and the reset value are this design's choices.
module weight_regs
  import ttn_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we,
  input  logic [AW-1:0]      waddr,
  input  q_t                 wdata,
  output q_t [DEPTH-1:0]     w
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < DEPTH; i++) w[i] <= '0;
    end else if (we && (int'(waddr) < DEPTH)) begin
      w[waddr] <= wdata;
    end
  end

endmodule
