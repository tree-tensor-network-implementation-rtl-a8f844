// dsp_mul: one registered fixed-point multiplier, the unit the node
// contractions are built from (one FPGA DSP slice each).
//
// p <= qmul(a, b) on every clock edge with en high: the 32-bit product of two
// Q1.14 words, shifted back to 14 fractional bits and saturated to 16 bits
// (see ttn_pkg). Latency is one cycle; p holds its value while en is low.
// The 16-bit operand width follows the design's quantisation study; the
// requantisation rule and the synchronous clear are this design's choices.
module dsp_mul
  import ttn_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  q_t   a,
  input  q_t   b,
  output q_t   p
);

  always_ff @(posedge clk) begin
    if (!rst_n)  p <= '0;
    else if (en) p <= qmul(a, b);
  end

endmodule
