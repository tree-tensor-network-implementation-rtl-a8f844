// ttn_pkg: number format and arithmetic shared by every block of the
// tree tensor network (TTN) inference engine.
//
// All data words (mapped features, weights, node outputs) are 16-bit signed
// fixed point with 1 sign bit, 1 integer bit and 14 fractional bits (Q1.14,
// range [-2, 2), step 2^-14), the format the design was validated with.
// A product of two words is truncated back to 14 fractional bits (arithmetic
// shift, rounding toward minus infinity) and saturated to the 16-bit range;
// sums are kept at full width and saturated once, where a node hands its
// result on. Truncation and saturation are this design's choices.
package ttn_pkg;

  localparam int unsigned DATA_W = 16;  // word width of every operand
  localparam int unsigned FRAC   = 14;  // fractional bits

  typedef logic signed [DATA_W-1:0] q_t;

  localparam logic signed [DATA_W-1:0] Q_MAX = {1'b0, {(DATA_W-1){1'b1}}};
  localparam logic signed [DATA_W-1:0] Q_MIN = {1'b1, {(DATA_W-1){1'b0}}};

  // Architecture of the node contraction units.
  typedef enum logic {
    ARCH_FULL    = 1'b0,   // every product in its own multiplier
    ARCH_PARTIAL = 1'b1    // one x*y multiplier reused serially
  } arch_e;

  // Saturate a wide signed value (up to 48 bits) to one data word.
  function automatic q_t sat_q(input logic signed [47:0] v);
    if (v > 48'(signed'(Q_MAX)))      return Q_MAX;
    else if (v < 48'(signed'(Q_MIN))) return Q_MIN;
    else                              return q_t'(v[DATA_W-1:0]);
  endfunction

  // Fixed-point product of two words, requantised to one word.
  function automatic q_t qmul(input q_t a, input q_t b);
    logic signed [2*DATA_W-1:0] p;
    p = a * b;
    return sat_q(48'(p >>> FRAC));
  endfunction

  // Latency of one node contraction, in clock cycles from input to output.
  function automatic int unsigned node_latency(input arch_e arch,
                                               input int unsigned chi_in,
                                               input int unsigned chi_out);
    if (arch == ARCH_FULL) return 2 + $clog2(chi_in * chi_in);
    else                   return chi_in * chi_in + chi_out + 1;
  endfunction

endpackage
