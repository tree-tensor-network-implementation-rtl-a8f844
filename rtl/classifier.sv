// classifier: turns the O-dimensional output vector z of the tree root into
// class probabilities and a class decision.
//
// The probability of class i is taken as |z[i]|^2 (the squared amplitude of
// the output state), kept as an unsigned word with 14 fractional bits and
// two integer bits. With several outputs (O > 1) the class is the index of
// the largest probability, the lowest index winning a tie. With a single
// output (O = 1) the sample is assigned class 1 when z[0] >= THRESH and
// class 0 otherwise. Results are registered: out_valid, prob and class_id
// follow in_valid and z by one cycle.
// That the root output is turned into a probability and a class follows the
// design; the squared-amplitude rule, the argmax, the threshold and its
// default of 0.5 are this design's choices.
module classifier
  import ttn_pkg::*;
#(
  parameter int unsigned O      = 1,
  parameter q_t          THRESH = q_t'(1 << (FRAC - 1)),   // 0.5
  parameter int unsigned CLS_W  = (O > 2) ? $clog2(O) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  q_t [O-1:0]                   z,
  output logic                         out_valid,
  output logic [O-1:0][DATA_W:0]       prob,
  output logic [CLS_W-1:0]             class_id
);

  logic [O-1:0][DATA_W:0] p;
  logic [CLS_W-1:0]       cls;

  always_comb begin
    logic [DATA_W:0] best;
    for (int i = 0; i < O; i++) begin
      logic signed [2*DATA_W-1:0] sq;
      sq   = $signed(z[i]) * $signed(z[i]);
      p[i] = (DATA_W+1)'(sq >>> FRAC);          // |z|^2 <= 4, fits 17 bits
    end
    if (O == 1) begin
      cls = ($signed(z[0]) >= THRESH) ? CLS_W'(1) : CLS_W'(0);
    end else begin
      cls  = '0;
      best = p[0];
      for (int i = 1; i < O; i++) begin
        if (p[i] > best) begin
          best = p[i];
          cls  = CLS_W'(i);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      prob      <= '0;
      class_id  <= '0;
    end else begin
      out_valid <= in_valid;
      prob      <= p;
      class_id  <= cls;
    end
  end

endmodule
