// feature_map: look-up-table feature mapping of one input feature.
//
// A feature arrives as an unsigned FEAT_W-bit code a, read as
// x = a / (2^FEAT_W - 1) in [0, 1]. It is mapped to the D-dimensional local
// vector phi(x) whose component s (s = 0 .. D-1) is
//   phi_s(x) = sqrt(C(D-1, s)) * cos(pi*x/2)^(D-1-s) * sin(pi*x/2)^s,
// i.e. [cos(pi*x/2), sin(pi*x/2)] for D = 2. The vector has unit norm, so
// it is a valid single-site quantum state. The table holds 2^FEAT_W entries
// of D Q1.14 words (rounded to nearest) and is computed at elaboration.
// The read is registered: phi and out_valid follow feat and in_valid by one
// cycle, and a new feature may enter every cycle.
// That the map is a fixed function held in look-up tables follows the
// design; the trigonometric map, the input code width and the table size
// are this design's choices.
module feature_map
  import ttn_pkg::*;
#(
  parameter int unsigned D      = 2,
  parameter int unsigned FEAT_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [FEAT_W-1:0] feat,
  output logic              out_valid,
  output q_t [D-1:0]        phi
);

  localparam int unsigned DEPTH = 1 << FEAT_W;

  typedef logic [D*DATA_W-1:0] entry_t;
  typedef entry_t table_t [DEPTH];

  function automatic real binom(input int unsigned n, input int unsigned k);
    real r;
    r = 1.0;
    for (int unsigned i = 1; i <= k; i++) r = r * real'(n - k + i) / real'(i);
    return r;
  endfunction

  function automatic table_t build_table();
    table_t t;
    entry_t e;
    real    x, c, s, v;
    for (int unsigned a = 0; a < DEPTH; a++) begin
      x = real'(a) / real'(DEPTH - 1);
      c = $cos(3.14159265358979323846 * x / 2.0);
      s = $sin(3.14159265358979323846 * x / 2.0);
      for (int unsigned d = 0; d < D; d++) begin
        v = $sqrt(binom(D - 1, d)) * (c ** real'(D - 1 - d)) * (s ** real'(d));
        e[d*DATA_W +: DATA_W] = DATA_W'($rtoi($floor(v * real'(1 << FRAC) + 0.5)));
      end
      t[a] = e;
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      phi       <= '0;
    end else begin
      out_valid <= in_valid;
      phi       <= TABLE[feat];
    end
  end

endmodule
