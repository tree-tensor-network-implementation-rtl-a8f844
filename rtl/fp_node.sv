// fp_node: full-parallel contraction of one tree node,
//   z[i] = sum_{j,k} x[j] * y[k] * w[i][j][k],
// where x and y are the CHI_IN-dimensional vectors of the two children and
// z the CHI_OUT-dimensional vector handed to the parent.
//
// Structure (three pipeline parts, all multipliers working at once):
//   Mult1  CHI_IN^2 registered multipliers form every pair x[j]*y[k];
//   Mult2  CHI_IN^2*CHI_OUT registered multipliers scale each pair by its
//          weight w[i][j][k];
//   Sum    one pipelined adder tree per output i adds its CHI_IN^2 terms.
// The node thus uses CHI_IN^2*(CHI_OUT+1) multipliers and has a latency of
// 2 + $clog2(CHI_IN^2) cycles from in_valid to out_valid; it accepts a new
// input on every cycle. This split into Mult1/Mult2/Sum, the multiplier
// count and the latency follow the design; the adder-tree output is
// saturated to 16 bits (this design's choice, see ttn_pkg).
//
// Weight layout: w[(i*CHI_IN + j)*CHI_IN + k]. The weights are static
// registers; they must not change while inputs are being processed.
module fp_node
  import ttn_pkg::*;
#(
  parameter int unsigned CHI_IN  = 2,
  parameter int unsigned CHI_OUT = 2,
  parameter int unsigned NP      = CHI_IN * CHI_IN,  // pairs x[j]*y[k]
  parameter int unsigned NW      = NP * CHI_OUT      // weights per node
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  q_t [CHI_IN-1:0]      x,
  input  q_t [CHI_IN-1:0]      y,
  input  q_t [NW-1:0]          w,
  output logic                 out_valid,
  output q_t [CHI_OUT-1:0]     z
);

  localparam int unsigned SUM_W = DATA_W + $clog2(NP);

  // Mult1: pair m = j*CHI_IN + k
  q_t [NP-1:0] pair;
  logic        v1, v2;

  for (genvar j = 0; j < CHI_IN; j++) begin : g_m1j
    for (genvar k = 0; k < CHI_IN; k++) begin : g_m1k
      dsp_mul u_mul (
        .clk, .rst_n, .en(1'b1),
        .a(x[j]), .b(y[k]), .p(pair[j*CHI_IN + k])
      );
    end
  end

  // Mult2 and Sum, one group per output index i
  logic [CHI_OUT-1:0] sum_valid;

  for (genvar i = 0; i < CHI_OUT; i++) begin : g_out
    q_t [NP-1:0]             term;
    logic signed [SUM_W-1:0] sum;

    for (genvar m = 0; m < NP; m++) begin : g_m2
      dsp_mul u_mul (
        .clk, .rst_n, .en(1'b1),
        .a(pair[m]), .b(w[i*NP + m]), .p(term[m])
      );
    end

    adder_tree #(.NT(NP)) u_sum (
      .clk, .rst_n,
      .in_valid (v2),
      .terms    (term),
      .out_valid(sum_valid[i]),
      .sum      (sum)
    );

    assign z[i] = sat_q(48'(sum));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
    end
  end

  assign out_valid = &sum_valid;  // all trees run in lockstep

endmodule
