// adder_tree: pipelined sum of NT signed words ("Sum" of a full-parallel
// node contraction).
//
// The terms are added pairwise in $clog2(NT) registered levels; a level with
// an odd count passes its last term on unchanged. Every level widens by one
// bit, so the sum is exact (SUM_W = DATA_W + $clog2(NT)). in_valid travels
// alongside the data, so out_valid and sum appear $clog2(NT) cycles after
// the terms. A new set of terms may enter on every cycle. The pairwise,
// one-level-per-cycle structure follows the design's latency of
// log2(chi^2) cycles for the sum; NT must be at least 2.
module adder_tree
  import ttn_pkg::*;
#(
  parameter int unsigned NT    = 4,
  parameter int unsigned LV    = $clog2(NT),
  parameter int unsigned SUM_W = DATA_W + LV
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  q_t [NT-1:0]             terms,
  output logic                    out_valid,
  output logic signed [SUM_W-1:0] sum
);

  // number of partial sums held at level s
  function automatic int unsigned count_at(input int unsigned s);
    return (NT + (1 << s) - 1) >> s;
  endfunction

  logic signed [SUM_W-1:0] lvl [1:LV][NT];
  logic [LV:1]             vld;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld <= '0;
      for (int unsigned s = 1; s <= LV; s++)
        for (int unsigned k = 0; k < NT; k++) lvl[s][k] <= '0;
    end else begin
      vld[1] <= in_valid;
      for (int unsigned s = 2; s <= LV; s++) vld[s] <= vld[s-1];
      for (int unsigned k = 0; k < NT; k++) begin
        if (k < count_at(1)) begin
          if (2*k + 1 < NT)
            lvl[1][k] <= SUM_W'(signed'(terms[2*k])) + SUM_W'(signed'(terms[2*k+1]));
          else
            lvl[1][k] <= SUM_W'(signed'(terms[2*k]));
        end
      end
      for (int unsigned s = 2; s <= LV; s++) begin
        for (int unsigned k = 0; k < NT; k++) begin
          if (k < count_at(s)) begin
            if (2*k + 1 < count_at(s-1))
              lvl[s][k] <= lvl[s-1][2*k] + lvl[s-1][2*k+1];
            else
              lvl[s][k] <= lvl[s-1][2*k];
          end
        end
      end
    end
  end

  assign out_valid = vld[LV];
  assign sum       = lvl[LV][0];

  initial assert (NT >= 2) else $error("adder_tree needs at least two terms");

endmodule
