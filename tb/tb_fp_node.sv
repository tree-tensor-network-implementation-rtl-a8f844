// tb_fp_node: full-parallel node contraction at two sizes (2->2 as in the
// worked example, 4->3), one input per cycle; checks values, the latency
// 2 + log2(CHI_IN^2) and that saturation occurs.
module tb_fp_node;
  import ttn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic d0, d1;
  int   c0, c1, f0, f1, s0, s1, t0, t1;

  tb_node_harness #(.ARCH(ARCH_FULL), .CHI_IN(2), .CHI_OUT(2), .NS(60)) h0 (
    .clk, .rst_n, .done(d0), .checks(c0), .failures(f0), .stalls(s0), .saturated(t0));
  tb_node_harness #(.ARCH(ARCH_FULL), .CHI_IN(4), .CHI_OUT(3), .NS(60)) h1 (
    .clk, .rst_n, .done(d1), .checks(c1), .failures(f1), .stalls(s1), .saturated(t1));

  initial begin
    repeat (3000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d0 && d1);
    checks   = c0 + c1 + 2;
    failures = f0 + f1;
    if (s0 + s1 != 0) begin failures++; $display("FAIL full-parallel node stalled"); end
    if (t0 + t1 == 0) begin failures++; $display("FAIL saturation never occurred"); end
    $display("saturated outputs: %0d", t0 + t1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
