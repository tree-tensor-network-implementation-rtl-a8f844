// tb_pp_node: partial-parallel node contraction at three sizes (2->2 as in
// the worked example, 3->4, and 2->5 where there are more outputs than
// pairs), inputs offered on every cycle; checks values, the latency
// CHI_IN^2 + CHI_OUT + 1, that inputs wait while the node is busy and that
// saturation occurs.
module tb_pp_node;
  import ttn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic d0, d1, d2;
  int   c0, c1, c2, f0, f1, f2, s0, s1, s2, t0, t1, t2;

  tb_node_harness #(.ARCH(ARCH_PARTIAL), .CHI_IN(2), .CHI_OUT(2), .NS(40)) h0 (
    .clk, .rst_n, .done(d0), .checks(c0), .failures(f0), .stalls(s0), .saturated(t0));
  tb_node_harness #(.ARCH(ARCH_PARTIAL), .CHI_IN(3), .CHI_OUT(4), .NS(40)) h1 (
    .clk, .rst_n, .done(d1), .checks(c1), .failures(f1), .stalls(s1), .saturated(t1));
  tb_node_harness #(.ARCH(ARCH_PARTIAL), .CHI_IN(2), .CHI_OUT(5), .NS(40)) h2 (
    .clk, .rst_n, .done(d2), .checks(c2), .failures(f2), .stalls(s2), .saturated(t2));

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d0 && d1 && d2);
    checks   = c0 + c1 + c2 + 3;
    failures = f0 + f1 + f2;
    // back-to-back offers: each sample after the first waits LAT-1 cycles
    if (s0 != 39 * (4 + 2 + 1 - 1)) begin failures++; $display("FAIL stalls %0d", s0); end
    if (s1 != 39 * (9 + 4 + 1 - 1)) begin failures++; $display("FAIL stalls %0d", s1); end
    if (t0 + t1 + t2 == 0) begin failures++; $display("FAIL saturation never occurred"); end
    $display("stall cycles: %0d %0d %0d, saturated outputs: %0d", s0, s1, s2, t0 + t1 + t2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
