// tb_classifier: checks probabilities |z|^2, the threshold decision for a
// single output and the argmax decision for three outputs, with the
// one-cycle latency.
module tb_classifier;
  import ttn_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  q_t [0:0] z1 = '0;
  q_t [2:0] z3 = '0;
  logic v1, v3;
  logic [0:0][16:0] p1;
  logic [2:0][16:0] p3;
  logic [0:0] c1;
  logic [1:0] c3;
  int checks = 0, failures = 0, n_c1 = 0, n_c0 = 0;

  always #5 clk = ~clk;

  classifier #(.O(1)) dut1 (.clk, .rst_n, .in_valid, .z(z1), .out_valid(v1), .prob(p1), .class_id(c1));
  classifier #(.O(3)) dut3 (.clk, .rst_n, .in_valid, .z(z3), .out_valid(v3), .prob(p3), .class_id(c3));

  function automatic int sq(input int v);
    longint p, r;
    p = longint'(v) * longint'(v);
    r = p % 16384;
    return int'((p - r) / 16384);
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      int zv [3], e1, e3, best;
      zv[0] = (n == 0) ? 8192 : (n == 1) ? 8191 : rnd_word(32767);
      zv[1] = rnd_word(32767);
      zv[2] = (n == 2) ? -zv[1] : rnd_word(32767);        // a tie
      z1[0] = q_t'(zv[0]);
      for (int i = 0; i < 3; i++) z3[i] = q_t'(zv[i]);
      in_valid = 1'b1;
      e1 = (zv[0] >= 8192) ? 1 : 0;
      e3 = 0; best = sq(zv[0]);
      for (int i = 1; i < 3; i++) if (sq(zv[i]) > best) begin best = sq(zv[i]); e3 = i; end
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!v1 || !v3) begin failures++; $display("FAIL valid"); end
      checks++;
      if (int'(c1) != e1) begin failures++; $display("FAIL O=1 z=%0d class %0d", zv[0], c1); end
      if (e1 == 1) n_c1++; else n_c0++;
      checks++;
      if (int'(c3) != e3) begin failures++; $display("FAIL O=3 class %0d expected %0d", c3, e3); end
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (int'(p3[i]) != sq(zv[i])) begin failures++; $display("FAIL prob %0d", i); end
      end
      checks++;
      if (int'(p1[0]) != sq(zv[0])) begin failures++; $display("FAIL prob O=1"); end
    end
    checks++;
    if (n_c0 == 0 || n_c1 == 0) begin failures++; $display("FAIL both classes not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
