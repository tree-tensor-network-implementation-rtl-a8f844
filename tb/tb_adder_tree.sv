// tb_adder_tree: streams a new set of random terms into two adder trees
// (4 terms, and 9 terms so that odd levels occur) on every cycle and checks
// each sum and its latency of $clog2(NT) cycles.
module tb_adder_tree;
  import ttn_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  int   checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  q_t [3:0] t4;
  q_t [8:0] t9;
  logic     v4, v9;
  logic signed [17:0] s4;
  logic signed [19:0] s9;

  adder_tree #(.NT(4)) dut4 (.clk, .rst_n, .in_valid, .terms(t4), .out_valid(v4), .sum(s4));
  adder_tree #(.NT(9)) dut9 (.clk, .rst_n, .in_valid, .terms(t9), .out_valid(v9), .sum(s9));

  int exp4 [$], exp9 [$], cyc4 [$], cyc9 [$];

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive on the negative edge, record the expected sums
  initial begin
    t4 = '0; t9 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 100; n++) begin
      int e4, e9;
      @(negedge clk);
      in_valid = (n % 7 != 3);     // a few gaps
      e4 = 0; e9 = 0;
      for (int k = 0; k < 4; k++) begin t4[k] = q_t'(rnd_word(32767)); e4 += int'(t4[k]); end
      for (int k = 0; k < 9; k++) begin t9[k] = q_t'(rnd_word(32767)); e9 += int'(t9[k]); end
      if (in_valid) begin
        exp4.push_back(e4); exp9.push_back(e9);
        cyc4.push_back(cycle + 2); cyc9.push_back(cycle + 4);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (exp4.size() != 0 || exp9.size() != 0) begin
      failures++;
      $display("FAIL sums missing: %0d %0d", exp4.size(), exp9.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && v4) begin
      checks++;
      if (exp4.size() == 0 || int'(s4) != exp4[0] || cycle != cyc4[0]) begin
        failures++;
        $display("FAIL NT=4 sum %0d cycle %0d", s4, cycle);
      end
      if (exp4.size() != 0) begin void'(exp4.pop_front()); void'(cyc4.pop_front()); end
    end
    if (rst_n && v9) begin
      checks++;
      if (exp9.size() == 0 || int'(s9) != exp9[0] || cycle != cyc9[0]) begin
        failures++;
        $display("FAIL NT=9 sum %0d cycle %0d", s9, cycle);
      end
      if (exp9.size() != 0) begin void'(exp9.pop_front()); void'(cyc9.pop_front()); end
    end
  end
endmodule
