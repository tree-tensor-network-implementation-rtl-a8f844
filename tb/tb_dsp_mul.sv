// tb_dsp_mul: checks the registered Q1.14 multiplier against an integer
// floor-division model, including saturation at both ends and the hold
// behaviour with en low.
module tb_dsp_mul;
  import ttn_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  q_t   a = '0, b = '0, p;
  int   checks = 0, failures = 0;
  int   n_sat = 0;

  always #5 clk = ~clk;

  dsp_mul dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_mul(input int av, input int bv);
    int exp;
    exp = ref_mul(av, bv);
    if (exp == 32767 || exp == -32768) n_sat++;
    @(negedge clk);
    a = q_t'(av); b = q_t'(bv); en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    checks++;
    if (int'(p) != exp) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d expected %0d", av, bv, p, exp);
    end
    // held while en is low
    a = q_t'(av ^ 16'h1234);
    @(negedge clk);
    checks++;
    if (int'(p) != exp) begin
      failures++;
      $display("FAIL hold: got %0d expected %0d", p, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check_mul(16384, 16384);        // 1*1
    check_mul(-16384, 16384);       // -1*1
    check_mul(-32768, -32768);      // (-2)*(-2) saturates to max
    check_mul(32767, -32768);       // near -4 saturates to min
    check_mul(-1, 1);               // tiny negative rounds down to -1 LSB
    check_mul(8192, -12288);        // 0.5 * -0.75
    for (int i = 0; i < 200; i++) check_mul(rnd_word(32767), rnd_word(32767));
    checks++;
    if (n_sat < 2) begin
      failures++;
      $display("FAIL saturation not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
