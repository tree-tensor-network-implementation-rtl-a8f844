// tb_weight_regs: writes random words at random addresses of a 40-word
// weight block, keeps a model copy and compares all parallel outputs after
// every write; an out-of-range address, or a cycle with we low, must
// change nothing.
module tb_weight_regs;
  import ttn_pkg::*;
  import tb_ref_pkg::*;

  localparam int DEPTH = 40;

  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [5:0] waddr = '0;
  q_t wdata = '0;
  q_t [DEPTH-1:0] w;
  int model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  weight_regs #(.DEPTH(DEPTH), .AW(6)) dut (.*);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (int'(w[i]) != model[i]) begin
        failures++; $display("FAIL w[%0d] = %0d expected %0d", i, w[i], model[i]);
      end
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    compare();                                    // cleared by reset
    for (int n = 0; n < 300; n++) begin
      int a, d;
      a = int'($urandom_range(DEPTH + 10, 0));     // some beyond the end
      d = rnd_word(32767);
      we = 1'b1; waddr = 6'(a); wdata = q_t'(d);
      @(negedge clk);
      we = 1'b0;
      if (a < DEPTH) model[a] = d;
      compare();
      // address and data move while we is low: nothing may change
      waddr = 6'($urandom_range(DEPTH - 1, 0)); wdata = q_t'(rnd_word(32767));
      @(negedge clk);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
