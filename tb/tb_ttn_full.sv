// tb_ttn_full: the engine in its default configuration (16 features, bond
// dimensions [2, 4, 8, 8, 1], full-parallel nodes), end to end: weight
// loading, 60 streamed samples, root vectors, classes and the 26-cycle tree
// latency (104 ns at 250 MHz) checked against the reference model.
module tb_ttn_full;
  import ttn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #2 clk = ~clk;

  logic              w_we, in_valid, in_ready, z_valid, out_valid, done;
  logic [10:0]       w_addr;
  q_t                w_data;
  logic [15:0][7:0]  feat;
  q_t [0:0]          z;
  logic [0:0][16:0]  prob;
  logic [0:0]        class_id;
  int checks, failures, n_b2b, n_stall, n_sat, n_cls0, n_cls1;

  ttn_top dut (.*);

  tb_top_harness #(.L(4), .CHI('{2, 4, 8, 8, 1}), .ARCH(ARCH_FULL), .EXP_TREE_LAT(26), .NS(60)) h (.*);

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int f;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    f = failures;
    if (n_b2b == 0) begin f++; $display("FAIL no back-to-back samples"); end
    if (n_stall != 0) begin f++; $display("FAIL full-parallel engine stalled"); end
    $display("back-to-back %0d, stalls %0d, saturated %0d, class0 %0d, class1 %0d",
             n_b2b, n_stall, n_sat, n_cls0, n_cls1);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 2, f);
    $finish;
  end
endmodule
