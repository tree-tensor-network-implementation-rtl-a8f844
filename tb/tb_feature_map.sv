// tb_feature_map: reads every code of the feature map table for D = 2
// (cos, sin) and D = 3 and compares it with the map computed directly in
// floating point; checks the one-cycle read latency and the valid flag.
module tb_feature_map;
  import ttn_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [7:0] feat = '0;
  logic v2, v3;
  q_t [1:0] phi2;
  q_t [2:0] phi3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  feature_map #(.D(2), .FEAT_W(8)) dut2 (.clk, .rst_n, .in_valid, .feat, .out_valid(v2), .phi(phi2));
  feature_map #(.D(3), .FEAT_W(8)) dut3 (.clk, .rst_n, .in_valid, .feat, .out_valid(v3), .phi(phi3));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      feat = 8'(a); in_valid = (a % 2 == 0);
      @(negedge clk);
      checks++;
      if (v2 != (a % 2 == 0) || v3 != (a % 2 == 0)) begin
        failures++; $display("FAIL valid at code %0d", a);
      end
      for (int s = 0; s < 2; s++) begin
        checks++;
        if (int'(phi2[s]) != ref_phi(2, s, a, 8)) begin
          failures++; $display("FAIL D=2 code %0d s %0d: %0d vs %0d", a, s, phi2[s], ref_phi(2, s, a, 8));
        end
      end
      for (int s = 0; s < 3; s++) begin
        checks++;
        if (int'(phi3[s]) != ref_phi(3, s, a, 8)) begin
          failures++; $display("FAIL D=3 code %0d s %0d: %0d vs %0d", a, s, phi3[s], ref_phi(3, s, a, 8));
        end
      end
    end
    // end points: cos(0)=1, sin(pi/2)=1
    checks++;
    if (ref_phi(2, 0, 0, 8) != 16384 || ref_phi(2, 1, 255, 8) != 16384) begin
      failures++; $display("FAIL reference end points");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
