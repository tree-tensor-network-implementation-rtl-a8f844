// tb_node_harness: drives one node contraction unit (fp_node or pp_node,
// chosen by ARCH) with random weights and NS random input pairs, offered on
// every cycle, and checks every output vector against tb_ref_pkg::ref_node
// and its latency against the unit's formula. Reports its counts through
// ports when done goes high.
module tb_node_harness
  import ttn_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter arch_e       ARCH    = ARCH_FULL,
  parameter int unsigned CHI_IN  = 2,
  parameter int unsigned CHI_OUT = 2,
  parameter int unsigned NS      = 40
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   stalls,     // cycles an input waited for in_ready
  output int   saturated   // output words at a saturation limit
);
  localparam int unsigned NP  = CHI_IN * CHI_IN;
  localparam int unsigned NW  = NP * CHI_OUT;
  localparam int          LAT = (ARCH == ARCH_FULL) ? 2 + $clog2(NP) : NP + CHI_OUT + 1;

  logic             in_valid = 1'b0, in_ready, out_valid;
  q_t [CHI_IN-1:0]  x = '0, y = '0;
  q_t [NW-1:0]      w = '0;
  q_t [CHI_OUT-1:0] z;
  int               cycle = 0;

  if (ARCH == ARCH_FULL) begin : g_fp
    fp_node #(.CHI_IN(CHI_IN), .CHI_OUT(CHI_OUT)) dut (
      .clk, .rst_n, .in_valid, .x, .y, .w, .out_valid, .z);
    assign in_ready = 1'b1;
  end else begin : g_pp
    pp_node #(.CHI_IN(CHI_IN), .CHI_OUT(CHI_OUT)) dut (
      .clk, .rst_n, .in_valid, .in_ready, .x, .y, .w, .out_valid, .z);
  end

  always @(posedge clk) cycle++;

  typedef struct { int z [$]; int due; } exp_t;
  exp_t expq [$];

  initial begin
    int xv [], yv [], wv [], zv [];
    done = 1'b0; checks = 0; failures = 0; stalls = 0; saturated = 0;
    xv = new[CHI_IN]; yv = new[CHI_IN]; wv = new[NW];
    for (int i = 0; i < NW; i++) begin
      wv[i] = rnd_word(16384);
      w[i]  = q_t'(wv[i]);
    end
    @(posedge rst_n);
    for (int s = 0; s < NS; s++) begin
      exp_t e;
      int mag;
      @(negedge clk);
      mag = (s % 5 == 4) ? 32767 : 12000;     // every fifth sample large
      for (int j = 0; j < CHI_IN; j++) begin
        xv[j] = rnd_word(mag); yv[j] = rnd_word(mag);
        x[j] = q_t'(xv[j]);    y[j] = q_t'(yv[j]);
      end
      in_valid = 1'b1;
      while (!in_ready) begin
        stalls++;
        @(negedge clk);
      end
      ref_node(CHI_IN, CHI_OUT, xv, yv, wv, zv);
      e.z = {};
      foreach (zv[i]) e.z.push_back(zv[i]);
      e.due = cycle + LAT;
      expq.push_back(e);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", expq.size());
    end
    done = 1'b1;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        exp_t e;
        e = expq.pop_front();
        if (cycle != e.due) begin
          failures++;
          $display("FAIL latency: output at cycle %0d, due %0d", cycle, e.due);
        end
        for (int i = 0; i < CHI_OUT; i++) begin
          checks++;
          if (int'(z[i]) == 32767 || int'(z[i]) == -32768) saturated++;
          if (int'(z[i]) != e.z[i]) begin
            failures++;
            $display("FAIL z[%0d] = %0d expected %0d", i, z[i], e.z[i]);
          end
        end
      end
    end
  end
endmodule
