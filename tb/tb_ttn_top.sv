// tb_ttn_top: end-to-end test of the engine in the configurations the
// design was evaluated with, side by side:
//   lhcb_fp   16 features, [2,4,8,8,1],  full parallel,    tree latency 26
//   lhcb_pp   16 features, [2,4,8,8,1],  partial parallel, tree latency 173
//   lhcb16_fp 16 features, [2,4,8,16,1], full parallel,    tree latency 28,
//             500 samples
//   titanic   8 features,  [2,4,8,1],    full parallel,    tree latency 18
//   iris      4 features,  [2,4,1],      partial parallel, tree latency 27
// Each instance loads random weights, streams samples and is checked
// against the reference model (values, classes, latencies). The test also
// requires that every mechanism occurs at least once: back-to-back
// acceptance (full parallel), input stalls (partial parallel), saturation
// of a node output, and both class decisions.
module tb_ttn_top;
  import ttn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #2 clk = ~clk;

  localparam int NC = 5;
  logic [NC-1:0] done;
  int chk [NC], fl [NC], b2b [NC], stl [NC], sat [NC], c0 [NC], c1 [NC];

  // one engine and its checker per configuration; AWV is the weight
  // address width, $clog2(total weights + 1)
  `define TTN_CASE(IDX, NAME, LL, CH, AR, LAT, NSMP, AWV)                                   \
    localparam int unsigned NAME``_CHI [LL+1] = CH;                                     \
    localparam int unsigned NAME``_N  = 1 << LL;                                        \
    localparam int unsigned NAME``_O  = NAME``_CHI[LL];                                 \
    logic                               NAME``_w_we, NAME``_in_valid, NAME``_in_ready;  \
    logic                               NAME``_z_valid, NAME``_out_valid;               \
    logic [AWV-1:0]                     NAME``_w_addr;                                  \
    q_t                                 NAME``_w_data;                                  \
    logic [NAME``_N-1:0][7:0]           NAME``_feat;                                    \
    q_t [NAME``_O-1:0]                  NAME``_z;                                       \
    logic [NAME``_O-1:0][16:0]          NAME``_prob;                                    \
    logic [((NAME``_O > 2) ? $clog2(NAME``_O) : 1)-1:0] NAME``_class_id;                \
    ttn_top #(.L(LL), .CHI(NAME``_CHI), .ARCH(AR)) NAME``_dut (                         \
      .clk, .rst_n, .w_we(NAME``_w_we), .w_addr(NAME``_w_addr), .w_data(NAME``_w_data), \
      .in_valid(NAME``_in_valid), .in_ready(NAME``_in_ready), .feat(NAME``_feat),       \
      .z_valid(NAME``_z_valid), .z(NAME``_z), .out_valid(NAME``_out_valid),             \
      .prob(NAME``_prob), .class_id(NAME``_class_id));                                  \
    tb_top_harness #(.L(LL), .CHI(NAME``_CHI), .ARCH(AR), .EXP_TREE_LAT(LAT), .NS(NSMP)) NAME``_h ( \
      .clk, .rst_n, .w_we(NAME``_w_we), .w_addr(NAME``_w_addr), .w_data(NAME``_w_data), \
      .in_valid(NAME``_in_valid), .in_ready(NAME``_in_ready), .feat(NAME``_feat),       \
      .z_valid(NAME``_z_valid), .z(NAME``_z), .out_valid(NAME``_out_valid),             \
      .prob(NAME``_prob), .class_id(NAME``_class_id), .done(done[IDX]),                 \
      .checks(chk[IDX]), .failures(fl[IDX]), .n_b2b(b2b[IDX]), .n_stall(stl[IDX]),      \
      .n_sat(sat[IDX]), .n_cls0(c0[IDX]), .n_cls1(c1[IDX]));

  `TTN_CASE(0, lhcb_fp,   4, '{2, 4, 8, 8, 1},  ARCH_FULL,    26,  60,  11)
  `TTN_CASE(1, lhcb_pp,   4, '{2, 4, 8, 8, 1},  ARCH_PARTIAL, 173, 40,  11)
  `TTN_CASE(2, lhcb16_fp, 4, '{2, 4, 8, 16, 1}, ARCH_FULL,    28,  500, 12)
  `TTN_CASE(3, titanic,   3, '{2, 4, 8, 1},     ARCH_FULL,    18,  100, 9)
  `TTN_CASE(4, iris,      2, '{2, 4, 1},        ARCH_PARTIAL, 27,  100, 6)

  initial begin
    repeat (40000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", chk.sum(), fl.sum() + 1);
    $finish;
  end

  initial begin
    int f, sb2b, sstl, ssat, sc0, sc1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&done);
    f = fl.sum();
    sb2b = 0; sstl = 0; ssat = 0; sc0 = 0; sc1 = 0;
    for (int i = 0; i < NC; i++) begin
      $display("case %0d: checks %0d failures %0d back-to-back %0d stalls %0d saturated %0d class0 %0d class1 %0d",
               i, chk[i], fl[i], b2b[i], stl[i], sat[i], c0[i], c1[i]);
      sb2b += b2b[i]; sstl += stl[i]; ssat += sat[i]; sc0 += c0[i]; sc1 += c1[i];
    end
    // the full-parallel cases never stall, the partial-parallel ones must
    if (stl[0] + stl[2] + stl[3] != 0) begin f++; $display("FAIL full-parallel stall"); end
    if (stl[1] == 0 || stl[4] == 0)    begin f++; $display("FAIL partial-parallel never stalled"); end
    if (b2b[0] == 0 || b2b[3] == 0)    begin f++; $display("FAIL no back-to-back samples"); end
    if (ssat == 0)                     begin f++; $display("FAIL no saturation"); end
    if (sc0 == 0 || sc1 == 0)          begin f++; $display("FAIL a class never decided"); end
    $display("TB_RESULT checks=%0d failures=%0d", chk.sum() + 5, f);
    $finish;
  end
endmodule
