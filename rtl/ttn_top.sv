// ttn_top: tree tensor network (TTN) classifier inference engine.
//
// A sample of N features is classified by contracting a binary tree of
// L = log2(N) layers of three-index tensors. Each feature is first mapped to
// a CHI[0]-dimensional vector (feature_map). Layer l (1..L) holds N/2^l
// nodes; node n of layer l contracts the vectors of its two children
// (outputs 2n and 2n+1 of layer l-1, of dimension CHI[l-1]) with its weight
// tensor into a CHI[l]-dimensional vector. The single root output of
// dimension O = CHI[L] is turned into class probabilities and a decision
// (classifier). All nodes of a layer work in lockstep; layers form a
// pipeline.
//
// ARCH selects the node architecture for every layer:
//   ARCH_FULL     fp_node; latency per layer 2 + log2(CHI[l-1]^2) cycles,
//                 a new sample every cycle (in_ready stays high).
//   ARCH_PARTIAL  pp_node; latency per layer CHI[l-1]^2 + CHI[l] + 1 cycles;
//                 a new sample is accepted at most every II cycles, II being
//                 the largest layer latency, so that no node is busy when
//                 its next input arrives; in_ready is low in between.
// Timing: a sample accepted in cycle c (in_valid && in_ready) leaves the
// feature map in cycle c+1, its root vector z appears with z_valid in
// cycle c+1+TREE_LAT (TREE_LAT = sum of the layer latencies) and the class
// with out_valid one cycle later.
//
// Weights are loaded before use through w_we/w_addr/w_data. The address of
// weight w[i][j][k] of node n in layer l is
//   WOFF(l) + n*CHI[l-1]^2*CHI[l] + (i*CHI[l-1] + j)*CHI[l-1] + k,
// where WOFF(l) is the number of weights of layers 1..l-1.
//
// The default configuration is the 16-feature tree with bond dimensions
// [2, 4, 8, 8, 1] in full-parallel form. The tree shape, the two node
// architectures and their latencies follow the design; the weight write
// port, the ready rule of the partial-parallel form and the one-cycle
// feature-map and classifier stages are this design's choices.
module ttn_top
  import ttn_pkg::*;
#(
  parameter int unsigned L          = 4,
  parameter int unsigned CHI [L+1]  = '{2, 4, 8, 8, 1},
  parameter arch_e       ARCH       = ARCH_FULL,
  parameter int unsigned FEAT_W     = 8,
  parameter q_t          THRESH     = q_t'(1 << (FRAC - 1)),
  // derived, not meant to be overridden
  parameter int unsigned N          = 1 << L,
  parameter int unsigned O          = CHI[L],
  parameter int unsigned CLS_W      = (O > 2) ? $clog2(O) : 1,
  parameter int unsigned WTOT       = wtot_f(L, CHI),
  parameter int unsigned WAW        = $clog2(WTOT + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // weight loading
  input  logic                     w_we,
  input  logic [WAW-1:0]           w_addr,
  input  q_t                       w_data,
  // sample input
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [N-1:0][FEAT_W-1:0] feat,
  // root output
  output logic                     z_valid,
  output q_t [O-1:0]               z,
  // classification
  output logic                     out_valid,
  output logic [O-1:0][DATA_W:0]   prob,
  output logic [CLS_W-1:0]         class_id
);

  // weights of layers 1..l-1
  function automatic int unsigned woff_f(input int unsigned l, input int unsigned lmax,
                                         input int unsigned chi [L+1]);
    int unsigned s;
    s = 0;
    for (int unsigned k = 1; k < l && k <= lmax; k++)
      s += ((1 << lmax) >> k) * chi[k-1] * chi[k-1] * chi[k];
    return s;
  endfunction

  function automatic int unsigned wtot_f(input int unsigned lmax, input int unsigned chi [L+1]);
    return woff_f(lmax + 1, lmax, chi);
  endfunction

  function automatic int unsigned chi_max_f();
    int unsigned m;
    m = 1;
    for (int unsigned k = 0; k <= L; k++) if (CHI[k] > m) m = CHI[k];
    return m;
  endfunction

  function automatic int unsigned lat_f(input int unsigned l);
    return node_latency(ARCH, CHI[l-1], CHI[l]);
  endfunction

  function automatic int unsigned ii_f();
    int unsigned m;
    m = 1;
    if (ARCH == ARCH_PARTIAL)
      for (int unsigned k = 1; k <= L; k++) if (lat_f(k) > m) m = lat_f(k);
    return m;
  endfunction

  localparam int unsigned CMAX = chi_max_f();
  localparam int unsigned II   = ii_f();
  localparam int unsigned IIW  = $clog2(II + 1);
  localparam int unsigned VW   = CMAX * DATA_W;   // bits of one level vector

  // ---------------- input acceptance ----------------
  logic [IIW-1:0] ii_cnt;
  logic           accept;

  assign in_ready = (ii_cnt == '0);
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n)          ii_cnt <= '0;
    else if (accept)     ii_cnt <= IIW'(II - 1);
    else if (ii_cnt != 0) ii_cnt <= ii_cnt - IIW'(1);
  end

  // vec[l][n]: output n of level l (level 0 = mapped features)
  q_t [CMAX-1:0] vec [L+1][N];
  logic [L:0]    lvl_valid;

  // ---------------- feature mapping ----------------
  logic [N-1:0] fm_valid;

  for (genvar n = 0; n < N; n++) begin : g_fm
    q_t [CHI[0]-1:0] phi;

    feature_map #(.D(CHI[0]), .FEAT_W(FEAT_W)) u_fm (
      .clk, .rst_n,
      .in_valid (accept),
      .feat     (feat[n]),
      .out_valid(fm_valid[n]),
      .phi      (phi)
    );

    assign vec[0][n] = VW'(phi);   // unused upper words are zero
  end
  assign lvl_valid[0] = &fm_valid;

  // ---------------- tree layers ----------------
  for (genvar l = 1; l <= L; l++) begin : g_layer
    localparam int unsigned CI  = CHI[l-1];
    localparam int unsigned CO  = CHI[l];
    localparam int unsigned NL  = N >> l;
    localparam int unsigned WPN = CI * CI * CO;
    localparam int unsigned DEP = NL * WPN;
    localparam int unsigned OFF = woff_f(l, L, CHI);
    localparam int unsigned LAW = (DEP > 1) ? $clog2(DEP) : 1;

    q_t [DEP-1:0]  w;
    logic          we_l;
    logic [LAW-1:0] addr_l;
    logic [NL-1:0] nvalid;
    logic [NL-1:0] nready;

    logic [WAW:0] rel;   // wraps to a large value below OFF

    assign rel    = (WAW+1)'(w_addr) - (WAW+1)'(OFF);
    assign we_l   = w_we && (rel < (WAW+1)'(DEP));
    assign addr_l = LAW'(rel);

    weight_regs #(.DEPTH(DEP), .AW(LAW)) u_w (
      .clk, .rst_n,
      .we   (we_l),
      .waddr(addr_l),
      .wdata(w_data),
      .w    (w)
    );

    for (genvar n = 0; n < NL; n++) begin : g_node
      q_t [CI-1:0] x, y;
      q_t [CO-1:0] zn;

      assign x = vec[l-1][2*n][CI-1:0];
      assign y = vec[l-1][2*n+1][CI-1:0];

      if (ARCH == ARCH_FULL) begin : g_fp
        fp_node #(.CHI_IN(CI), .CHI_OUT(CO)) u_node (
          .clk, .rst_n,
          .in_valid (lvl_valid[l-1]),
          .x, .y,
          .w        (w[n*WPN +: WPN]),
          .out_valid(nvalid[n]),
          .z        (zn)
        );
        assign nready[n] = 1'b1;
      end else begin : g_pp
        pp_node #(.CHI_IN(CI), .CHI_OUT(CO)) u_node (
          .clk, .rst_n,
          .in_valid (lvl_valid[l-1]),
          .in_ready (nready[n]),
          .x, .y,
          .w        (w[n*WPN +: WPN]),
          .out_valid(nvalid[n]),
          .z        (zn)
        );
      end

      assign vec[l][n] = VW'(zn);
    end

    for (genvar n = NL; n < N; n++) begin : g_unused
      assign vec[l][n] = '0;
    end

    assign lvl_valid[l] = &nvalid;

    // the acceptance rule must keep every node free for its next input
    assert property (@(posedge clk) disable iff (!rst_n) lvl_valid[l-1] |-> &nready)
      else $error("ttn_top: layer %0d received an input while busy", l);
  end

  // ---------------- root output and classification ----------------
  assign z_valid = lvl_valid[L];
  assign z       = vec[L][0][O-1:0];

  classifier #(.O(O), .THRESH(THRESH)) u_cls (
    .clk, .rst_n,
    .in_valid (z_valid),
    .z        (z),
    .out_valid(out_valid),
    .prob     (prob),
    .class_id (class_id)
  );

endmodule
