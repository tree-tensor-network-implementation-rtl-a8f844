// tb_top_harness: end-to-end driver and checker for one ttn_top instance
// whose ports it is wired to (its parameters must match the instance).
//   1. loads random weights through the weight port (magnitude about
//      2/CHI[l-1] per layer, so that values stay mostly in range, with
//      occasional full-scale weights so that saturation also occurs);
//   2. offers NS random samples, a new one on every cycle with a few gaps;
//   3. checks every root vector z against a reference contraction of the
//      whole tree, the class decision and probability, and the latency
//      1 + EXP_TREE_LAT from acceptance to z_valid (plus one to out_valid).
// Counts back-to-back acceptances, stall cycles, saturated node outputs of
// the reference and both class decisions.
module tb_top_harness
  import ttn_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int unsigned L            = 4,
  parameter int unsigned CHI [L+1]    = '{2, 4, 8, 8, 1},
  parameter arch_e       ARCH         = ARCH_FULL,
  parameter int unsigned EXP_TREE_LAT = 26,
  parameter int unsigned NS           = 60,
  parameter int unsigned N            = 1 << L,
  parameter int unsigned O            = CHI[L],
  parameter int unsigned CLS_W        = (O > 2) ? $clog2(O) : 1,
  parameter int unsigned WTOT         = wtot(),
  parameter int unsigned WAW          = $clog2(WTOT + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     w_we,
  output logic [WAW-1:0]           w_addr,
  output q_t                       w_data,
  output logic                     in_valid,
  input  logic                     in_ready,
  output logic [N-1:0][7:0]        feat,
  input  logic                     z_valid,
  input  q_t [O-1:0]               z,
  input  logic                     out_valid,
  input  logic [O-1:0][DATA_W:0]   prob,
  input  logic [CLS_W-1:0]         class_id,
  output logic                     done,
  output int                       checks,
  output int                       failures,
  output int                       n_b2b,     // accepts in consecutive cycles
  output int                       n_stall,   // cycles in_valid waited
  output int                       n_sat,     // saturated node outputs
  output int                       n_cls0,
  output int                       n_cls1
);
  function automatic int unsigned wtot();
    int unsigned s = 0;
    for (int l = 1; l <= int'(L); l++) s += (N >> l) * CHI[l-1] * CHI[l-1] * CHI[l];
    return s;
  endfunction

  int wv [];          // all weights, in address order
  int cycle = 0;
  always @(posedge clk) cycle++;

  typedef struct { int z [$]; int cls; int due; } exp_t;
  exp_t expq [$];
  exp_t outq [$];

  // reference contraction of the whole tree for one sample
  function automatic void ref_tree(input int codes [], output int zo [], inout int nsat);
    int cur [], nxt [], x [], y [], w [], zn [];
    int base, cmax;
    cmax = 0;
    for (int l = 0; l <= int'(L); l++) if (int'(CHI[l]) > cmax) cmax = CHI[l];
    cur = new[N * cmax];
    for (int n = 0; n < int'(N); n++)
      for (int s = 0; s < int'(CHI[0]); s++) cur[n*cmax + s] = ref_phi(CHI[0], s, codes[n], 8);
    base = 0;
    for (int l = 1; l <= int'(L); l++) begin
      int ci, co, wpn;
      ci = CHI[l-1]; co = CHI[l]; wpn = ci*ci*co;
      nxt = new[N * cmax];
      x = new[ci]; y = new[ci]; w = new[wpn];
      for (int n = 0; n < int'(N >> l); n++) begin
        for (int j = 0; j < ci; j++) begin
          x[j] = cur[(2*n)*cmax + j];
          y[j] = cur[(2*n+1)*cmax + j];
        end
        for (int i = 0; i < wpn; i++) w[i] = wv[base + n*wpn + i];
        ref_node(ci, co, x, y, w, zn);
        for (int i = 0; i < co; i++) begin
          nxt[n*cmax + i] = zn[i];
          if (zn[i] == 32767 || zn[i] == -32768) nsat++;
        end
      end
      base += (N >> l) * wpn;
      cur = nxt;
    end
    zo = new[O];
    for (int i = 0; i < int'(O); i++) zo[i] = cur[i];
  endfunction

  function automatic int sq(input int v);
    longint p, r;
    p = longint'(v) * longint'(v);
    r = p % 16384;
    return int'((p - r) / 16384);
  endfunction

  initial begin
    int base, last_acc;
    done = 1'b0; checks = 0; failures = 0;
    n_b2b = 0; n_stall = 0; n_sat = 0; n_cls0 = 0; n_cls1 = 0;
    w_we = 1'b0; w_addr = '0; w_data = '0; in_valid = 1'b0; feat = '0;
    wv = new[WTOT];
    base = 0;
    for (int l = 1; l <= int'(L); l++) begin
      int cnt;
      cnt = (N >> l) * CHI[l-1] * CHI[l-1] * CHI[l];
      for (int i = 0; i < cnt; i++)
        wv[base + i] = ($urandom_range(49, 0) == 0) ? rnd_word(32767)
                                                    : rnd_word(32768 / CHI[l-1]);
      base += cnt;
    end
    @(posedge rst_n);
    for (int a = 0; a < int'(WTOT); a++) begin
      @(negedge clk);
      w_we = 1'b1; w_addr = WAW'(a); w_data = q_t'(wv[a]);
    end
    @(negedge clk);
    w_we = 1'b0;
    last_acc = -10;
    for (int s = 0; s < int'(NS); s++) begin
      int codes [], zo [];
      exp_t e;
      codes = new[N];
      @(negedge clk);
      if (s % 11 == 10) begin                 // an occasional idle cycle
        in_valid = 1'b0;
        @(negedge clk);
      end
      for (int n = 0; n < int'(N); n++) begin
        codes[n] = int'($urandom_range(255, 0));
        feat[n]  = 8'(codes[n]);
      end
      in_valid = 1'b1;
      while (!in_ready) begin
        n_stall++;
        @(negedge clk);
      end
      if (cycle == last_acc + 1) n_b2b++;
      last_acc = cycle;
      ref_tree(codes, zo, n_sat);
      e.z = {};
      for (int i = 0; i < int'(O); i++) e.z.push_back(zo[i]);
      if (O == 1) e.cls = (zo[0] >= 8192) ? 1 : 0;
      else begin
        int best;
        best = sq(zo[0]);
        e.cls = 0;
        for (int i = 1; i < int'(O); i++) if (sq(zo[i]) > best) begin best = sq(zo[i]); e.cls = i; end
      end
      e.due = cycle + 1 + EXP_TREE_LAT;
      expq.push_back(e);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (EXP_TREE_LAT + 5) @(negedge clk);
    checks++;
    if (expq.size() != 0 || outq.size() != 0) begin
      failures++;
      $display("FAIL %0d root vectors / %0d classes missing", expq.size(), outq.size());
    end
    done = 1'b1;
  end

  always @(negedge clk) begin
    if (rst_n && z_valid) begin
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected z_valid at cycle %0d", cycle);
      end else begin
        exp_t e;
        e = expq.pop_front();
        if (cycle != e.due) begin
          failures++; $display("FAIL tree latency: z at cycle %0d, due %0d", cycle, e.due);
        end
        for (int i = 0; i < int'(O); i++) begin
          checks++;
          if (int'(z[i]) != e.z[i]) begin
            failures++; $display("FAIL z[%0d] = %0d expected %0d", i, z[i], e.z[i]);
          end
        end
        e.due = e.due + 1;
        outq.push_back(e);
      end
    end
    if (rst_n && out_valid) begin
      checks++;
      if (outq.size() == 0) begin
        failures++; $display("FAIL unexpected out_valid at cycle %0d", cycle);
      end else begin
        exp_t e;
        e = outq.pop_front();
        if (cycle != e.due || int'(class_id) != e.cls) begin
          failures++; $display("FAIL class %0d expected %0d (cycle %0d due %0d)", class_id, e.cls, cycle, e.due);
        end
        for (int i = 0; i < int'(O); i++) begin
          checks++;
          if (int'(prob[i]) != sq(e.z[i])) begin
            failures++; $display("FAIL prob[%0d] = %0d", i, prob[i]);
          end
        end
        if (e.cls == 0) n_cls0++; else n_cls1++;
      end
    end
  end
endmodule
