// pp_node: partial-parallel contraction of one tree node,
//   z[i] = sum_{j,k} x[j] * y[k] * w[i][j][k],
// built with CHI_IN^2 + 1 multipliers instead of CHI_IN^2*(CHI_OUT+1).
//
// How it works:
//   Mult1  a single multiplier forms the pairs x[j]*y[k] one per cycle,
//          pair m = j*CHI_IN + k, for m = 0 .. CHI_IN^2-1. Pair 0 is taken
//          from the live inputs in the accept cycle; the vectors are held in
//          xh/yh for the remaining pairs.
//   Mult2  CHI_IN^2 multipliers, one per pair index m. When pair m arrives,
//          multiplier m holds it and on CHI_OUT consecutive cycles forms
//          pair*w[0][m], pair*w[1][m], ... Because the pairs arrive one cycle
//          apart, on each cycle at most one multiplier produces a term for a
//          given output i.
//   Sum    CHI_OUT accumulators; accumulator i adds the term for output i
//          that is present on each cycle, starting afresh with pair 0.
// Latency from in_valid (accepted when in_ready) to out_valid is
// CHI_IN^2 + CHI_OUT + 1 cycles. z holds the result from the out_valid cycle
// until the next input's first term arrives (two cycles after it is
// accepted at the earliest). The node is busy, in_ready low, from the accept
// until out_valid; a new input may be accepted in the out_valid cycle.
// The multiplier count, the reuse of the single Mult1 unit, the per-pair
// Mult2 units and the latency follow the design; the hold registers, the
// ready handshake and the saturation of the result are this design's choices.
//
// Weight layout: w[(i*CHI_IN + j)*CHI_IN + k] (same as fp_node).
module pp_node
  import ttn_pkg::*;
#(
  parameter int unsigned CHI_IN  = 2,
  parameter int unsigned CHI_OUT = 2,
  parameter int unsigned NP      = CHI_IN * CHI_IN,
  parameter int unsigned NW      = NP * CHI_OUT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  q_t [CHI_IN-1:0]      x,
  input  q_t [CHI_IN-1:0]      y,
  input  q_t [NW-1:0]          w,
  output logic                 out_valid,
  output q_t [CHI_OUT-1:0]     z
);

  localparam int unsigned MW    = $clog2(NP);                // pair index
  localparam int unsigned TW    = (CHI_OUT > 1) ? $clog2(CHI_OUT) : 1;
  localparam int unsigned CW    = $clog2(CHI_OUT + 1);       // phase counter
  localparam int unsigned SUM_W = DATA_W + $clog2(NP);

  logic busy;
  logic accept;
  assign in_ready = !busy;
  assign accept   = in_valid && !busy;

  // ---------------- Mult1: one pair per cycle ----------------
  q_t [CHI_IN-1:0] xh, yh;
  logic [MW-1:0]   m_cnt;     // next pair to form
  logic            issuing;   // pairs 1 .. NP-1 still to form
  q_t              a1, b1;
  logic            en1;
  q_t              pair;
  logic            pair_vld;
  logic [MW-1:0]   pair_idx;

  always_comb begin
    if (accept) begin
      a1  = x[0];
      b1  = y[0];
      en1 = 1'b1;
    end else begin
      a1  = xh[m_cnt / MW'(CHI_IN)];
      b1  = yh[m_cnt % MW'(CHI_IN)];
      en1 = issuing;
    end
  end

  dsp_mul u_mult1 (.clk, .rst_n, .en(en1), .a(a1), .b(b1), .p(pair));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xh       <= '0;
      yh       <= '0;
      m_cnt    <= '0;
      issuing  <= 1'b0;
      pair_vld <= 1'b0;
      pair_idx <= '0;
    end else begin
      pair_vld <= en1;
      if (accept) begin
        xh       <= x;
        yh       <= y;
        m_cnt    <= MW'(1);
        issuing  <= 1'b1;
        pair_idx <= '0;
      end else if (issuing) begin
        pair_idx <= m_cnt;
        m_cnt    <= m_cnt + MW'(1);
        if (m_cnt == MW'(NP - 1)) issuing <= 1'b0;
      end
    end
  end

  // ---------------- Mult2: one multiplier per pair index ----------------
  q_t [NP-1:0]         term;
  logic [NP-1:0]       term_vld;
  logic [NP-1:0][TW-1:0] term_tag;

  for (genvar m = 0; m < NP; m++) begin : g_m2
    logic          load;
    q_t            hold;
    logic [CW-1:0] phase;    // next output index to serve
    logic          active;   // outputs 1 .. CHI_OUT-1 still to serve
    q_t            a2, b2;

    assign load = pair_vld && (pair_idx == MW'(m));

    always_comb begin
      if (load) begin
        a2 = pair;
        b2 = w[m];                         // output index 0
      end else begin
        a2 = hold;
        b2 = w[int'(phase) * NP + m];
      end
    end

    dsp_mul u_mult2 (.clk, .rst_n, .en(load || active), .a(a2), .b(b2), .p(term[m]));

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        hold        <= '0;
        phase       <= '0;
        active      <= 1'b0;
        term_vld[m] <= 1'b0;
        term_tag[m] <= '0;
      end else if (load) begin
        hold        <= pair;
        phase       <= CW'(1);
        active      <= (CHI_OUT > 1);
        term_vld[m] <= 1'b1;
        term_tag[m] <= '0;
      end else if (active) begin
        term_vld[m] <= 1'b1;
        term_tag[m] <= TW'(phase);
        phase       <= phase + CW'(1);
        if (phase == CW'(CHI_OUT - 1)) active <= 1'b0;
      end else begin
        term_vld[m] <= 1'b0;
      end
    end
  end

  // ---------------- Sum: one accumulator per output ----------------
  logic signed [SUM_W-1:0] acc [CHI_OUT];
  logic                    last_term;

  assign last_term = term_vld[NP-1] && (term_tag[NP-1] == TW'(CHI_OUT - 1));

  for (genvar i = 0; i < CHI_OUT; i++) begin : g_acc
    logic hit, first;
    q_t   t;

    always_comb begin
      hit   = 1'b0;
      first = 1'b0;
      t     = '0;
      for (int m = 0; m < NP; m++) begin
        if (term_vld[m] && term_tag[m] == TW'(i)) begin
          hit   = 1'b1;
          first = (m == 0);
          t     = term[m];
        end
      end
    end

    always_ff @(posedge clk) begin
      if (!rst_n)   acc[i] <= '0;
      else if (hit) acc[i] <= (first ? '0 : acc[i]) + SUM_W'(t);
    end

    assign z[i] = sat_q(48'(acc[i]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= last_term;
      if (accept)         busy <= 1'b1;
      else if (last_term) busy <= 1'b0;
    end
  end

  // A Mult2 unit must have finished its previous pair before it is reloaded.
  for (genvar m = 0; m < NP; m++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) !(g_m2[m].load && g_m2[m].active))
      else $error("pp_node: multiplier %0d reloaded while busy", m);
  end

endmodule
