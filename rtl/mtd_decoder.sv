// mtd_decoder -- iterative multi-stage threshold decoder with difference
// registers (MTD-DR) for a tail-biting rate-2/4 SOCC of type 2.
//
// State is kept in circular registers of M positions, one set per stream:
// the information register (current decisions), the difference register
// DR (1 where the decision differs from the received hard decision), the
// syndrome register, and the received magnitudes and WBF weights.  All of
// them rotate by one position per cycle, so that position j of a pass sits
// at index 0 of the information/DR registers and its checking syndromes sit
// at the fixed indices given by the polynomial exponents.  One pass over the
// block therefore takes M cycles and equals one decoding stage of a chain
// of identical stages; the stage is reused for every iteration.
//
// Each cycle the stream-1 bit is decided first, its syndrome flips are
// applied, and then the stream-2 bit is decided on the updated syndromes.
// A flip inverts the bit, its DR bit and its checking syndromes.
//
// Interface: ST_LOAD takes one position (four signed samples: information 1,
// parity 1, information 2, parity 2; positive means bit 0) per in_valid &&
// in_ready cycle.  One ST_INIT cycle follows, then the passes chosen by
// `sched` (see mtd_controller), then M output cycles with out_valid high, in
// position order, giving the decided bits and the soft (SMTD) checksum of
// each bit as a reliability.  Latency from the last input to the first
// output: 1 + passes*M cycles.  The output has no back-pressure.
// The register structure, checksums and decision rules follow the MTD-DR
// description; the rotating single-stage organisation, the sample widths
// and the load/output interface are this design's own.
module mtd_decoder #(
  parameter int unsigned M  = mtd_pkg::M_DEF,
  parameter int unsigned J  = mtd_pkg::J_DEF,
  parameter int unsigned YW = mtd_pkg::YW_DEF,
  parameter int unsigned G11 [J] = mtd_pkg::G11_DEF,
  parameter int unsigned G12 [J] = mtd_pkg::G12_DEF,
  parameter int unsigned G21 [J] = mtd_pkg::G21_DEF,
  parameter int unsigned G22 [J] = mtd_pkg::G22_DEF,
  localparam int unsigned MW = YW - 1,
  localparam int unsigned LW = $clog2((2*J + 1) * (2**MW - 1) + 1) + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  mtd_pkg::sched_t        sched,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [YW-1:0]   in_yx1,
  input  logic signed [YW-1:0]   in_yv1,
  input  logic signed [YW-1:0]   in_yx2,
  input  logic signed [YW-1:0]   in_yv2,
  output logic                   out_valid,
  output logic                   out_x1,
  output logic                   out_x2,
  output logic signed [LW-1:0]   out_l1,
  output logic signed [LW-1:0]   out_l2,
  output logic                   done,     // with the last output position
  output logic [11:0]             passes,   // passes run on the current block
  output logic [15:0]            flips     // bits flipped on the current block
);
  import mtd_pkg::*;

  localparam int unsigned NCHK = 2 * J;

  function automatic logic [M-1:0] tap_mask(input int unsigned g [J]);
    logic [M-1:0] m;
    m = '0;
    for (int k = 0; k < J; k++) m[g[k]] = 1'b1;
    return m;
  endfunction

  localparam logic [M-1:0] MASK11 = tap_mask(G11);
  localparam logic [M-1:0] MASK12 = tap_mask(G12);
  localparam logic [M-1:0] MASK21 = tap_mask(G21);
  localparam logic [M-1:0] MASK22 = tap_mask(G22);

  function automatic logic [MW-1:0] mag(input logic signed [YW-1:0] y);
    logic signed [YW:0] a;
    a = y[YW-1] ? -YW'(1) * {y[YW-1], y} : {y[YW-1], y};
    return (a > (2**MW - 1)) ? {MW{1'b1}} : a[MW-1:0];
  endfunction

  // ---------------- controller ----------------
  logic load_en, init_en, dec_en, out_en, flip1, flip2;
  alg_e alg;

  mtd_controller #(.M(M)) u_ctrl (
    .clk, .rst_n, .sched, .in_valid, .flip_any(flip1 | flip2),
    .state(), .in_ready, .load_en, .init_en, .dec_en, .out_en,
    .alg, .passes, .done
  );

  // ---------------- circular registers ----------------
  logic [M-1:0]  xr1, xr2;   // information registers
  logic [M-1:0]  dr1, dr2;   // difference registers
  logic [M-1:0]  sr1, sr2;   // syndrome registers (hold the parity bits in ST_LOAD)
  logic [MW-1:0] ax1 [M];    // |y| information stream 1
  logic [MW-1:0] ax2 [M];
  logic [MW-1:0] av1 [M];    // |y| parity stream 1
  logic [MW-1:0] av2 [M];
  logic [MW-1:0] w1  [M];    // WBF weights of syndrome stream 1
  logic [MW-1:0] w2  [M];

  // ---------------- block set-up ----------------
  logic [M-1:0]  sf1, sf2;
  logic [MW-1:0] wb1 [M];
  logic [MW-1:0] wb2 [M];

  syndrome_former #(.M(M), .J(J), .G11(G11), .G12(G12), .G21(G21), .G22(G22))
    u_synd (.xh1(xr1), .xh2(xr2), .vh1(sr1), .vh2(sr2), .s1(sf1), .s2(sf2));

  wbf_weights #(.M(M), .J(J), .MW(MW), .G11(G11), .G12(G12), .G21(G21), .G22(G22))
    u_wbf (.ax1, .ax2, .av1, .av2, .w1(wb1), .w2(wb2));

  // ---------------- the two threshold elements ----------------
  alg_e te_alg;
  assign te_alg = out_en ? ALG_SOFT : alg;

  logic [NCHK-1:0] c1_s, c2_s;
  logic [MW-1:0]   c1_wp [NCHK];
  logic [MW-1:0]   c1_ww [NCHK];
  logic [MW-1:0]   c2_wp [NCHK];
  logic [MW-1:0]   c2_ww [NCHK];
  logic [M-1:0]    s1a, s2a, s1b, s2b;
  logic            te1_flip, te2_flip;
  logic signed [LW-1:0] l1, l2;

  for (genvar k = 0; k < J; k++) begin : g_chk
    // stream 1: syndromes of S1 at G11, of S2 at G12
    assign c1_s[k]       = sr1[G11[k]];
    assign c1_s[J+k]     = sr2[G12[k]];
    assign c1_wp[k]      = av1[G11[k]];
    assign c1_wp[J+k]    = av2[G12[k]];
    assign c1_ww[k]      = w1[G11[k]];
    assign c1_ww[J+k]    = w2[G12[k]];
    // stream 2: syndromes of S1 at G21, of S2 at G22, after stream 1's flip
    assign c2_s[k]       = s1a[G21[k]];
    assign c2_s[J+k]     = s2a[G22[k]];
    assign c2_wp[k]      = av1[G21[k]];
    assign c2_wp[J+k]    = av2[G22[k]];
    assign c2_ww[k]      = w1[G21[k]];
    assign c2_ww[J+k]    = w2[G22[k]];
  end

  threshold_element #(.NCHK(NCHK), .MW(MW), .LW(LW)) u_te1 (
    .alg(te_alg), .s(c1_s), .w_par(c1_wp), .w_wbf(c1_ww),
    .d(dr1[0]), .w_d(ax1[0]), .l(l1), .flip(te1_flip));

  assign flip1 = dec_en & te1_flip;
  assign s1a   = sr1 ^ (flip1 ? MASK11 : '0);
  assign s2a   = sr2 ^ (flip1 ? MASK12 : '0);

  threshold_element #(.NCHK(NCHK), .MW(MW), .LW(LW)) u_te2 (
    .alg(te_alg), .s(c2_s), .w_par(c2_wp), .w_wbf(c2_ww),
    .d(dr2[0]), .w_d(ax2[0]), .l(l2), .flip(te2_flip));

  assign flip2 = dec_en & te2_flip;
  assign s1b   = s1a ^ (flip2 ? MASK21 : '0);
  assign s2b   = s2a ^ (flip2 ? MASK22 : '0);

  // ---------------- register update ----------------
  wire shift = load_en | dec_en | out_en;
  wire x1n0  = xr1[0] ^ flip1;
  wire x2n0  = xr2[0] ^ flip2;
  wire d1n0  = dr1[0] ^ flip1;
  wire d2n0  = dr2[0] ^ flip2;

  always_ff @(posedge clk) begin
    if (init_en) begin
      sr1 <= sf1;
      sr2 <= sf2;
      dr1 <= '0;
      dr2 <= '0;
      w1  <= wb1;
      w2  <= wb2;
    end else if (shift) begin
      // rotate towards index 0; in ST_LOAD the new position enters at M-1
      xr1 <= {load_en ? in_yx1[YW-1] : x1n0, xr1[M-1:1]};
      xr2 <= {load_en ? in_yx2[YW-1] : x2n0, xr2[M-1:1]};
      dr1 <= {load_en ? 1'b0 : d1n0, dr1[M-1:1]};
      dr2 <= {load_en ? 1'b0 : d2n0, dr2[M-1:1]};
      sr1 <= {load_en ? in_yv1[YW-1] : s1b[0], s1b[M-1:1]};
      sr2 <= {load_en ? in_yv2[YW-1] : s2b[0], s2b[M-1:1]};
      for (int p = 0; p < M - 1; p++) begin
        ax1[p] <= ax1[p+1];
        ax2[p] <= ax2[p+1];
        av1[p] <= av1[p+1];
        av2[p] <= av2[p+1];
        w1[p]  <= w1[p+1];
        w2[p]  <= w2[p+1];
      end
      ax1[M-1] <= load_en ? mag(in_yx1) : ax1[0];
      ax2[M-1] <= load_en ? mag(in_yx2) : ax2[0];
      av1[M-1] <= load_en ? mag(in_yv1) : av1[0];
      av2[M-1] <= load_en ? mag(in_yv2) : av2[0];
      w1[M-1]  <= w1[0];
      w2[M-1]  <= w2[0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       flips <= '0;
    else if (init_en) flips <= '0;
    else if (dec_en)  flips <= flips + 16'(flip1) + 16'(flip2);
  end

  assign out_valid = out_en;
  assign out_x1    = xr1[0];
  assign out_x2    = xr2[0];
  assign out_l1    = l1;
  assign out_l2    = l2;

endmodule
