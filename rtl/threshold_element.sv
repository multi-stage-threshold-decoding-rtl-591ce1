// threshold_element -- checksum and flip decision for one information bit.
//
// Inputs are the NCHK checking syndromes of the bit (J from each syndrome
// stream), their weights and the bit's difference-register (DR) bit d.
//   ALG_HARD: L = sum(s) + d, flip when L > T, with T = floor((NCHK+1)/2).
//   ALG_SOFT: L = sum(w_par*(1-2s)) + w_d*(1-2d), flip when L < 0, where
//             w_par is the magnitude of the received parity signal of each
//             syndrome and w_d that of the received information signal.
//   ALG_WBF : as ALG_SOFT, but each syndrome weight is the WBF weight (the
//             smallest magnitude among the signals forming that syndrome).
// Flipping a bit inverts all its checking syndromes and its DR bit, which
// is what lowers the distance between received and decoded words.  The L
// output is the checksum before the decision.  Combinational.
module threshold_element #(
  parameter int unsigned NCHK = 2 * mtd_pkg::J_DEF,
  parameter int unsigned MW   = mtd_pkg::YW_DEF - 1,
  parameter int unsigned T    = (NCHK + 1) / 2,
  parameter int unsigned LW   = $clog2((NCHK + 1) * (2**MW - 1) + 1) + 1
) (
  input  mtd_pkg::alg_e        alg,
  input  logic [NCHK-1:0]      s,       // checking syndromes
  input  logic [MW-1:0]        w_par [NCHK],  // received parity magnitudes
  input  logic [MW-1:0]        w_wbf [NCHK],  // WBF weights
  input  logic                 d,       // difference-register bit
  input  logic [MW-1:0]        w_d,     // received information magnitude
  output logic signed [LW-1:0] l,       // checksum
  output logic                 flip
);

  always_comb begin
    logic signed [LW-1:0] acc;
    logic signed [LW-1:0] w;
    acc = '0;
    w   = '0;
    if (alg == mtd_pkg::ALG_HARD) begin
      for (int k = 0; k < NCHK; k++) acc += LW'(s[k]);
      acc += LW'(d);
      flip = (acc > $signed(LW'(T)));
    end else begin
      for (int k = 0; k < NCHK; k++) begin
        w = (alg == mtd_pkg::ALG_WBF) ? $signed(LW'(w_wbf[k])) : $signed(LW'(w_par[k]));
        acc = s[k] ? acc - w : acc + w;
      end
      w = $signed(LW'(w_d));
      acc = d ? acc - w : acc + w;
      flip = acc[LW-1];
    end
    l = acc;
  end

endmodule
