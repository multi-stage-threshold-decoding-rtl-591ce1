// syndrome_former -- the two syndrome sequences of a received type-2 word.
//
// The hard-decision information bits are re-encoded by a local copy of the
// tail-biting encoder and added to the hard-decision parity bits:
//   S1 = G11*X1 + G21*X2 + V1,   S2 = G12*X1 + G22*X2 + V2   (mod 2).
// Syndrome bit i then depends on information bit j when i = (j + e) mod M for
// an exponent e of the matching polynomial.  Combinational, whole blocks.
module syndrome_former #(
  parameter int unsigned M = mtd_pkg::M_DEF,
  parameter int unsigned J = mtd_pkg::J_DEF,
  parameter int unsigned G11 [J] = mtd_pkg::G11_DEF,
  parameter int unsigned G12 [J] = mtd_pkg::G12_DEF,
  parameter int unsigned G21 [J] = mtd_pkg::G21_DEF,
  parameter int unsigned G22 [J] = mtd_pkg::G22_DEF
) (
  input  logic [M-1:0] xh1,  // hard-decision information stream 1
  input  logic [M-1:0] xh2,  // hard-decision information stream 2
  input  logic [M-1:0] vh1,  // hard-decision parity stream 1
  input  logic [M-1:0] vh2,  // hard-decision parity stream 2
  output logic [M-1:0] s1,
  output logic [M-1:0] s2
);

  logic [M-1:0] p1, p2;

  socc_encoder #(.M(M), .J(J), .G11(G11), .G12(G12), .G21(G21), .G22(G22))
    u_local_enc (.x1(xh1), .x2(xh2), .v1(p1), .v2(p2));

  assign s1 = p1 ^ vh1;
  assign s2 = p2 ^ vh2;

endmodule
