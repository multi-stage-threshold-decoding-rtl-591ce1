// socc_encoder -- tail-biting parity generator of a rate-2/4 self-orthogonal
// convolutional code of type 2.
//
// Two information streams X1, X2 of M bits each produce two parity streams
//   V1 = G11*X1 + G21*X2,   V2 = G12*X1 + G22*X2   (mod 2),
// as in the shift-register encoder with four tap sets.  Tail-biting closes
// the shift register into a ring of M bits, so parity bit i takes
// information bit (i - e) mod M for every exponent e of a polynomial.
// Pure combinational logic over whole blocks: bit i of each vector is
// position i of the stream.  Every exponent must be below M.
module socc_encoder #(
  parameter int unsigned M = mtd_pkg::M_DEF,
  parameter int unsigned J = mtd_pkg::J_DEF,
  parameter int unsigned G11 [J] = mtd_pkg::G11_DEF,
  parameter int unsigned G12 [J] = mtd_pkg::G12_DEF,
  parameter int unsigned G21 [J] = mtd_pkg::G21_DEF,
  parameter int unsigned G22 [J] = mtd_pkg::G22_DEF
) (
  input  logic [M-1:0] x1,
  input  logic [M-1:0] x2,
  output logic [M-1:0] v1,
  output logic [M-1:0] v2
);

  always_comb begin
    for (int i = 0; i < M; i++) begin
      v1[i] = 1'b0;
      v2[i] = 1'b0;
      for (int k = 0; k < J; k++) begin
        v1[i] ^= x1[(i + M - G11[k]) % M] ^ x2[(i + M - G21[k]) % M];
        v2[i] ^= x1[(i + M - G12[k]) % M] ^ x2[(i + M - G22[k]) % M];
      end
    end
  end

endmodule
