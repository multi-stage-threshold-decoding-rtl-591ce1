// wbf_weights -- syndrome weights of the weighted-bit-flipping decoder.
//
// A syndrome bit of stream y is formed by one received parity signal and by
// the 2*J received information signals selected by the exponents of G1y
// (stream 1) and G2y (stream 2).  Its weight is the smallest magnitude among
// those 2*J+1 signals.  The magnitudes depend only on the received word, so
// the weights are computed once per block.  Combinational over whole blocks;
// index i of each array is position i of the stream.
module wbf_weights #(
  parameter int unsigned M  = mtd_pkg::M_DEF,
  parameter int unsigned J  = mtd_pkg::J_DEF,
  parameter int unsigned MW = mtd_pkg::YW_DEF - 1,
  parameter int unsigned G11 [J] = mtd_pkg::G11_DEF,
  parameter int unsigned G12 [J] = mtd_pkg::G12_DEF,
  parameter int unsigned G21 [J] = mtd_pkg::G21_DEF,
  parameter int unsigned G22 [J] = mtd_pkg::G22_DEF
) (
  input  logic [MW-1:0] ax1 [M],  // |y| of information stream 1
  input  logic [MW-1:0] ax2 [M],  // |y| of information stream 2
  input  logic [MW-1:0] av1 [M],  // |y| of parity stream 1
  input  logic [MW-1:0] av2 [M],  // |y| of parity stream 2
  output logic [MW-1:0] w1  [M],  // weight of syndrome stream 1
  output logic [MW-1:0] w2  [M]   // weight of syndrome stream 2
);

  function automatic logic [MW-1:0] min2(input logic [MW-1:0] a, input logic [MW-1:0] b);
    return (a < b) ? a : b;
  endfunction

  always_comb begin
    for (int i = 0; i < M; i++) begin
      logic [MW-1:0] m1, m2;
      m1 = av1[i];
      m2 = av2[i];
      for (int k = 0; k < J; k++) begin
        m1 = min2(m1, ax1[(i + M - G11[k]) % M]);
        m1 = min2(m1, ax2[(i + M - G21[k]) % M]);
        m2 = min2(m2, ax1[(i + M - G12[k]) % M]);
        m2 = min2(m2, ax2[(i + M - G22[k]) % M]);
      end
      w1[i] = m1;
      w2[i] = m2;
    end
  end

endmodule
