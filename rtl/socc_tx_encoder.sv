// socc_tx_encoder -- transmit-side block encoder for the tail-biting
// rate-2/4 SOCC of type 2.
//
// Tail-biting needs the whole block before the first parity bit is known,
// so the encoder first collects M pairs of information bits (one bit of
// each stream per in_valid && in_ready cycle) in two circular registers,
// spends one cycle computing both parity streams with socc_encoder, and then
// emits the codeword one position per out_valid && out_ready cycle as the
// four bits {x1, v1, x2, v2} of that position, in position order.  It then
// accepts the next block.  The parity equations are the published ones; the
// block buffering and the interface are this design's own.
module socc_tx_encoder #(
  parameter int unsigned M = mtd_pkg::M_DEF,
  parameter int unsigned J = mtd_pkg::J_DEF,
  parameter int unsigned G11 [J] = mtd_pkg::G11_DEF,
  parameter int unsigned G12 [J] = mtd_pkg::G12_DEF,
  parameter int unsigned G21 [J] = mtd_pkg::G21_DEF,
  parameter int unsigned G22 [J] = mtd_pkg::G22_DEF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_x1,
  input  logic in_x2,
  output logic out_valid,
  input  logic out_ready,
  output logic out_x1,
  output logic out_v1,
  output logic out_x2,
  output logic out_v2
);

  typedef enum logic [1:0] {TX_FILL, TX_CODE, TX_EMIT} tx_state_e;

  localparam int unsigned PW = $clog2(M);

  tx_state_e     state_q;
  logic [PW-1:0] pos_q;
  logic [M-1:0]  x1_q, x2_q, v1_q, v2_q;
  logic [M-1:0]  v1_c, v2_c;

  socc_encoder #(.M(M), .J(J), .G11(G11), .G12(G12), .G21(G21), .G22(G22))
    u_enc (.x1(x1_q), .x2(x2_q), .v1(v1_c), .v2(v2_c));

  wire last_pos = (pos_q == PW'(M - 1));
  wire in_fire  = in_valid && in_ready;
  wire out_fire = out_valid && out_ready;

  assign in_ready  = (state_q == TX_FILL);
  assign out_valid = (state_q == TX_EMIT);
  assign out_x1    = x1_q[0];
  assign out_v1    = v1_q[0];
  assign out_x2    = x2_q[0];
  assign out_v2    = v2_q[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= TX_FILL;
      pos_q   <= '0;
    end else begin
      unique case (state_q)
        TX_FILL: if (in_fire) begin
          pos_q <= last_pos ? '0 : pos_q + 1'b1;
          if (last_pos) state_q <= TX_CODE;
        end
        TX_CODE: state_q <= TX_EMIT;
        TX_EMIT: if (out_fire) begin
          pos_q <= last_pos ? '0 : pos_q + 1'b1;
          if (last_pos) state_q <= TX_FILL;
        end
        default: state_q <= TX_FILL;
      endcase
    end
  end

  // block registers: shift in at M-1 while filling, rotate while emitting
  always_ff @(posedge clk) begin
    if (in_fire) begin
      x1_q <= {in_x1, x1_q[M-1:1]};
      x2_q <= {in_x2, x2_q[M-1:1]};
    end else if (state_q == TX_CODE) begin
      v1_q <= v1_c;
      v2_q <= v2_c;
    end else if (out_fire) begin
      x1_q <= {x1_q[0], x1_q[M-1:1]};
      x2_q <= {x2_q[0], x2_q[M-1:1]};
      v1_q <= {v1_q[0], v1_q[M-1:1]};
      v2_q <= {v2_q[0], v2_q[M-1:1]};
    end
  end

endmodule
