// parity_encoder -- outer single-parity-check encoder of one information
// stream.
//
// The stream is cut into sub-blocks of DATA_LEN data bits, and one even-
// parity bit is appended to each, so a sub-block occupies DATA_LEN+1 stream
// positions.  The stream of one codeword has M positions; when M is not a
// multiple of DATA_LEN+1 the last sub-block is shorter and its parity bit
// sits in the last position M-1.  M - ceil(M/(DATA_LEN+1)) data bits are
// carried per codeword stream (1029 for M = 1050, DATA_LEN = 50).
// Valid/ready on both sides; the input is held off (in_ready low) for the
// cycle in which the parity bit is sent.  Even parity, the handling of the
// short last sub-block and the handshake are this design's own choices.
module parity_encoder #(
  parameter int unsigned M        = mtd_pkg::M_DEF,
  parameter int unsigned DATA_LEN = mtd_pkg::DATA_LEN_DEF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,
  output logic out_valid,
  input  logic out_ready,
  output logic out_bit
);

  localparam int unsigned PW = $clog2(M);
  localparam int unsigned SW = $clog2(DATA_LEN + 1);

  logic [PW-1:0] pos_q;   // position in the codeword stream
  logic [SW-1:0] sub_q;   // position in the sub-block
  logic          par_q;   // parity of the data bits sent in this sub-block

  wire is_par = (sub_q == SW'(DATA_LEN)) || (pos_q == PW'(M - 1));

  assign out_valid = is_par | in_valid;
  assign out_bit   = is_par ? par_q : in_bit;
  assign in_ready  = !is_par && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q <= '0;
      sub_q <= '0;
      par_q <= 1'b0;
    end else if (out_valid && out_ready) begin
      pos_q <= (pos_q == PW'(M - 1)) ? '0 : pos_q + 1'b1;
      if (is_par) begin
        sub_q <= '0;
        par_q <= 1'b0;
      end else begin
        sub_q <= sub_q + 1'b1;
        par_q <= par_q ^ in_bit;
      end
    end
  end

endmodule
