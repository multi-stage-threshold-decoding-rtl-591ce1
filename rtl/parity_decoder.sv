// parity_decoder -- outer single-parity-check decoder of one information
// stream.
//
// Takes the decoded stream of a codeword, one position per in_valid cycle,
// with the checksum value of each bit from the inner decoder.  Sub-blocks
// are framed as in parity_encoder (DATA_LEN data bits and a parity bit; a
// shorter last sub-block ending at position M-1).  When a sub-block's parity
// fails, the bit with the smallest checksum in it (the least reliable
// decision) is inverted.  At the last position of each sub-block, out_valid
// pulses for one cycle one clock later with the data bits of the sub-block
// (bit i = i-th data bit, parity bit removed, unused bits zero), their number
// and whether a bit was inverted.  The correction rule follows the
// published scheme; the framing, the tie rule (first minimum wins) and the
// output format are this design's own.
module parity_decoder #(
  parameter int unsigned M        = mtd_pkg::M_DEF,
  parameter int unsigned DATA_LEN = mtd_pkg::DATA_LEN_DEF,
  parameter int unsigned LW       = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     in_bit,
  input  logic signed [LW-1:0]     in_l,
  output logic                     out_valid,
  output logic [DATA_LEN-1:0]      out_data,
  output logic [$clog2(DATA_LEN+1)-1:0] out_len,
  output logic                     out_fixed
);

  localparam int unsigned PW = $clog2(M);
  localparam int unsigned SW = $clog2(DATA_LEN + 1);

  logic [PW-1:0]       pos_q;
  logic [SW-1:0]       sub_q;
  logic [DATA_LEN:0]   buf_q;    // bits of the sub-block so far
  logic                par_q;
  logic signed [LW-1:0] min_q;
  logic [SW-1:0]       idx_q;

  wire is_last = (sub_q == SW'(DATA_LEN)) || (pos_q == PW'(M - 1));

  // sub-block state including the current bit
  logic [DATA_LEN:0]    cur;
  logic                 par_n;
  logic signed [LW-1:0] min_n;
  logic [SW-1:0]        idx_n;
  logic [DATA_LEN:0]    fixed_blk;
  logic [DATA_LEN-1:0]  keep;

  always_comb begin
    cur = buf_q;
    cur[sub_q] = in_bit;
    par_n = par_q ^ in_bit;
    if (sub_q == '0 || in_l < min_q) begin
      min_n = in_l;
      idx_n = sub_q;
    end else begin
      min_n = min_q;
      idx_n = idx_q;
    end
    fixed_blk = cur;
    if (par_n) fixed_blk[idx_n] = ~fixed_blk[idx_n];
    // data bits are the positions before the parity bit (at sub_q)
    for (int i = 0; i < DATA_LEN; i++) keep[i] = (i < int'(sub_q));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q     <= '0;
      sub_q     <= '0;
      buf_q     <= '0;
      par_q     <= 1'b0;
      min_q     <= '0;
      idx_q     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_len   <= '0;
      out_fixed <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        pos_q <= (pos_q == PW'(M - 1)) ? '0 : pos_q + 1'b1;
        if (is_last) begin
          out_valid <= 1'b1;
          out_data  <= fixed_blk[DATA_LEN-1:0] & keep;
          out_len   <= sub_q;
          out_fixed <= par_n;
          sub_q     <= '0;
          buf_q     <= '0;
          par_q     <= 1'b0;
        end else begin
          sub_q <= sub_q + 1'b1;
          buf_q <= cur;
          par_q <= par_n;
          min_q <= min_n;
          idx_q <= idx_n;
        end
      end
    end
  end

endmodule
