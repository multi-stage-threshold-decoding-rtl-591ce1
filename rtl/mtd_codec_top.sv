// mtd_codec_top -- codec for the concatenated single-parity-check /
// self-orthogonal convolutional code (type 2) with the multi-stage
// threshold decoder.
//
// Transmit side: two parity_encoder instances (one per information stream,
// fed in lockstep from a two-bit data word) append a parity bit to every
// DATA_LEN data bits; socc_tx_encoder collects one block of M positions and
// emits the rate-2/4 tail-biting codeword {x1, v1, x2, v2}, one position
// per cycle.  Modulation and the channel are outside this design.
//
// Receive side: mtd_decoder takes the four signed soft samples of each
// position, decodes with the schedule on `sched` (hard MTD-DR, SMTD, WBF,
// CMTD without or with feedback) and streams the decided bits with their
// checksums into two parity_decoder instances, which fix one bit per failed
// sub-block and deliver the data bits a sub-block at a time.
//
// The two sides share only the clock and reset.  Timing: a transmit block
// takes M accepted positions (data and parity bits), one coding cycle and
// M output cycles.  A receive block takes M input cycles, one set-up cycle,
// passes*M decoding cycles and M output cycles; each sub-block appears one
// cycle after its last position leaves the decoder.
module mtd_codec_top #(
  parameter int unsigned M        = mtd_pkg::M_DEF,
  parameter int unsigned J        = mtd_pkg::J_DEF,
  parameter int unsigned YW       = mtd_pkg::YW_DEF,
  parameter int unsigned DATA_LEN = mtd_pkg::DATA_LEN_DEF,
  parameter int unsigned G11 [J]  = mtd_pkg::G11_DEF,
  parameter int unsigned G12 [J]  = mtd_pkg::G12_DEF,
  parameter int unsigned G21 [J]  = mtd_pkg::G21_DEF,
  parameter int unsigned G22 [J]  = mtd_pkg::G22_DEF,
  localparam int unsigned LW = $clog2((2*J + 1) * (2**(YW-1) - 1) + 1) + 1,
  localparam int unsigned SW = $clog2(DATA_LEN + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // transmit: data bits in (bit 0 -> stream 1, bit 1 -> stream 2)
  input  logic                  tx_valid,
  output logic                  tx_ready,
  input  logic [1:0]            tx_data,
  // transmit: codeword out, one position per cycle
  output logic                  cw_valid,
  input  logic                  cw_ready,
  output logic                  cw_x1,
  output logic                  cw_v1,
  output logic                  cw_x2,
  output logic                  cw_v2,
  // receive: decoding schedule and soft samples (positive = bit 0)
  input  mtd_pkg::sched_t       sched,
  input  logic                  ch_valid,
  output logic                  ch_ready,
  input  logic signed [YW-1:0]  ch_yx1,
  input  logic signed [YW-1:0]  ch_yv1,
  input  logic signed [YW-1:0]  ch_yx2,
  input  logic signed [YW-1:0]  ch_yv2,
  // receive: inner decoder output stream
  output logic                  dec_valid,
  output logic                  dec_x1,
  output logic                  dec_x2,
  output logic                  dec_done,
  output logic [11:0]            dec_passes,
  output logic [15:0]           dec_flips,
  // receive: data sub-blocks after the parity-check decoder
  output logic                  rx_valid,
  output logic [DATA_LEN-1:0]   rx_data1,
  output logic [DATA_LEN-1:0]   rx_data2,
  output logic [SW-1:0]         rx_len,
  output logic [1:0]            rx_fixed   // bit s-1: a bit of stream s was inverted
);

  // ---------------- transmit ----------------
  logic pe1_in_ready, pe2_in_ready, pe1_valid, pe2_valid, pe1_bit, pe2_bit;
  logic te_in_ready;

  parity_encoder #(.M(M), .DATA_LEN(DATA_LEN)) u_penc1 (
    .clk, .rst_n, .in_valid(tx_valid), .in_ready(pe1_in_ready), .in_bit(tx_data[0]),
    .out_valid(pe1_valid), .out_ready(te_in_ready), .out_bit(pe1_bit));

  parity_encoder #(.M(M), .DATA_LEN(DATA_LEN)) u_penc2 (
    .clk, .rst_n, .in_valid(tx_valid), .in_ready(pe2_in_ready), .in_bit(tx_data[1]),
    .out_valid(pe2_valid), .out_ready(te_in_ready), .out_bit(pe2_bit));

  assign tx_ready = pe1_in_ready & pe2_in_ready;

  socc_tx_encoder #(.M(M), .J(J), .G11(G11), .G12(G12), .G21(G21), .G22(G22)) u_txenc (
    .clk, .rst_n, .in_valid(pe1_valid & pe2_valid), .in_ready(te_in_ready),
    .in_x1(pe1_bit), .in_x2(pe2_bit),
    .out_valid(cw_valid), .out_ready(cw_ready),
    .out_x1(cw_x1), .out_v1(cw_v1), .out_x2(cw_x2), .out_v2(cw_v2));

  // The two parity encoders see the same handshakes and must stay aligned.
  a_penc_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (pe1_valid == pe2_valid) && (pe1_in_ready == pe2_in_ready));

  // ---------------- receive ----------------
  logic signed [LW-1:0] l1, l2;
  logic                 pd2_valid;
  logic [SW-1:0]        pd2_len;

  mtd_decoder #(.M(M), .J(J), .YW(YW), .G11(G11), .G12(G12), .G21(G21), .G22(G22)) u_dec (
    .clk, .rst_n, .sched,
    .in_valid(ch_valid), .in_ready(ch_ready),
    .in_yx1(ch_yx1), .in_yv1(ch_yv1), .in_yx2(ch_yx2), .in_yv2(ch_yv2),
    .out_valid(dec_valid), .out_x1(dec_x1), .out_x2(dec_x2),
    .out_l1(l1), .out_l2(l2),
    .done(dec_done), .passes(dec_passes), .flips(dec_flips));

  parity_decoder #(.M(M), .DATA_LEN(DATA_LEN), .LW(LW)) u_pdec1 (
    .clk, .rst_n, .in_valid(dec_valid), .in_bit(dec_x1), .in_l(l1),
    .out_valid(rx_valid), .out_data(rx_data1), .out_len(rx_len), .out_fixed(rx_fixed[0]));

  parity_decoder #(.M(M), .DATA_LEN(DATA_LEN), .LW(LW)) u_pdec2 (
    .clk, .rst_n, .in_valid(dec_valid), .in_bit(dec_x2), .in_l(l2),
    .out_valid(pd2_valid), .out_data(rx_data2), .out_len(pd2_len), .out_fixed(rx_fixed[1]));

  a_pdec_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (rx_valid == pd2_valid) && (!rx_valid || rx_len == pd2_len));

endmodule
