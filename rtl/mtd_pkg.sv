// mtd_pkg -- constants and types shared by the multi-stage threshold decoder
// (MTD-DR) for rate-2/4 self-orthogonal convolutional codes of type 2.
//
// The default code is the short type-2 code with memory K ~ 500 and J = 5
// taps per generator polynomial.  A codeword carries N = 2100 information bits,
// split over two information streams of M = N/2 = 1050 bits each, and is
// terminated by tail-biting.  The tap exponents are those of the published
// short code; the soft-sample width YW is this design's own choice.
//
// A decoding run is described by a schedule (sched_t): up to `rounds`
// feedback rounds, each running component decoder A for up to iter_a passes
// and then component decoder B for up to iter_b passes.  This covers plain
// hard MTD-DR, soft MTD (SMTD), weighted bit flipping MTD (WBF) and the two
// combined soft decoders (CMTD without and with feedback).
package mtd_pkg;

  localparam int unsigned M_DEF        = 1050; // information bits per stream
  localparam int unsigned J_DEF        = 5;    // taps per generator polynomial
  localparam int unsigned YW_DEF       = 6;    // signed soft-sample width
  localparam int unsigned DATA_LEN_DEF = 50;   // data bits per parity sub-block

  typedef int unsigned taps_t [J_DEF];

  // Generator polynomials, listed as their exponents (K ~ 500 code).
  localparam taps_t G11_DEF = '{0,   51,  198, 251, 465};
  localparam taps_t G12_DEF = '{23,  187, 247, 370, 371};
  localparam taps_t G21_DEF = '{40,  76,  176, 200, 259};
  localparam taps_t G22_DEF = '{161, 230, 281, 328, 483};

  // Decision rule of one decoding pass.
  typedef enum logic [1:0] {
    ALG_HARD = 2'd0,  // checksum = syndromes + DR bit, flip when above T
    ALG_SOFT = 2'd1,  // SMTD: weights are received parity magnitudes
    ALG_WBF  = 2'd2   // WBF: weights are the minimum magnitude per syndrome
  } alg_e;

  typedef struct packed {
    alg_e       alg_a;   // component decoder A
    logic [5:0] iter_a;  // its maximum passes per round (0 skips it)
    alg_e       alg_b;   // component decoder B
    logic [5:0] iter_b;  // its maximum passes per round (0 skips it)
    logic [4:0] rounds;  // maximum feedback rounds (0 behaves as 1)
  } sched_t;

  localparam sched_t SCHED_HARD_MTD_DR = '{ALG_HARD, 6'd30, ALG_HARD, 6'd0,  5'd1};
  localparam sched_t SCHED_SMTD        = '{ALG_SOFT, 6'd30, ALG_SOFT, 6'd0,  5'd1};
  localparam sched_t SCHED_WBF         = '{ALG_WBF,  6'd30, ALG_WBF,  6'd0,  5'd1};
  localparam sched_t SCHED_CMTD_NFB    = '{ALG_WBF,  6'd30, ALG_SOFT, 6'd30, 5'd1};
  localparam sched_t SCHED_CMTD_FEED   = '{ALG_WBF,  6'd2,  ALG_SOFT, 6'd2,  5'd10};

  typedef enum logic [1:0] {
    ST_LOAD   = 2'd0,  // accepting received samples, one position per cycle
    ST_INIT   = 2'd1,  // one cycle: syndromes and WBF weights, DR cleared
    ST_DECODE = 2'd2,  // decoding passes, one information position per cycle
    ST_OUTPUT = 2'd3   // emitting decoded bits and checksums
  } dec_state_e;

endpackage
