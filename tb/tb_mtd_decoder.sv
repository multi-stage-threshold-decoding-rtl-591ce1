// tb_mtd_decoder -- end-to-end checks of the iterative decoder against the
// bit-exact reference model in tb_ref_pkg.  Random codewords go through a
// BPSK/Gaussian channel with 6-bit samples and are decoded with each
// schedule (hard MTD-DR, SMTD, WBF, CMTD without and with feedback).  For
// every block the decided bits, the per-bit checksums, the number of passes
// and of flips must equal the model's, and the latency from the last input
// to the first output must be 1 + passes*M cycles.  A noiseless block and a
// block with a few isolated hard errors must decode to the sent word.
module tb_mtd_decoder;
  import mtd_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  sched_t sched;
  logic in_valid = 0, in_ready;
  samp_t in_yx1, in_yv1, in_yx2, in_yv2;
  logic out_valid, out_x1, out_x2, done;
  logic signed [9:0] out_l1, out_l2;
  logic [11:0] passes;
  logic [15:0] flips;
  int checks = 0, failures = 0;

  mtd_decoder dut (.clk, .rst_n, .sched, .in_valid, .in_ready, .in_yx1, .in_yv1, .in_yx2, .in_yv2,
                   .out_valid, .out_x1, .out_x2, .out_l1, .out_l2, .done, .passes, .flips);

  always #5 clk = ~clk;

  samp_t yx1 [M];
  samp_t yv1 [M];
  samp_t yx2 [M];
  samp_t yv2 [M];

  task automatic make_block(input vec_t x1, input vec_t x2, input real amp, input real sigma);
    vec_t v1, v2;
    encode(x1, x2, v1, v2);
    for (int i = 0; i < M; i++) begin
      yx1[i] = channel(x1[i], amp, sigma);
      yv1[i] = channel(v1[i], amp, sigma);
      yx2[i] = channel(x2[i], amp, sigma);
      yv2[i] = channel(v2[i], amp, sigma);
    end
  endtask

  task automatic decode_check(input sched_t sc, input string name, input vec_t sent1, input vec_t sent2,
                              input bit must_be_clean);
    vec_t e1, e2, g1, g2;
    iarr_t el1, el2;
    int ep, ef, lat, nbad_l, raw, res;
    ref_decode(yx1, yv1, yx2, yv2, int'(sc.alg_a), int'(sc.iter_a), int'(sc.alg_b), int'(sc.iter_b),
               int'(sc.rounds), e1, e2, ep, ef, el1, el2);
    sched = sc;
    for (int i = 0; i < M; i++) begin
      in_valid = ($urandom_range(4) != 0);
      while (!in_valid) begin @(posedge clk); #1; in_valid = ($urandom_range(4) != 0); end
      in_yx1 = yx1[i]; in_yv1 = yv1[i]; in_yx2 = yx2[i]; in_yv2 = yv2[i];
      @(posedge clk); #1;
    end
    in_valid = 0;
    lat = 0;
    while (!out_valid) begin @(posedge clk); #1; lat++; end
    nbad_l = 0;
    for (int i = 0; i < M; i++) begin
      g1[i] = out_x1; g2[i] = out_x2;
      if (int'(out_l1) != el1[i] || int'(out_l2) != el2[i]) nbad_l++;
      if (i == M - 1 && !done) begin failures++; $display("FAIL %s: no done", name); end
      @(posedge clk); #1;
    end
    checks++;
    if (g1 !== e1 || g2 !== e2) begin failures++; $display("FAIL %s: decisions differ from model", name); end
    checks++;
    if (nbad_l != 0) begin failures++; $display("FAIL %s: %0d checksums differ", name, nbad_l); end
    checks++;
    if (int'(passes) != ep || int'(flips) != ef) begin
      failures++; $display("FAIL %s: passes %0d/%0d flips %0d/%0d", name, passes, ep, flips, ef);
    end
    checks++;
    if (lat != 1 + ep * M) begin failures++; $display("FAIL %s: latency %0d, expected %0d", name, lat, 1 + ep * M); end
    raw = 0; res = 0;
    for (int i = 0; i < M; i++) begin
      raw += int'((yx1[i] < 0) != sent1[i]) + int'((yx2[i] < 0) != sent2[i]);
      res += int'(g1[i] != sent1[i]) + int'(g2[i] != sent2[i]);
    end
    if (must_be_clean) begin
      checks++;
      if (res != 0) begin failures++; $display("FAIL %s: %0d residual errors", name, res); end
    end
    $display("%-18s passes=%0d flips=%0d raw_info_errors=%0d residual=%0d", name, ep, ef, raw, res);
  endtask

  initial begin
    vec_t x1, x2;
    sched = SCHED_HARD_MTD_DR;
    repeat (3) @(posedge clk);
    rst_n = 1; #1;

    x1 = rand_vec(); x2 = rand_vec();
    make_block(x1, x2, 8.0, 0.0);
    decode_check(SCHED_HARD_MTD_DR, "noiseless hard", x1, x2, 1);

    // isolated hard errors on information and parity samples
    for (int q = 0; q < 8; q++) begin
      int p;
      p = $urandom_range(M - 1);
      yx1[p] = -yx1[p];
      p = $urandom_range(M - 1);
      yx2[p] = -yx2[p];
      p = $urandom_range(M - 1);
      yv1[p] = -yv1[p];
    end
    decode_check(SCHED_HARD_MTD_DR, "isolated errors", x1, x2, 1);

    for (int n = 0; n < 2; n++) begin
      real sg;
      sg = (n == 0) ? 3.9 : 5.0;
      x1 = rand_vec(); x2 = rand_vec();
      make_block(x1, x2, 8.0, sg);
      decode_check(SCHED_HARD_MTD_DR, "hard mtd-dr", x1, x2, 0);
      decode_check(SCHED_SMTD,        "smtd", x1, x2, 0);
      decode_check(SCHED_WBF,         "wbf", x1, x2, 0);
      decode_check(SCHED_CMTD_NFB,    "cmtd nfb", x1, x2, 0);
      decode_check(SCHED_CMTD_FEED,   "cmtd feed", x1, x2, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
