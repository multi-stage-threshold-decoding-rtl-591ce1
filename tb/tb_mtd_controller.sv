// tb_mtd_controller -- drives the sequencer with scripted "bit flipped"
// patterns and checks, against a loop model of the stopping rules, the
// number of passes, the decision rule of every pass, the state timing
// (M load cycles, one set-up cycle, M cycles per pass, M output cycles) and
// the done pulse.  Scenarios cover early stop, the pass limit, feedback
// rounds of the combined decoder and skipped components.
module tb_mtd_controller;
  import mtd_pkg::*;

  localparam int M = 1050;

  logic clk = 0, rst_n = 0;
  sched_t sched;
  logic in_valid = 0, flip_any = 0;
  dec_state_e state;
  logic in_ready, load_en, init_en, dec_en, out_en, done;
  alg_e alg;
  logic [11:0] passes;
  int checks = 0, failures = 0;

  mtd_controller dut (.clk, .rst_n, .sched, .in_valid, .flip_any, .state, .in_ready,
                      .load_en, .init_en, .dec_en, .out_en, .alg, .passes, .done);

  always #5 clk = ~clk;

  bit flag [64];          // pass p (0-based) flips at least one bit
  alg_e exp_alg [64];
  int exp_passes;

  function automatic void model(input sched_t sc);
    int p, r, rounds;
    bit ca, cb;
    p = 0;
    rounds = (sc.rounds == 0) ? 1 : int'(sc.rounds);
    for (r = 0; r < rounds; r++) begin
      ca = 1; cb = 1;
      if (sc.iter_a != 0) begin
        ca = 0;
        for (int i = 0; i < int'(sc.iter_a); i++) begin
          exp_alg[p] = sc.alg_a; p++;
          if (!flag[p-1]) begin ca = 1; break; end
        end
      end
      if (sc.iter_b != 0) begin
        cb = 0;
        for (int i = 0; i < int'(sc.iter_b); i++) begin
          exp_alg[p] = sc.alg_b; p++;
          if (!flag[p-1]) begin cb = 1; break; end
        end
      end
      if (ca && cb) break;
      if (sc.iter_a == 0 && sc.iter_b == 0) break;
    end
    exp_passes = p;
  endfunction

  task automatic run(input sched_t sc, input string name);
    int cyc, npass, dec_cycles, out_cycles, flip_pos;
    bit alg_bad;
    model(sc);
    sched = sc;
    // load, with a few idle cycles in between
    for (int i = 0; i < M; i++) begin
      in_valid = ($urandom_range(3) != 0);
      while (!in_valid) begin
        @(posedge clk); #1;
        in_valid = ($urandom_range(3) != 0);
      end
      checks += (i == 0); if (i == 0 && !in_ready) failures++;
      @(posedge clk); #1;
    end
    in_valid = 0;
    checks++;
    if (!init_en) begin failures++; $display("FAIL %s: no set-up cycle after M loads", name); end
    @(posedge clk); #1;
    npass = 0; dec_cycles = 0; out_cycles = 0; alg_bad = 0;
    flip_pos = $urandom_range(M - 1);
    cyc = 0;
    while (!out_en && cyc < 70 * M) begin
      checks += 0;
      if (!dec_en) break;
      if (dec_cycles % M == 0) begin
        if (npass < 64 && alg != exp_alg[npass]) alg_bad = 1;
        flip_pos = $urandom_range(M - 1);
      end
      flip_any = (npass < 64) && flag[npass] && ((dec_cycles % M) == flip_pos);
      @(posedge clk); #1;
      dec_cycles++;
      if (dec_cycles % M == 0) npass++;
      cyc++;
    end
    flip_any = 0;
    checks++;
    if (npass != exp_passes || dec_cycles != exp_passes * M) begin
      failures++;
      $display("FAIL %s: passes %0d (%0d cycles), expected %0d", name, npass, dec_cycles, exp_passes);
    end
    checks++;
    if (int'(passes) != exp_passes) begin failures++; $display("FAIL %s: passes output %0d", name, passes); end
    checks++;
    if (alg_bad) begin failures++; $display("FAIL %s: wrong decision rule in a pass", name); end
    while (out_en) begin
      out_cycles++;
      if (done && out_cycles != M) begin failures++; $display("FAIL %s: done early", name); end
      @(posedge clk); #1;
    end
    checks++;
    if (out_cycles != M || state != ST_LOAD) begin
      failures++; $display("FAIL %s: %0d output cycles", name, out_cycles);
    end
    $display("%s: %0d passes", name, npass);
  endtask

  initial begin
    sched = SCHED_HARD_MTD_DR;
    repeat (3) @(posedge clk);
    rst_n = 1; #1;

    // hard MTD-DR, flips in the first three passes: stops after pass 4
    foreach (flag[i]) flag[i] = (i < 3);
    run(SCHED_HARD_MTD_DR, "hard early stop");
    // hard with a small pass limit, always flipping: stops at the limit
    foreach (flag[i]) flag[i] = 1;
    run('{ALG_HARD, 6'd5, ALG_HARD, 6'd0, 5'd1}, "hard pass limit");
    // CMTD with feedback, always flipping: 10 rounds of 2 + 2 passes
    run(SCHED_CMTD_FEED, "cmtd feed limit");
    // CMTD with feedback, flips in the first five passes: 7 passes
    foreach (flag[i]) flag[i] = (i < 5);
    run(SCHED_CMTD_FEED, "cmtd feed converge");
    // CMTD without feedback
    foreach (flag[i]) flag[i] = (i < 4 || i == 5);
    run(SCHED_CMTD_NFB, "cmtd nfb");
    // component A skipped
    foreach (flag[i]) flag[i] = (i < 2);
    run('{ALG_WBF, 6'd0, ALG_SOFT, 6'd4, 5'd3}, "skip A");
    // nothing to do: straight to output
    run('{ALG_WBF, 6'd0, ALG_SOFT, 6'd0, 5'd3}, "no passes");
    // clean block in SMTD: one pass
    foreach (flag[i]) flag[i] = 0;
    run(SCHED_SMTD, "smtd clean");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
