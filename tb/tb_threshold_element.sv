// tb_threshold_element -- random and boundary checks of the three decision
// rules.  Hard: flip only when the count of unsatisfied checks plus the DR
// bit exceeds T = 5 (so 5 does not flip and 6 does).  Soft and WBF: the
// signed weighted checksum, flip when negative.
module tb_threshold_element;
  import mtd_pkg::*;

  localparam int NCHK = 10;
  alg_e alg;
  logic [NCHK-1:0] s;
  logic [4:0] w_par [NCHK];
  logic [4:0] w_wbf [NCHK];
  logic d;
  logic [4:0] w_d;
  logic signed [9:0] l;
  logic flip;
  int checks = 0, failures = 0;

  threshold_element dut (.alg, .s, .w_par, .w_wbf, .d, .w_d, .l, .flip);

  task automatic check();
    int e;
    bit ef;
    #1;
    e = 0;
    if (alg == ALG_HARD) begin
      e = $countones(s) + int'(d);
      ef = e > 5;
    end else begin
      for (int k = 0; k < NCHK; k++)
        e += (s[k] ? -1 : 1) * int'(alg == ALG_WBF ? w_wbf[k] : w_par[k]);
      e += (d ? -1 : 1) * int'(w_d);
      ef = e < 0;
    end
    checks++;
    if (int'(l) != e || flip != ef) begin
      failures++;
      if (failures < 10) $display("FAIL alg=%0d l=%0d exp=%0d flip=%0b", alg, l, e, flip);
    end
  endtask

  initial begin
    // hard-rule boundary: exactly T and T+1
    alg = ALG_HARD;
    for (int k = 0; k < NCHK; k++) begin w_par[k] = '0; w_wbf[k] = '0; end
    w_d = '0;
    s = 10'b00000_11111; d = 1'b0; check();          // 5: no flip
    checks++; if (flip) failures++;
    s = 10'b00000_11111; d = 1'b1; check();          // 6: flip
    checks++; if (!flip) failures++;
    s = '1; d = 1'b1; check();                       // 11
    for (int n = 0; n < 3000; n++) begin
      alg = alg_e'(n % 3);
      s = 10'($urandom);
      d = 1'($urandom);
      w_d = 5'($urandom);
      for (int k = 0; k < NCHK; k++) begin w_par[k] = 5'($urandom); w_wbf[k] = 5'($urandom); end
      check();
    end
    // extremes of the soft range
    alg = ALG_SOFT; s = '1; d = 1'b1; w_d = 5'd31;
    for (int k = 0; k < NCHK; k++) w_par[k] = 5'd31;
    check();
    s = '0; d = 1'b0; check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
