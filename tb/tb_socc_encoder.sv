// tb_socc_encoder -- checks the tail-biting type-2 parity generator against
// the scatter-form reference encoder: unit impulses on each stream (the
// parity must show exactly the tap exponents, shifted), impulses that wrap
// around the block end, and random blocks.
module tb_socc_encoder;
  import tb_ref_pkg::*;

  vec_t x1, x2, v1, v2, e1, e2;
  int checks = 0, failures = 0;

  socc_encoder dut (.x1, .x2, .v1, .v2);

  task automatic check(input string what);
    #1;
    encode(x1, x2, e1, e2);
    checks++;
    if (v1 !== e1 || v2 !== e2) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    // impulse at position 0 of stream 1: V1 = G11, V2 = G12 exponents
    x1 = '0; x2 = '0; x1[0] = 1'b1;
    #1;
    checks++;
    for (int k = 0; k < J; k++) if (!v1[R11[k]] || !v2[R12[k]]) begin failures++; break; end
    checks++;
    if ($countones(v1) != J || $countones(v2) != J) failures++;
    // impulses near the end wrap around (tail-biting)
    for (int p = M - 3; p < M; p++) begin
      x1 = '0; x2 = '0; x2[p] = 1'b1; check("wrap stream 2");
      x1 = '0; x2 = '0; x1[p] = 1'b1; check("wrap stream 1");
    end
    for (int n = 0; n < 30; n++) begin
      x1 = rand_vec(); x2 = rand_vec(); check("random");
    end
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
