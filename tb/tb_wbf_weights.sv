// tb_wbf_weights -- each syndrome weight must be the minimum magnitude over
// its parity signal and the 2*J information signals it checks.  The
// reference scatters every information magnitude onto the syndromes the bit
// reaches.
module tb_wbf_weights;
  import tb_ref_pkg::*;

  logic [4:0] ax1 [M];
  logic [4:0] ax2 [M];
  logic [4:0] av1 [M];
  logic [4:0] av2 [M];
  logic [4:0] w1  [M];
  logic [4:0] w2  [M];
  int r1 [M];
  int r2 [M];
  int checks = 0, failures = 0;

  wbf_weights dut (.ax1, .ax2, .av1, .av2, .w1, .w2);

  initial begin
    for (int n = 0; n < 8; n++) begin
      for (int i = 0; i < M; i++) begin
        // mostly large values so that single small ones decide the minimum
        ax1[i] = 5'(n < 4 ? 8 + $urandom_range(23) : $urandom_range(31));
        ax2[i] = 5'(n < 4 ? 8 + $urandom_range(23) : $urandom_range(31));
        av1[i] = 5'(n < 4 ? 8 + $urandom_range(23) : $urandom_range(31));
        av2[i] = 5'(n < 4 ? 8 + $urandom_range(23) : $urandom_range(31));
      end
      if (n < 4) for (int q = 0; q < 20; q++) begin
        ax1[$urandom_range(M - 1)] = 5'($urandom_range(7));
        ax2[$urandom_range(M - 1)] = 5'($urandom_range(7));
      end
      for (int i = 0; i < M; i++) begin r1[i] = av1[i]; r2[i] = av2[i]; end
      for (int j = 0; j < M; j++)
        for (int k = 0; k < J; k++) begin
          if (ax1[j] < r1[(j + R11[k]) % M]) r1[(j + R11[k]) % M] = ax1[j];
          if (ax2[j] < r1[(j + R21[k]) % M]) r1[(j + R21[k]) % M] = ax2[j];
          if (ax1[j] < r2[(j + R12[k]) % M]) r2[(j + R12[k]) % M] = ax1[j];
          if (ax2[j] < r2[(j + R22[k]) % M]) r2[(j + R22[k]) % M] = ax2[j];
        end
      #1;
      for (int i = 0; i < M; i++) begin
        checks++;
        if (int'(w1[i]) != r1[i] || int'(w2[i]) != r2[i]) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d w1=%0d/%0d w2=%0d/%0d", i, w1[i], r1[i], w2[i], r2[i]);
        end
      end
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
