// tb_syndrome_former -- a valid codeword must give all-zero syndromes; a
// single information error at position j must light exactly the J checking
// syndromes of that bit in each stream; random words are compared with the
// reference encoder plus the received parity.
module tb_syndrome_former;
  import tb_ref_pkg::*;

  vec_t xh1, xh2, vh1, vh2, s1, s2, p1, p2;
  int checks = 0, failures = 0;

  syndrome_former dut (.xh1, .xh2, .vh1, .vh2, .s1, .s2);

  initial begin
    for (int n = 0; n < 10; n++) begin
      xh1 = rand_vec(); xh2 = rand_vec();
      encode(xh1, xh2, vh1, vh2);
      #1; checks++;
      if (s1 !== '0 || s2 !== '0) begin failures++; $display("FAIL codeword"); end
      // one error in stream 2 at a random position
      begin
        int j; vec_t m1, m2;
        j = $urandom_range(M - 1);
        xh2[j] ^= 1'b1;
        m1 = '0; m2 = '0;
        for (int k = 0; k < J; k++) begin m1[(j + R21[k]) % M] = 1'b1; m2[(j + R22[k]) % M] = 1'b1; end
        #1; checks++;
        if (s1 !== m1 || s2 !== m2) begin failures++; $display("FAIL single error %0d", j); end
      end
    end
    for (int n = 0; n < 20; n++) begin
      xh1 = rand_vec(); xh2 = rand_vec(); vh1 = rand_vec(); vh2 = rand_vec();
      encode(xh1, xh2, p1, p2);
      #1; checks++;
      if (s1 !== (p1 ^ vh1) || s2 !== (p2 ^ vh2)) begin failures++; $display("FAIL random"); end
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
