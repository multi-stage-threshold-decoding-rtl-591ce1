// tb_socc_tx_encoder -- blocks of M random bit pairs go in with random
// gaps; the M emitted positions (with random back-pressure) must carry the
// same information bits and the tail-biting parities of the reference
// encoder, one block after the other.
module tb_socc_tx_encoder;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_x1 = 0, in_x2 = 0;
  logic out_valid, out_ready = 0, out_x1, out_v1, out_x2, out_v2;
  int checks = 0, failures = 0;

  socc_tx_encoder dut (.clk, .rst_n, .in_valid, .in_ready, .in_x1, .in_x2,
                       .out_valid, .out_ready, .out_x1, .out_v1, .out_x2, .out_v2);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 3; blk++) begin
      vec_t x1, x2, v1, v2, g1, g2, h1, h2;
      int bad;
      x1 = rand_vec(); x2 = rand_vec();
      encode(x1, x2, v1, v2);
      for (int i = 0; i < M; i++) begin
        @(negedge clk);
        while ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_x1 = x1[i]; in_x2 = x2[i];
        while (!in_ready) @(negedge clk);
      end
      @(negedge clk) in_valid = 0;
      checks++;
      if (in_ready) begin failures++; $display("FAIL accepts beyond M"); end
      for (int i = 0; i < M; i++) begin
        while (!(out_valid && out_ready)) begin
          @(negedge clk);
          out_ready = ($urandom_range(3) != 0);
        end
        g1[i] = out_x1; h1[i] = out_v1; g2[i] = out_x2; h2[i] = out_v2;
        @(negedge clk);
        out_ready = 0;
      end
      @(negedge clk) out_ready = 0;
      bad = 0;
      checks++;
      if (g1 !== x1 || g2 !== x2) begin failures++; $display("FAIL information bits, block %0d", blk); end
      checks++;
      if (h1 !== v1 || h2 !== v2) begin failures++; $display("FAIL parity bits, block %0d", blk); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
