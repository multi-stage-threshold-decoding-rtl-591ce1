// tb_parity_decoder -- streams of M positions framed as by the parity
// encoder, with a random checksum per bit.  Sub-blocks are sent clean, with
// one error on the least reliable bit (must be repaired), or with one error
// elsewhere (the least reliable bit gets inverted instead, as the rule
// says).  Data, length and the "fixed" flag of every sub-block are checked,
// including the short last sub-block of each stream.
module tb_parity_decoder;
  localparam int M = 1050, DL = 50;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_bit = 0;
  logic signed [9:0] in_l = 0;
  logic out_valid, out_fixed;
  logic [DL-1:0] out_data;
  logic [5:0] out_len;
  int checks = 0, failures = 0;

  parity_decoder dut (.clk, .rst_n, .in_valid, .in_bit, .in_l, .out_valid, .out_data, .out_len, .out_fixed);

  always #5 clk = ~clk;

  typedef struct { logic [DL-1:0] data; int len; bit fixed; } exp_t;
  exp_t expq [$];
  int nfixed = 0, nsub = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    e = expq.pop_front();
    checks++;
    nsub++;
    if (out_data !== e.data || int'(out_len) != e.len || out_fixed != e.fixed) begin
      failures++;
      $display("FAIL sub-block %0d len %0d/%0d fixed %0b/%0b", nsub, out_len, e.len, out_fixed, e.fixed);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 3; blk++) begin
      int pos;
      pos = 0;
      while (pos < M) begin
        int len, mode, minp, errp;
        bit b [DL+1];
        int l [DL+1];
        bit par;
        exp_t e;
        len = (M - pos >= DL + 1) ? DL + 1 : M - pos;
        par = 0;
        for (int i = 0; i < len - 1; i++) begin b[i] = 1'($urandom); par ^= b[i]; end
        b[len-1] = par;
        for (int i = 0; i < len; i++) l[i] = 20 + $urandom_range(200);
        minp = $urandom_range(len - 1);
        l[minp] = $urandom_range(19) - 5;
        e.data = '0;
        for (int i = 0; i < len - 1; i++) e.data[i] = b[i];
        e.len = len - 1;
        e.fixed = 0;
        mode = $urandom_range(2);
        if (mode == 1) begin
          b[minp] ^= 1'b1;                  // repairable error
          e.fixed = 1;
        end else if (mode == 2) begin
          errp = (minp + 1 + $urandom_range(len - 2)) % len;
          b[errp] ^= 1'b1;                  // error on a reliable bit
          e.fixed = 1;
          for (int i = 0; i < len - 1; i++) e.data[i] = b[i];
          if (minp < len - 1) e.data[minp] ^= 1'b1;
        end
        expq.push_back(e);
        for (int i = 0; i < len; i++) begin
          @(negedge clk);
          while ($urandom_range(4) == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1; in_bit = b[i]; in_l = 10'(l[i]);
        end
        pos += len;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (nsub != 3 * 21 || expq.size() != 0) begin failures++; $display("FAIL %0d sub-blocks", nsub); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
