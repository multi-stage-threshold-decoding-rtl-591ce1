// tb_parity_encoder -- random data with random valid and ready gaps.  The
// output stream of each codeword stream (M positions) must hold the data
// bits in order with an even-parity bit after every 50 data bits and at the
// last position, 1029 data bits per block, and the input must be held off
// exactly in the parity cycles.
module tb_parity_encoder;
  localparam int M = 1050, DL = 50;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_bit = 0, out_valid, out_ready = 0, out_bit;
  int checks = 0, failures = 0;

  parity_encoder dut (.clk, .rst_n, .in_valid, .in_ready, .in_bit, .out_valid, .out_ready, .out_bit);

  always #5 clk = ~clk;

  bit sent [$];     // data bits accepted, in order
  int pos = 0, sub = 0, data_in_block = 0, blocks = 0;
  bit par = 0;

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) sent.push_back(in_bit);
    if (out_valid && out_ready) begin
      bit is_par;
      is_par = (sub == DL) || (pos == M - 1);
      checks++;
      if (is_par) begin
        if (out_bit != par || in_ready) begin failures++; $display("FAIL parity at %0d", pos); end
        sub = 0; par = 0;
      end else begin
        bit exp;
        exp = sent.pop_front();
        if (out_bit != exp) begin failures++; $display("FAIL data at %0d", pos); end
        par ^= exp; sub++; data_in_block++;
      end
      if (pos == M - 1) begin
        checks++;
        if (data_in_block != M - (M + DL) / (DL + 1)) begin failures++; $display("FAIL data count %0d", data_in_block); end
        data_in_block = 0; blocks++; pos = 0;
      end else pos++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (blocks < 3) begin
      @(negedge clk);
      if (!in_valid || in_ready) begin
        in_valid = ($urandom_range(3) != 0);
        in_bit = 1'($urandom);
      end
      out_ready = ($urandom_range(4) != 0);
    end
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
