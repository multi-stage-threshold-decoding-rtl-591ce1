// tb_mtd_codec_top -- whole codec at its default size (M = 1050 bits per
// stream, N = 2100 information bits per codeword, 50-bit parity
// sub-blocks).  Random data is encoded by the transmit side; each codeword
// goes through a BPSK/Gaussian channel model with 6-bit samples into the
// receive side under a chosen schedule, and the delivered data sub-blocks
// are compared with the data sent.  Low-noise blocks must be delivered
// without error.  The testbench counts the mechanisms of the design and
// fails if one never happens: parity insertion, bit flips, early stop (a
// pass without flips), the pass limit, feedback rounds of the combined
// decoder, WBF and soft passes, and repair of a sub-block by the outer
// parity check.
module tb_mtd_codec_top;
  import mtd_pkg::*;
  import tb_ref_pkg::*;

  localparam int NB = 6;          // codewords
  localparam int DL = 50;
  localparam int DPB = 1029;      // data bits per stream per codeword

  logic clk = 0, rst_n = 0;
  logic tx_valid = 0, tx_ready;
  logic [1:0] tx_data = '0;
  logic cw_valid, cw_ready = 0, cw_x1, cw_v1, cw_x2, cw_v2;
  sched_t sched = SCHED_HARD_MTD_DR;
  logic ch_valid = 0, ch_ready;
  samp_t ch_yx1 = '0, ch_yv1 = '0, ch_yx2 = '0, ch_yv2 = '0;
  logic dec_valid, dec_x1, dec_x2, dec_done;
  logic [11:0] dec_passes;
  logic [15:0] dec_flips;
  logic rx_valid;
  logic [DL-1:0] rx_data1, rx_data2;
  logic [5:0] rx_len;
  logic [1:0] rx_fixed;
  int checks = 0, failures = 0;

  mtd_codec_top dut (.*);

  always #5 clk = ~clk;

  // sent data and captured codewords
  bit   d1q [NB][$];
  bit   d2q [NB][$];
  vec_t cx1 [NB];
  vec_t cv1 [NB];
  vec_t cx2 [NB];
  vec_t cv2 [NB];
  int   ncw = 0;

  // mechanism counters
  int n_parity_bits = 0, n_flip_blocks = 0, n_early = 0, n_limit = 0, n_feedback = 0;
  int n_wbf = 0, n_soft = 0, n_fixed = 0;

  initial begin : tx_drive
    int words;
    repeat (3) @(posedge clk);
    words = 0;
    while (words < NB * DPB) begin
      @(negedge clk);
      if (!tx_valid || tx_ready) begin
        tx_valid = ($urandom_range(5) != 0);
        tx_data = 2'($urandom);
      end
      if (tx_valid && tx_ready) begin
        d1q[words / DPB].push_back(tx_data[0]);
        d2q[words / DPB].push_back(tx_data[1]);
        words++;
        // the word is taken at the next rising edge
        @(posedge clk);
        #1 tx_valid = 0;
      end
    end
    tx_valid = 0;
  end

  initial begin : cw_capture
    int pos;
    pos = 0;
    forever begin
      @(negedge clk);
      cw_ready = ($urandom_range(3) != 0);
      if (cw_valid && cw_ready && ncw < NB) begin
        cx1[ncw][pos] = cw_x1; cv1[ncw][pos] = cw_v1;
        cx2[ncw][pos] = cw_x2; cv2[ncw][pos] = cw_v2;
        if (pos == M - 1) begin pos = 0; ncw++; end
        else pos++;
      end
    end
  end

  // parity positions seen on the codeword (information bits 50 after data)
  task automatic count_parity(input int b);
    int sub;
    bit p1, p2;
    int di;
    sub = 0; p1 = 0; p2 = 0; di = 0;
    for (int i = 0; i < M; i++) begin
      if (sub == DL || i == M - 1) begin
        n_parity_bits++;
        checks++;
        if (cx1[b][i] != p1 || cx2[b][i] != p2) begin failures++; $display("FAIL parity bit, codeword %0d pos %0d", b, i); end
        sub = 0; p1 = 0; p2 = 0;
      end else begin
        checks++;
        if (cx1[b][i] != d1q[b][di] || cx2[b][i] != d2q[b][di]) begin
          failures++; if (failures < 10) $display("FAIL data on codeword %0d pos %0d", b, i);
        end
        p1 ^= cx1[b][i]; p2 ^= cx2[b][i]; di++; sub++;
      end
    end
  endtask

  task automatic rx_block(input int b, input sched_t sc, input real sigma, input bit must_be_clean,
                          input string name);
    samp_t y [4][M];
    int k1, k2, err, inner_err, nsub, lim;
    sched = sc;
    for (int i = 0; i < M; i++) begin
      y[0][i] = channel(cx1[b][i], 8.0, sigma);
      y[1][i] = channel(cv1[b][i], 8.0, sigma);
      y[2][i] = channel(cx2[b][i], 8.0, sigma);
      y[3][i] = channel(cv2[b][i], 8.0, sigma);
    end
    fork
      begin
        for (int i = 0; i < M; i++) begin
          @(negedge clk);
          ch_valid = 1;
          ch_yx1 = y[0][i]; ch_yv1 = y[1][i]; ch_yx2 = y[2][i]; ch_yv2 = y[3][i];
          while (!ch_ready) @(negedge clk);
        end
        @(negedge clk) ch_valid = 0;
      end
      begin
        int pos;
        k1 = 0; k2 = 0; err = 0; inner_err = 0; nsub = 0; pos = 0;
        while (nsub < 21) begin
          @(posedge clk); #1;
          if (dec_valid) begin
            inner_err += int'(dec_x1 != cx1[b][pos]) + int'(dec_x2 != cx2[b][pos]);
            pos++;
          end
          if (rx_valid) begin
            nsub++;
            n_fixed += int'(rx_fixed[0]) + int'(rx_fixed[1]);
            for (int i = 0; i < int'(rx_len); i++) begin
              err += int'(rx_data1[i] != d1q[b][k1 + i]) + int'(rx_data2[i] != d2q[b][k2 + i]);
            end
            k1 += int'(rx_len); k2 += int'(rx_len);
          end
        end
      end
    join
    checks++;
    if (k1 != DPB) begin failures++; $display("FAIL %s: %0d data bits delivered", name, k1); end
    if (must_be_clean) begin
      checks++;
      if (err != 0) begin failures++; $display("FAIL %s: %0d data errors", name, err); end
    end
    lim = (sc.rounds == 0 ? 1 : int'(sc.rounds)) * (int'(sc.iter_a) + int'(sc.iter_b));
    if (dec_flips != 0) n_flip_blocks++;
    if (int'(dec_passes) < lim) n_early++;
    if (int'(dec_passes) == lim) n_limit++;
    if (int'(dec_passes) > int'(sc.iter_a) + int'(sc.iter_b)) n_feedback++;
    if (sc.alg_a == ALG_WBF || (sc.alg_b == ALG_WBF && sc.iter_b != 0)) n_wbf++;
    if (sc.alg_a == ALG_SOFT || (sc.alg_b == ALG_SOFT && sc.iter_b != 0)) n_soft++;
    $display("%-22s sigma=%.1f passes=%0d flips=%0d inner_errors=%0d data_errors=%0d",
             name, sigma, dec_passes, dec_flips, inner_err, err);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ncw == NB);
    for (int b = 0; b < NB; b++) count_parity(b);
    rx_block(0, SCHED_HARD_MTD_DR, 0.0, 1, "hard, noiseless");
    rx_block(1, SCHED_HARD_MTD_DR, 3.5, 1, "hard mtd-dr");
    rx_block(2, SCHED_CMTD_FEED,   4.0, 1, "cmtd feed");
    rx_block(3, SCHED_CMTD_NFB,    4.0, 1, "cmtd nfb");
    rx_block(4, SCHED_CMTD_FEED,   6.5, 0, "cmtd feed, heavy noise");
    rx_block(5, '{ALG_SOFT, 6'd3, ALG_SOFT, 6'd0, 5'd1}, 5.5, 0, "smtd 3 passes, heavy");
    checks += 8;
    if (n_parity_bits != NB * 21) begin failures++; $display("FAIL parity insertion count %0d", n_parity_bits); end
    if (n_flip_blocks == 0) begin failures++; $display("FAIL no bit ever flipped"); end
    if (n_early == 0)       begin failures++; $display("FAIL early stop never happened"); end
    if (n_limit == 0)       begin failures++; $display("FAIL pass limit never reached"); end
    if (n_feedback == 0)    begin failures++; $display("FAIL no feedback round"); end
    if (n_wbf == 0)         begin failures++; $display("FAIL no WBF pass"); end
    if (n_soft == 0)        begin failures++; $display("FAIL no soft pass"); end
    if (n_fixed == 0)       begin failures++; $display("FAIL parity decoder never repaired"); end
    $display("mechanisms: parity_bits=%0d flip_blocks=%0d early_stop=%0d pass_limit=%0d feedback=%0d wbf=%0d soft=%0d parity_repairs=%0d",
             n_parity_bits, n_flip_blocks, n_early, n_limit, n_feedback, n_wbf, n_soft, n_fixed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
