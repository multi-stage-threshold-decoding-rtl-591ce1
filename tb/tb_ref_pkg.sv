// tb_ref_pkg -- reference models shared by the testbenches.
//
// Written independently of the RTL: the encoder scatters each information
// bit onto the parity positions it reaches (the RTL gathers), the decoder
// model walks the block with modular indices instead of rotating registers,
// and the code taps are restated here from the code definition
// (K ~ 500, J = 5 short code) rather than taken from the RTL package.
// Sizes are the design defaults: M = 1050 bits per stream, 6-bit samples.
package tb_ref_pkg;

  localparam int M  = 1050;
  localparam int J  = 5;
  localparam int T  = 5;      // floor((5 + 5 + 1) / 2)
  localparam int MAXMAG = 31;

  typedef int taps_t [J];
  localparam taps_t R11 = '{0,   51,  198, 251, 465};
  localparam taps_t R12 = '{23,  187, 247, 370, 371};
  localparam taps_t R21 = '{40,  76,  176, 200, 259};
  localparam taps_t R22 = '{161, 230, 281, 328, 483};

  typedef logic [M-1:0] vec_t;
  typedef logic signed [5:0] samp_t;
  typedef int iarr_t [M];

  function automatic vec_t rand_vec();
    vec_t v;
    for (int i = 0; i < M; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  // Tail-biting encoder, scatter form.
  function automatic void encode(input vec_t x1, input vec_t x2, output vec_t v1, output vec_t v2);
    v1 = '0;
    v2 = '0;
    for (int j = 0; j < M; j++) begin
      for (int k = 0; k < J; k++) begin
        if (x1[j]) begin
          v1[(j + R11[k]) % M] ^= 1'b1;
          v2[(j + R12[k]) % M] ^= 1'b1;
        end
        if (x2[j]) begin
          v1[(j + R21[k]) % M] ^= 1'b1;
          v2[(j + R22[k]) % M] ^= 1'b1;
        end
      end
    end
  endfunction

  // Approximately standard normal: sum of twelve uniforms minus six.
  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  // BPSK (bit 0 -> +amp) plus Gaussian noise, rounded and saturated to 6 bits.
  function automatic samp_t channel(input logic b, input real amp, input real sigma);
    real y;
    int q;
    y = (b ? -amp : amp) + sigma * gauss();
    q = (y >= 0.0) ? int'(y + 0.5) : -int'(-y + 0.5);
    if (q > 31) q = 31;
    if (q < -32) q = -32;
    return samp_t'(q);
  endfunction

  function automatic int magn(input samp_t y);
    int a;
    a = (y < 0) ? -int'(y) : int'(y);
    return (a > MAXMAG) ? MAXMAG : a;
  endfunction

  // Decoder state of the reference model.
  typedef struct {
    vec_t  x1, x2, d1, d2, s1, s2;
    iarr_t ax1, ax2, av1, av2, w1, w2;
  } dstate_t;

  // alg: 0 hard, 1 soft (SMTD), 2 WBF
  function automatic int checksum(input dstate_t st, input int strm, input int j, input int alg);
    int l;
    int pa, pb;
    l = 0;
    for (int k = 0; k < J; k++) begin
      pa = (j + (strm == 1 ? R11[k] : R21[k])) % M;   // position in S1
      pb = (j + (strm == 1 ? R12[k] : R22[k])) % M;   // position in S2
      if (alg == 0) begin
        l += int'(st.s1[pa]) + int'(st.s2[pb]);
      end else begin
        l += (st.s1[pa] ? -1 : 1) * (alg == 2 ? st.w1[pa] : st.av1[pa]);
        l += (st.s2[pb] ? -1 : 1) * (alg == 2 ? st.w2[pb] : st.av2[pb]);
      end
    end
    if (alg == 0) l += (strm == 1) ? int'(st.d1[j]) : int'(st.d2[j]);
    else if (strm == 1) l += (st.d1[j] ? -1 : 1) * st.ax1[j];
    else                l += (st.d2[j] ? -1 : 1) * st.ax2[j];
    return l;
  endfunction

  function automatic int one_pass(ref dstate_t st, input int alg);
    int nf, l;
    bit f;
    nf = 0;
    for (int j = 0; j < M; j++) begin
      for (int strm = 1; strm <= 2; strm++) begin
        l = checksum(st, strm, j, alg);
        f = (alg == 0) ? (l > T) : (l < 0);
        if (f) begin
          nf++;
          for (int k = 0; k < J; k++) begin
            if (strm == 1) begin
              st.s1[(j + R11[k]) % M] ^= 1'b1;
              st.s2[(j + R12[k]) % M] ^= 1'b1;
            end else begin
              st.s1[(j + R21[k]) % M] ^= 1'b1;
              st.s2[(j + R22[k]) % M] ^= 1'b1;
            end
          end
          if (strm == 1) begin st.x1[j] ^= 1'b1; st.d1[j] ^= 1'b1; end
          else           begin st.x2[j] ^= 1'b1; st.d2[j] ^= 1'b1; end
        end
      end
    end
    return nf;
  endfunction

  // Full reference decode.  Schedule: up to `rounds` rounds of component A
  // (alg_a, up to it_a passes) then B (alg_b, up to it_b passes); a component
  // stops after a pass without flips; decoding stops when both components
  // stopped that way in one round.
  function automatic void ref_decode(
      input samp_t yx1 [M], input samp_t yv1 [M], input samp_t yx2 [M], input samp_t yv2 [M],
      input int alg_a, input int it_a, input int alg_b, input int it_b, input int rounds,
      output vec_t x1o, output vec_t x2o, output int passes, output int flips,
      output iarr_t l1o, output iarr_t l2o);
    dstate_t st;
    vec_t vh1, vh2, p1, p2;
    bit ca, cb;
    int nf;
    for (int i = 0; i < M; i++) begin
      st.x1[i] = yx1[i] < 0;  st.x2[i] = yx2[i] < 0;
      vh1[i]   = yv1[i] < 0;  vh2[i]   = yv2[i] < 0;
      st.ax1[i] = magn(yx1[i]); st.ax2[i] = magn(yx2[i]);
      st.av1[i] = magn(yv1[i]); st.av2[i] = magn(yv2[i]);
    end
    encode(st.x1, st.x2, p1, p2);
    st.s1 = p1 ^ vh1;
    st.s2 = p2 ^ vh2;
    st.d1 = '0;
    st.d2 = '0;
    st.w1 = st.av1;
    st.w2 = st.av2;
    for (int j = 0; j < M; j++)
      for (int k = 0; k < J; k++) begin
        if (st.ax1[j] < st.w1[(j + R11[k]) % M]) st.w1[(j + R11[k]) % M] = st.ax1[j];
        if (st.ax2[j] < st.w1[(j + R21[k]) % M]) st.w1[(j + R21[k]) % M] = st.ax2[j];
        if (st.ax1[j] < st.w2[(j + R12[k]) % M]) st.w2[(j + R12[k]) % M] = st.ax1[j];
        if (st.ax2[j] < st.w2[(j + R22[k]) % M]) st.w2[(j + R22[k]) % M] = st.ax2[j];
      end
    passes = 0;
    flips = 0;
    if (rounds < 1) rounds = 1;
    for (int r = 0; r < rounds; r++) begin
      ca = 1; cb = 1;
      if (it_a > 0) begin
        ca = 0;
        for (int it = 0; it < it_a; it++) begin
          nf = one_pass(st, alg_a); passes++; flips += nf;
          if (nf == 0) begin ca = 1; break; end
        end
      end
      if (it_b > 0) begin
        cb = 0;
        for (int it = 0; it < it_b; it++) begin
          nf = one_pass(st, alg_b); passes++; flips += nf;
          if (nf == 0) begin cb = 1; break; end
        end
      end
      if (ca && cb) break;
      if (it_a == 0 && it_b == 0) break;
    end
    x1o = st.x1;
    x2o = st.x2;
    for (int j = 0; j < M; j++) begin
      l1o[j] = checksum(st, 1, j, 1);
      l2o[j] = checksum(st, 2, j, 1);
    end
  endfunction

endpackage
