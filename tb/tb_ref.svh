// tb_ref.svh: reference model used by the testbenches, included inside a
// testbench module. Plain integer
// arithmetic over flat arrays, written independently of the RTL: no folding,
// no buffers, just the mathematical layer definitions.
//
// Layouts: feature maps fm[(y*W + x)*C + c]; conv weights
// w[((oc*CIN + ic)*K + ky)*K + kx]; FC weights w[o*IN + i]; thresholds
// th[ch*3 + k]. Activation = number of the 3 thresholds reached (acc >= T).
`ifndef TB_REF_SVH
`define TB_REF_SVH

  typedef int arr_t [];

  function automatic int act3(int acc, const ref arr_t th, input int ch);
    int n = 0;
    for (int k = 0; k < 3; k++) if (acc >= th[ch*3+k]) n++;
    return n;
  endfunction

  // 'same' KxK convolution, stride 1, zero padding, followed by thresholds
  // (raw = 1 returns the accumulators instead)
  function automatic arr_t conv(const ref arr_t fm, input int H, W, CIN, COUT, K,
                                const ref arr_t w, const ref arr_t th, input bit raw = 0);
    arr_t o = new [H*W*COUT];
    int pad = K/2;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        for (int oc = 0; oc < COUT; oc++) begin
          int acc = 0;
          for (int ky = 0; ky < K; ky++)
            for (int kx = 0; kx < K; kx++) begin
              int iy = y + ky - pad, ix = x + kx - pad;
              if (iy >= 0 && iy < H && ix >= 0 && ix < W)
                for (int ic = 0; ic < CIN; ic++)
                  acc += fm[(iy*W+ix)*CIN+ic] * w[((oc*CIN+ic)*K+ky)*K+kx];
            end
          o[(y*W+x)*COUT+oc] = raw ? acc : act3(acc, th, oc);
        end
    return o;
  endfunction

  // PxP max-pool, stride P, remainder rows/columns dropped
  function automatic arr_t pool(const ref arr_t fm, input int H, W, C, P);
    arr_t o = new [(H/P)*(W/P)*C];
    for (int y = 0; y < H/P; y++)
      for (int x = 0; x < W/P; x++)
        for (int c = 0; c < C; c++) begin
          int m = 0;
          for (int dy = 0; dy < P; dy++)
            for (int dx = 0; dx < P; dx++)
              if (fm[((y*P+dy)*W + x*P+dx)*C + c] > m) m = fm[((y*P+dy)*W + x*P+dx)*C + c];
          o[(y*(W/P)+x)*C+c] = m;
        end
    return o;
  endfunction

  // fully connected; has_act = 0 returns raw sums
  function automatic arr_t fc(const ref arr_t v, input int IN, OUT,
                              const ref arr_t w, const ref arr_t th, input bit has_act);
    arr_t o = new [OUT];
    for (int j = 0; j < OUT; j++) begin
      int acc = 0;
      for (int i = 0; i < IN; i++) acc += v[i] * w[j*IN+i];
      o[j] = has_act ? act3(acc, th, j) : acc;
    end
    return o;
  endfunction

  // random weights: ternary (-1..1) or full 2-bit (-2..1)
  function automatic arr_t rand_w(int n, bit ternary);
    arr_t w = new [n];
    foreach (w[i]) w[i] = ternary ? int'($urandom_range(0, 2)) - 1 : int'($urandom_range(0, 3)) - 2;
    return w;
  endfunction

  // random ascending thresholds around 'centre' with step up to 'spread'
  function automatic arr_t rand_th(int ch, int centre, int spread);
    arr_t t = new [ch*3];
    for (int c = 0; c < ch; c++) begin
      t[c*3]   = centre - int'($urandom_range(0, spread));
      t[c*3+1] = t[c*3]   + int'($urandom_range(0, spread));
      t[c*3+2] = t[c*3+1] + int'($urandom_range(0, spread));
    end
    return t;
  endfunction

  // thresholds at the 25/50/75 % points of each channel's accumulators, taken
  // from raw values laid out as [n*C + c]; gives all four activation levels
  function automatic arr_t quantile_th(const ref arr_t raw, input int C);
    arr_t t = new [C*3];
    int n = raw.size() / C;
    for (int c = 0; c < C; c++) begin
      int v [$];
      for (int i = 0; i < n; i++) v.push_back(raw[i*C+c]);
      v.sort();
      for (int k = 0; k < 3; k++) t[c*3+k] = v[(k+1)*n/4] + ((k == 2 && v[(k+1)*n/4] == v[n/2]) ? 1 : 0);
    end
    return t;
  endfunction

  // weight-RAM word of a conv layer at fold step 'addr'
  // (addr = (g*K*K + ky*K + kx)*SG + sg, bits (p*SIMD+l)*2)
  function automatic logic [63:0] conv_word(const ref arr_t w, input int CIN, PE, SIMD, K, addr);
    logic [63:0] d = '0;
    int SG = CIN/SIMD;
    int sg = addr % SG, tap = (addr / SG) % (K*K), g = addr / (SG*K*K);
    for (int p = 0; p < PE; p++)
      for (int l = 0; l < SIMD; l++)
        d[(p*SIMD+l)*2 +: 2] = 2'(w[(((g*PE+p)*CIN + sg*SIMD+l)*K + tap/K)*K + tap%K]);
    return d;
  endfunction

  // weight-RAM word of an FC layer at fold step 'addr' (addr = g*IN/SIMD + i)
  function automatic logic [63:0] fc_word(const ref arr_t w, input int IN, PE, SIMD, addr);
    logic [63:0] d = '0;
    int SF = IN/SIMD;
    int i = addr % SF, g = addr / SF;
    for (int p = 0; p < PE; p++)
      for (int l = 0; l < SIMD; l++)
        d[(p*SIMD+l)*2 +: 2] = 2'(w[(g*PE+p)*IN + i*SIMD+l]);
    return d;
  endfunction

  // threshold-RAM entry of channel ch: {T2,T1,T0}
  function automatic logic [63:0] th_word(const ref arr_t th, input int ch);
    logic [63:0] d = '0;
    for (int k = 0; k < 3; k++) d[k*16 +: 16] = 16'(th[ch*3+k]);
    return d;
  endfunction

`endif
