// tb_lbist_model_pkg: behavioural reference of one LBIST island run.
//
// Computes, step by step and without using the RTL, the MISR signature an
// island produces: PRPG (Fibonacci LFSR, tap sets written out below) ->
// phase shifter -> chain loading (the observation flops sit in front of the
// last chain), the capture window with per-domain pulse bytes applied to the
// skeleton partition's capture function (X-bounded inputs from the
// observation flops), and MISR compaction (chain c into bit c mod 64) of
// every unload except the first. Used by the top-level testbenches.
package tb_lbist_model_pkg;

  function automatic logic [63:0] taps(int w);
    logic [63:0] m;
    m = '0;
    case (w)
      8:  m = 64'h0000_0000_0000_00B8;                        // 8,6,5,4
      24: m = (64'd1 << 23) | (64'd1 << 22) | (64'd1 << 21) | (64'd1 << 16);
      26: m = (64'd1 << 25) | (64'd1 << 5) | (64'd1 << 1) | 64'd1;
      34: m = (64'd1 << 33) | (64'd1 << 26) | (64'd1 << 1) | 64'd1;
      36: m = (64'd1 << 35) | (64'd1 << 24);
      46: m = (64'd1 << 45) | (64'd1 << 44) | (64'd1 << 25) | (64'd1 << 24);
      64: m = (64'd1 << 63) | (64'd1 << 62) | (64'd1 << 60) | (64'd1 << 59);
      default: m = '0;
    endcase
    return m;
  endfunction

  function automatic logic [63:0] lfsr_step(logic [63:0] s, int w);
    logic fb;
    logic [63:0] wm;
    fb = ^(s & taps(w));
    wm = (w == 64) ? '1 : ((64'd1 << w) - 1);
    return ((s << 1) | 64'(fb)) & wm;
  endfunction

  // Signature of an island run: w-bit PRPG, c chains of l flops, nobs
  // observation flops, pin/pout partition inputs/outputs, two domains with
  // the given capture pulse bytes, npat patterns, chain mask_chain masked
  // (-1: none).
  function automatic logic [63:0] island_misr(int w, int c, int l, int nobs, int pin, int pout,
                                              int npat, logic [63:0] seed, logic [63:0] mstart,
                                              int mask_chain, logic [7:0] pulse0, logic [7:0] pulse1);
    localparam int D = 2;
    logic [63:0] f [], nf [];
    logic [63:0] obs, nobs_v, prpg, misr, comp, lmask;
    logic si [];
    logic first, p0, p1, ps;
    logic [7:0] pulse [2];
    int sl;
    f = new[c]; nf = new[c]; si = new[c];
    pulse[0] = pulse0; pulse[1] = pulse1;
    lmask = (l == 64) ? '1 : ((64'd1 << l) - 1);
    for (int i = 0; i < c; i++) f[i] = '0;
    obs = '0; misr = mstart; first = 1;
    prpg = seed & ((64'd1 << w) - 1);
    if (prpg == 0) prpg = 1;
    sl = l + nobs;
    for (int pat = 0; pat <= npat; pat++) begin
      for (int s = 0; s < sl; s++) begin
        for (int i = 0; i < c; i++) begin
          int a, t1, t2;
          a = i % w; t1 = (a + 1 + (i / w) % (w - 1)) % w; t2 = (a + w / 2 + 2 * ((i / w) % 3)) % w;
          ps = prpg[a] ^ prpg[t1] ^ ((t2 == a || t2 == t1) ? 1'b0 : prpg[t2]);
          si[i] = (i == mask_chain) ? 1'b1 : ps;
        end
        if (!first) begin
          comp = '0;
          for (int i = 0; i < c; i++) if (i != mask_chain) comp[i % 64] ^= f[i][l-1];
          misr = lfsr_step(misr, 64) ^ comp;
        end
        nobs_v = (obs << 1) | 64'(si[c-1]);
        for (int i = 0; i < c - 1; i++) f[i] = ((f[i] << 1) | 64'(si[i])) & lmask;
        f[c-1] = ((f[c-1] << 1) | 64'(obs[nobs-1])) & lmask;
        obs = nobs_v & ((64'd1 << nobs) - 1);
        prpg = lfsr_step(prpg, w);
      end
      first = 0;
      if (pat == npat) break;
      for (int k = 0; k < 8; k++) begin
        logic [63:0] xr;
        xr = '0;
        for (int j = 0; j < pout; j++) xr[j % nobs] ^= f[j % c][l/2] ^ f[(j+1) % c][0];
        for (int i = 0; i < c; i++) begin
          int c2;
          logic [63:0] rot;
          c2 = (i + D < c) ? i + D : i % D;
          rot = ((f[i] >> 1) | (64'(f[i][0]) << (l - 1))) & lmask;
          nf[i] = f[i];
          if (pulse[i % D][7-k]) nf[i] = f[i] ^ (rot & ~f[c2] & lmask) ^ 64'(obs[(i % pin) % nobs]);
        end
        if (pulse[(c-1) % D][7-k]) obs = xr;
        for (int i = 0; i < c; i++) f[i] = nf[i];
      end
    end
    return misr;
  endfunction

endpackage
