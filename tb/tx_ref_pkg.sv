// tx_ref_pkg: bit-exact reference model of the 802.11n HT transmitter for the testbenches.
//
// Written directly from the standard's definitions (continuous puncturing, the parser in
// gather form, the interleaver permutations with floor(N_COL*i/N_CBPSS), constellation
// levels computed as n/sqrt(E) in real arithmetic, cyclic shift as exp(j*pi*k/4) with
// $cos/$sin), so that it shares no shortcut with the RTL it checks.
package tx_ref_pkg;

  typedef bit bitq_t[$];
  typedef int intq_t[$];

  function automatic int r_bpscs(int mcs);
    int t[8] = '{1, 2, 2, 4, 4, 6, 6, 6};
    return t[mcs % 8];
  endfunction
  // code rate as numerator / denominator
  function automatic int r_num(int mcs);
    int t[8] = '{1, 1, 3, 1, 3, 2, 3, 5};
    return t[mcs % 8];
  endfunction
  function automatic int r_den(int mcs);
    int t[8] = '{2, 2, 4, 2, 4, 3, 4, 6};
    return t[mcs % 8];
  endfunction
  function automatic int r_nss(int mcs);  return (mcs >= 8) ? 2 : 1;  endfunction
  function automatic int r_nsd(int bw40); return bw40 ? 108 : 52;     endfunction
  function automatic int r_nfft(int bw40); return bw40 ? 128 : 64;    endfunction
  function automatic int r_ncbps(int mcs, int bw40);
    return r_nsd(bw40) * r_bpscs(mcs) * r_nss(mcs);
  endfunction
  function automatic int r_ndbps(int mcs, int bw40);
    return r_ncbps(mcs, bw40) * r_num(mcs) / r_den(mcs);
  endfunction
  function automatic int r_nsym(int mcs, int bw40, int stbc, int len);
    int nb = 16 + 8 * len + 6;
    int m = stbc ? 2 : 1;
    return m * ((nb + m * r_ndbps(mcs, bw40) - 1) / (m * r_ndbps(mcs, bw40)));
  endfunction

  // 7-bit scrambler sequence, state x1..x7 (seed[i] = x(i+1)), output x7 ^ x4.
  function automatic bitq_t r_scr_seq(bit [6:0] seed, int n);
    bitq_t q;
    bit [7:1] x;
    for (int i = 1; i <= 7; i++) x[i] = seed[i-1];
    for (int i = 0; i < n; i++) begin
      bit o;
      o = x[7] ^ x[4];
      q.push_back(o);
      x = {x[6:1], o};
    end
    return q;
  endfunction

  // Scrambled DATA field: SERVICE, PSDU (LSB first), tail (zeroed after scrambling), pad.
  function automatic bitq_t r_data_field(byte unsigned psdu[$], int mcs, int bw40, int stbc,
                                         bit [6:0] seed);
    bitq_t d, s;
    int len = psdu.size();
    int nt = r_nsym(mcs, bw40, stbc, len) * r_ndbps(mcs, bw40);
    for (int i = 0; i < 16; i++) d.push_back(1'b0);
    foreach (psdu[b]) for (int i = 0; i < 8; i++) d.push_back(psdu[b][i]);
    while (d.size() < nt) d.push_back(1'b0);
    s = r_scr_seq(seed, nt);
    for (int i = 0; i < nt; i++) begin
      d[i] = d[i] ^ s[i];
      if (i >= 16 + 8 * len && i < 22 + 8 * len) d[i] = 1'b0;
    end
    return d;
  endfunction

  // Convolutional code 133/171 with continuous puncturing.
  function automatic bitq_t r_encode(bitq_t d, int mcs);
    bitq_t c;
    bit [6:1] sr = '0;
    string pa, pb;
    case (r_den(mcs))
      2: begin pa = "1";     pb = "1";     end
      3: begin pa = "11";    pb = "10";    end
      4: begin pa = "110";   pb = "101";   end
      default: begin pa = "11010"; pb = "10101"; end
    endcase
    foreach (d[n]) begin
      bit a, b;
      int ph = n % pa.len();
      a = d[n] ^ sr[2] ^ sr[3] ^ sr[5] ^ sr[6];
      b = d[n] ^ sr[1] ^ sr[2] ^ sr[3] ^ sr[6];
      if (pa[ph] == "1") c.push_back(a);
      if (pb[ph] == "1") c.push_back(b);
      sr = {sr[5:1], d[n]};
    end
    return c;
  endfunction

  // Parser (gather form) + interleaver of one symbol: returns, for stream iss,
  // the interleaved bits in order y[0..N_CBPSS-1].
  function automatic bitq_t r_interleave(bitq_t sym, int mcs, int bw40, int iss);
    bitq_t x, y;
    int b = r_bpscs(mcs), nss = r_nss(mcs);
    int s = (b / 2 > 1) ? b / 2 : 1;
    int ncbpss = r_nsd(bw40) * b;
    int ncol = bw40 ? 18 : 13, nrow = (bw40 ? 6 : 4) * b, nrot = bw40 ? 29 : 11;
    for (int k = 0; k < ncbpss; k++)
      x.push_back(sym[iss * s + nss * s * (k / s) + k % s]);
    for (int k = 0; k < ncbpss; k++) y.push_back(1'b0);
    for (int k = 0; k < ncbpss; k++) begin
      int i, j, r;
      i = nrow * (k % ncol) + k / ncol;
      j = s * (i / s) + (i + ncbpss - (ncol * i) / ncbpss) % s;
      r = j;
      if (iss == 1) r = ((j - 2 * nrot * b) % ncbpss + ncbpss) % ncbpss;
      y[r] = x[k];
    end
    return y;
  endfunction

  // Constellation point, real arithmetic, scaled so that 1.0 = 2048.
  function automatic int r_level(int v, int e);
    return $rtoi($floor(real'(v) * 2048.0 / $sqrt(real'(e)) + 0.5));
  endfunction
  function automatic void r_map(bitq_t y, int off, int b, output int re, output int im);
    int l16[4] = '{-3, -1, 3, 1};
    int l64[8] = '{-7, -5, -1, -3, 7, 5, 1, 3};
    case (b)
      1: begin re = y[off] ? 2048 : -2048; im = 0; end
      2: begin re = r_level(y[off] ? 1 : -1, 2); im = r_level(y[off+1] ? 1 : -1, 2); end
      4: begin re = r_level(l16[{y[off], y[off+1]}], 10);
               im = r_level(l16[{y[off+2], y[off+3]}], 10); end
      default: begin re = r_level(l64[{y[off], y[off+1], y[off+2]}], 42);
                     im = r_level(l64[{y[off+3], y[off+4], y[off+5]}], 42); end
    endcase
  endfunction

  // Pilot polarity p(n), n = 0..126, from the scrambler started at all ones.
  function automatic int r_polarity(int n);
    bitq_t q = r_scr_seq(7'h7f, 127);
    return q[n % 127] ? -1 : 1;
  endfunction

  function automatic int r_psi(int bw40, int nsts, int iss, int m);
    int p20_1[4] = '{1, 1, 1, -1};
    int p20_a[4] = '{1, 1, -1, -1};
    int p20_b[4] = '{1, -1, -1, 1};
    int p40_1[6] = '{1, 1, 1, -1, -1, 1};
    int p40_a[6] = '{1, 1, -1, -1, -1, -1};
    int p40_b[6] = '{1, 1, 1, -1, 1, 1};
    if (!bw40) return (nsts == 1) ? p20_1[m] : (iss == 0 ? p20_a[m] : p20_b[m]);
    return (nsts == 1) ? p40_1[m] : (iss == 0 ? p40_a[m] : p40_b[m]);
  endfunction

  function automatic intq_t r_pilot_k(int bw40);
    intq_t q;
    if (bw40) q = '{-53, -25, -11, 11, 25, 53};
    else      q = '{-21, -7, 7, 21};
    return q;
  endfunction

  // Data subcarriers in ascending frequency.
  function automatic intq_t r_data_k(int bw40);
    intq_t q, p;
    int kmax = bw40 ? 58 : 28, kmin = bw40 ? 2 : 1;
    p = r_pilot_k(bw40);
    for (int k = -kmax; k <= kmax; k++) begin
      bit ip = 0;
      foreach (p[i]) if (p[i] == k) ip = 1;
      if (!ip && (k >= kmin || k <= -kmin)) q.push_back(k);
    end
    return q;
  endfunction

  // Whole packet: expected IFFT inputs, flattened as
  // out[((sym * 2 + chain) * NFFT + bin) * 2 + {0: re, 1: im}].
  function automatic intq_t r_packet(byte unsigned psdu[$], int mcs, int bw40, int stbc_in,
                                     bit [6:0] seed);
    intq_t out;
    bitq_t d, c;
    int stbc = (mcs < 8) ? stbc_in : 0;
    int nsym = r_nsym(mcs, bw40, stbc, psdu.size());
    int ncbps = r_ncbps(mcs, bw40), b = r_bpscs(mcs), nss = r_nss(mcs);
    int nfft = r_nfft(bw40), nsd = r_nsd(bw40);
    int ntx = (nss == 2 || stbc) ? 2 : 1;
    intq_t dk = r_data_k(bw40), pk = r_pilot_k(bw40);
    int dre[][][], dim[][][];       // [sym][stream][subcarrier]
    d = r_data_field(psdu, mcs, bw40, stbc, seed);
    c = r_encode(d, mcs);
    dre = new[nsym]; dim = new[nsym];
    for (int n = 0; n < nsym; n++) begin
      bitq_t sym;
      dre[n] = new[2]; dim[n] = new[2];
      for (int i = 0; i < ncbps; i++) sym.push_back(c[n * ncbps + i]);
      for (int iss = 0; iss < 2; iss++) begin
        dre[n][iss] = new[nsd]; dim[n][iss] = new[nsd];
        if (iss < nss) begin
          bitq_t y = r_interleave(sym, mcs, bw40, iss);
          for (int m = 0; m < nsd; m++) begin
            int re, im;
            r_map(y, m * b, b, re, im);
            dre[n][iss][m] = re; dim[n][iss][m] = im;
          end
        end else
          for (int m = 0; m < nsd; m++) begin dre[n][iss][m] = 0; dim[n][iss][m] = 0; end
      end
    end
    for (int n = 0; n < nsym; n++) begin
      int xre[2][128], xim[2][128];
      for (int ch = 0; ch < 2; ch++) for (int i = 0; i < 128; i++) begin
        xre[ch][i] = 0; xim[ch][i] = 0;
      end
      for (int m = 0; m < nsd; m++) begin
        int bin = (dk[m] + nfft) % nfft;
        int ar, ai, br, bi;
        if (stbc) begin
          int e = n - n % 2;
          if (n % 2 == 0) begin
            ar = dre[n][0][m]; ai = dim[n][0][m];
            br = -dre[n+1][0][m]; bi = dim[n+1][0][m];
          end else begin
            ar = dre[n][0][m]; ai = dim[n][0][m];
            br = dre[e][0][m]; bi = -dim[e][0][m];
          end
        end else begin
          ar = dre[n][0][m]; ai = dim[n][0][m];
          br = dre[n][1][m]; bi = dim[n][1][m];
        end
        xre[0][bin] = ar; xim[0][bin] = ai; xre[1][bin] = br; xim[1][bin] = bi;
      end
      foreach (pk[j]) begin
        int bin = (pk[j] + nfft) % nfft;
        int pol = r_polarity(n + 3);
        for (int ch = 0; ch < ntx; ch++) begin
          xre[ch][bin] = 2048 * pol * r_psi(bw40, ntx, ch, (n + j) % pk.size());
          xim[ch][bin] = 0;
        end
      end
      if (ntx == 2)
        for (int bin = 0; bin < nfft; bin++) begin
          int k = (bin < nfft / 2) ? bin : bin - nfft;
          real ph = 3.14159265358979 * real'(k) / 4.0;
          real rr = real'(xre[1][bin]) * $cos(ph) - real'(xim[1][bin]) * $sin(ph);
          real ii = real'(xre[1][bin]) * $sin(ph) + real'(xim[1][bin]) * $cos(ph);
          xre[1][bin] = $rtoi($floor(rr + 0.5));
          xim[1][bin] = $rtoi($floor(ii + 0.5));
        end
      for (int ch = 0; ch < 2; ch++) for (int bin = 0; bin < nfft; bin++) begin
        out.push_back(ch < ntx ? xre[ch][bin] : 0);
        out.push_back(ch < ntx ? xim[ch][bin] : 0);
      end
    end
    return out;
  endfunction

endpackage
