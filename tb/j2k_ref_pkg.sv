// j2k_ref_pkg: behavioural reference models used by the system testbenches.
//
// Plain integer code, independent of the RTL structure:
//   ref_dwt_level : one level of the reversible (5,3) lifting transform on
//                   the top-left S x S square of a tile held row-major
//   ref_bpc       : bit plane coding of one code block, stripe by stripe,
//                   with neighbours outside the stripe and the block taken as
//                   insignificant; returns the context/data pairs as
//                   (cx << 1) | d
//   ref_mq        : MQ arithmetic coding of a pair list including the flush;
//                   the dummy byte ahead of the stream is dropped
//
// Own test: reference values are computed independently in the testbench, not
// taken from the published architecture.
package j2k_ref_pkg;

  // ------------------------------------------------------------------ DWT
  function automatic void ref_lift(ref int x[], input int S);
    int d[], s[];
    int h;
    h = S / 2;
    d = new[h]; s = new[h];
    for (int n = 0; n < h; n++)
      d[n] = x[2*n+1] - ((x[2*n] + ((n == h-1) ? x[2*n] : x[2*n+2])) >>> 1);
    for (int n = 0; n < h; n++)
      s[n] = x[2*n] + ((((n == 0) ? d[0] : d[n-1]) + d[n] + 2) >>> 2);
    for (int n = 0; n < h; n++) begin x[n] = s[n]; x[h+n] = d[n]; end
  endfunction

  function automatic void ref_dwt_level(ref int t[], input int T, input int l);
    int S;
    int x[];
    S = T >> l;
    x = new[S];
    for (int r = 0; r < S; r++) begin
      for (int i = 0; i < S; i++) x[i] = t[r*T + i];
      ref_lift(x, S);
      for (int i = 0; i < S; i++) t[r*T + i] = x[i];
    end
    for (int c = 0; c < S; c++) begin
      for (int i = 0; i < S; i++) x[i] = t[i*T + c];
      ref_lift(x, S);
      for (int i = 0; i < S; i++) t[i*T + c] = x[i];
    end
  endfunction

  // ------------------------------------------------------------------ BPC
  // subband: 0 LL, 1 HL, 2 LH, 3 HH
  function automatic void ref_bpc(input int mag[], input int sgn[], input int H,
                                  input int Wd, input int np, input int sb,
                                  ref int pairs[$]);
    int sig[], eta[], sgp[];
    sig = new[4*Wd]; eta = new[4*Wd]; sgp = new[4*Wd];
    for (int s = 0; s < H / 4; s++) begin
      for (int k = 0; k < 4*Wd; k++) begin sig[k] = 0; eta[k] = 0; sgp[k] = 0; end
      for (int p = np-1; p >= 0; p--) begin
        for (int ps = (p == np-1) ? 2 : 0; ps <= 2; ps++) begin
          for (int c = 0; c < Wd; c++) begin
            int r0, all, any, zi;
            if (ps == 1) begin
              for (int r = 0; r < 4; r++)
                if (sig[r*Wd+c] != 0 && eta[r*Wd+c] == 0) begin
                  pairs.push_back(((sgp[r*Wd+c] != 0 ? 16 :
                                   (hood(sig, Wd, r, c) == 0 ? 14 : 15)) << 1) |
                                  ((mag[(4*s+r)*Wd+c] >> p) & 1));
                  sgp[r*Wd+c] = 1;
                end
              continue;
            end
            r0 = 0;
            if (ps == 2) begin
              all = 0;
              for (int r = 0; r < 4; r++)
                all += sg(sig, Wd, r, c-1) + sg(sig, Wd, r, c) + sg(sig, Wd, r, c+1);
              if (eta[c] == 0 && all == 0) begin
                any = 0; zi = 0;
                for (int r = 3; r >= 0; r--)
                  if (((mag[(4*s+r)*Wd+c] >> p) & 1) != 0) begin any = 1; zi = r; end
                if (any == 0) begin
                  pairs.push_back(17 << 1);
                  continue;
                end
                pairs.push_back((17 << 1) | 1);
                pairs.push_back((18 << 1) | (zi >> 1));
                pairs.push_back((18 << 1) | (zi & 1));
                pairs.push_back(scx(sig, sgn, Wd, s, zi, c));
                sig[zi*Wd+c] = 1;
                for (int r = zi + 1; r < 4; r++) zcsc(sig, eta, mag, sgn, Wd, s, r, c, p, sb, pairs);
                continue;
              end
            end
            for (int r = r0; r < 4; r++) begin
              if (ps == 0) begin
                if (sig[r*Wd+c] == 0 && hood(sig, Wd, r, c) != 0)
                  zcsc(sig, eta, mag, sgn, Wd, s, r, c, p, sb, pairs);
              end else begin
                if (sig[r*Wd+c] == 0 && eta[r*Wd+c] == 0)
                  zcsc(sig, eta, mag, sgn, Wd, s, r, c, p, sb, pairs);
              end
            end
          end
        end
        for (int k = 0; k < 4*Wd; k++) eta[k] = 0;
      end
    end
  endfunction

  function automatic int sg(ref int sig[], input int Wd, input int r, input int c);
    if (r < 0 || r > 3 || c < 0 || c >= Wd) return 0;
    return sig[r*Wd+c];
  endfunction

  function automatic int hood(ref int sig[], input int Wd, input int r, input int c);
    return sg(sig,Wd,r-1,c-1)+sg(sig,Wd,r-1,c)+sg(sig,Wd,r-1,c+1)+sg(sig,Wd,r,c-1)+
           sg(sig,Wd,r,c+1)+sg(sig,Wd,r+1,c-1)+sg(sig,Wd,r+1,c)+sg(sig,Wd,r+1,c+1);
  endfunction

  function automatic int zcx(ref int sig[], input int Wd, input int r, input int c, input int sb);
    int h, v, dd, t;
    h  = sg(sig,Wd,r,c-1) + sg(sig,Wd,r,c+1);
    v  = sg(sig,Wd,r-1,c) + sg(sig,Wd,r+1,c);
    dd = sg(sig,Wd,r-1,c-1) + sg(sig,Wd,r-1,c+1) + sg(sig,Wd,r+1,c-1) + sg(sig,Wd,r+1,c+1);
    if (sb == 1) begin t = h; h = v; v = t; end
    if (sb == 3) begin
      if (dd >= 3) return 8;
      if (dd == 2) return (h+v >= 1) ? 7 : 6;
      if (dd == 1) return (h+v >= 2) ? 5 : (h+v == 1) ? 4 : 3;
      return (h+v >= 2) ? 2 : (h+v == 1) ? 1 : 0;
    end
    if (h == 2) return 8;
    if (h == 1) return (v >= 1) ? 7 : (dd >= 1) ? 6 : 5;
    if (v == 2) return 4;
    if (v == 1) return 3;
    if (dd >= 2) return 2;
    if (dd == 1) return 1;
    return 0;
  endfunction

  function automatic int scx(ref int sig[], ref int sgn[], input int Wd, input int s,
                             input int r, input int c);
    int h, v, ctx, xb;
    h = 0; v = 0;
    if (sg(sig,Wd,r,c-1) != 0) h += (sgn[(4*s+r)*Wd+c-1] != 0) ? -1 : 1;
    if (sg(sig,Wd,r,c+1) != 0) h += (sgn[(4*s+r)*Wd+c+1] != 0) ? -1 : 1;
    if (sg(sig,Wd,r-1,c) != 0) v += (sgn[(4*s+r-1)*Wd+c] != 0) ? -1 : 1;
    if (sg(sig,Wd,r+1,c) != 0) v += (sgn[(4*s+r+1)*Wd+c] != 0) ? -1 : 1;
    if (h > 1) h = 1;
    if (h < -1) h = -1;
    if (v > 1) v = 1;
    if (v < -1) v = -1;
    if (h < 0) begin h = -h; v = -v; xb = 1; end
    else if (h == 0 && v < 0) begin v = -v; xb = 1; end
    else xb = 0;
    if (h == 0) ctx = (v == 0) ? 9 : 10;
    else ctx = (v == 1) ? 13 : (v == 0) ? 12 : 11;
    return (ctx << 1) | (sgn[(4*s+r)*Wd+c] ^ xb);
  endfunction

  function automatic void zcsc(ref int sig[], ref int eta[], ref int mag[], ref int sgn[],
                               input int Wd, input int s, input int r, input int c,
                               input int p, input int sb, ref int pairs[$]);
    int v;
    v = (mag[(4*s+r)*Wd+c] >> p) & 1;
    pairs.push_back((zcx(sig, Wd, r, c, sb) << 1) | v);
    eta[r*Wd+c] = 1;
    if (v != 0) begin
      pairs.push_back(scx(sig, sgn, Wd, s, r, c));
      sig[r*Wd+c] = 1;
    end
  endfunction

  // ------------------------------------------------------------------- MQ
  class mq_ref;
    int qe[47] = '{'h5601,'h3401,'h1801,'h0AC1,'h0521,'h0221,'h5601,'h5401,'h4801,'h3801,
                   'h3001,'h2401,'h1C01,'h1601,'h5601,'h5401,'h5101,'h4801,'h3801,'h3401,
                   'h3001,'h2801,'h2401,'h2201,'h1C01,'h1801,'h1601,'h1401,'h1201,'h1101,
                   'h0AC1,'h09C1,'h08A1,'h0521,'h0441,'h02A1,'h0221,'h0141,'h0111,'h0085,
                   'h0049,'h0025,'h0015,'h0009,'h0005,'h0001,'h5601};
    int nmps[47] = '{1,2,3,4,5,38,7,8,9,10,11,12,13,29,15,16,17,18,19,20,21,22,23,24,25,26,
                     27,28,29,30,31,32,33,34,35,36,37,38,39,40,41,42,43,44,45,45,46};
    int nlps[47] = '{1,6,9,12,29,33,6,14,14,14,17,18,20,21,14,14,15,16,17,18,19,19,20,21,22,
                     23,24,25,26,27,28,29,30,31,32,33,34,35,36,37,38,39,40,41,42,43,46};
    longint A, C;
    int CT, B, I[19], MPS[19];
    bit first;
    byte unsigned out[$];

    function void init();
      A = 'h8000; C = 0; CT = 12; B = 0; first = 1;
      out.delete();
      for (int k = 0; k < 19; k++) begin
        I[k] = (k == 0) ? 4 : (k == 17) ? 3 : (k == 18) ? 46 : 0;
        MPS[k] = 0;
      end
    endfunction

    function void emit(int v);
      if (!first) out.push_back(byte'(v));
      first = 0;
    endfunction

    function void byteout();
      if (B == 'hFF) begin
        emit(B); B = int'(C >> 20); C &= 'hFFFFF; CT = 7;
      end else if (C < 'h8000000) begin
        emit(B); B = int'(C >> 19); C &= 'h7FFFF; CT = 8;
      end else begin
        B = B + 1;
        if (B == 'hFF) begin
          C &= 'h7FFFFFF; emit(B); B = int'(C >> 20); C &= 'hFFFFF; CT = 7;
        end else begin
          emit(B); B = int'(C >> 19); C &= 'h7FFFF; CT = 8;
        end
      end
    endfunction

    function void renorm();
      do begin
        A = (A << 1) & 'hFFFF; C = C << 1; CT--;
        if (CT == 0) byteout();
      end while ((A & 'h8000) == 0);
    endfunction

    function void code(int cx, int d);
      int q;
      q = qe[I[cx]];
      A = A - q;
      if (d == MPS[cx]) begin
        if ((A & 'h8000) == 0) begin
          if (A < q) A = q; else C = C + q;
          I[cx] = nmps[I[cx]];
          renorm();
        end else C = C + q;
      end else begin
        if (A < q) C = C + q; else A = q;
        if (I[cx] == 0 || I[cx] == 6 || I[cx] == 14) MPS[cx] = 1 - MPS[cx];
        I[cx] = nlps[I[cx]];
        renorm();
      end
    endfunction

    function void flush();
      longint t;
      t = C + A;
      C = C | 'hFFFF;
      if (C >= t) C = C - 'h8000;
      C = C << CT; byteout();
      C = C << CT; byteout();
      if (B != 'hFF) emit(B);
    endfunction
  endclass

endpackage
