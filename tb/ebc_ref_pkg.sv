// ebc_ref_pkg: reference models used by the testbenches.
//   mq_ref  - MQ arithmetic encoder written as in the JPEG 2000 flowcharts
//             (bit-serial renormalisation loop, byte-out, flush), with a
//             16-context state table.
//   ebc_ref - tier-1 coder of one code-block that runs the three coding
//             passes one after the other over the whole block, keeping
//             explicit significance and visited flags, with the vertically
//             causal context window.  It produces the context/decision
//             pairs of each pass of each bit-plane.
// Contexts are numbered per pass: ZC 0..8, SC 9..13, RL 14, UNI 15 in
// passes 1 and 3, MR 0..2 in pass 2.
// These models follow the JPEG 2000 tier-1 algorithm itself (sequential
// passes, MQ coder) and share no code with the RTL. Causal mode, per-pass
// contexts and per-bit-plane termination match the choices of the RTL.
package ebc_ref_pkg;

  typedef struct {
    int pass;
    int cx;
    int d;
  } sym_t;

  // Qe, next MPS state, next LPS state, switch (JPEG 2000 Table C.2)
  int QE  [47] = '{'h5601,'h3401,'h1801,'h0AC1,'h0521,'h0221,'h5601,'h5401,'h4801,'h3801,
                   'h3001,'h2401,'h1C01,'h1601,'h5601,'h5401,'h5101,'h4801,'h3801,'h3401,
                   'h3001,'h2801,'h2401,'h2201,'h1C01,'h1801,'h1601,'h1401,'h1201,'h1101,
                   'h0AC1,'h09C1,'h08A1,'h0521,'h0441,'h02A1,'h0221,'h0141,'h0111,'h0085,
                   'h0049,'h0025,'h0015,'h0009,'h0005,'h0001,'h5601};
  int NMPS[47] = '{1,2,3,4,5,38,7,8,9,10,11,12,13,29,15,16,17,18,19,20,21,22,23,24,25,26,27,
                   28,29,30,31,32,33,34,35,36,37,38,39,40,41,42,43,44,45,45,46};
  int NLPS[47] = '{1,6,9,12,29,33,6,14,14,14,17,18,20,21,14,14,15,16,17,18,19,19,20,21,22,23,
                   24,25,26,27,28,29,30,31,32,33,34,35,36,37,38,39,40,41,42,43,46};
  int SWT [47] = '{1,0,0,0,0,0,1,0,0,0,0,0,0,0,1,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,
                   0,0,0,0,0,0,0,0,0,0};

  int SCX[9] = '{13, 12, 11, 10, 9, 10, 11, 12, 13};
  int SXR[9] = '{1, 1, 1, 1, 0, 0, 0, 0, 0};

  class mq_ref;
    int unsigned A, C;
    int CT, B;
    bit bv;
    int I[16];
    int M[16];
    byte unsigned out[$];
    int used;

    function new(int pass);
      for (int k = 0; k < 16; k++) begin
        I[k] = 0; M[k] = 0;
      end
      if (pass != 2) I[0] = 4;
      if (pass == 3) begin I[14] = 3; I[15] = 46; end
      restart();
    endfunction

    function void restart();
      A = 'h8000; C = 0; CT = 12; B = 0; bv = 0; used = 0;
    endfunction

    function void emit(int b);
      if (bv) out.push_back(byte'(b));
      bv = 1;
    endfunction

    function void byteout();
      if (B == 'hFF) begin
        emit(B); B = C >> 20; C &= 'hFFFFF; CT = 7;
      end else if (C < 'h8000000) begin
        emit(B); B = C >> 19; C &= 'h7FFFF; CT = 8;
      end else begin
        B = B + 1;
        if (B == 'hFF) begin
          C &= 'h7FFFFFF; emit(B); B = C >> 20; C &= 'hFFFFF; CT = 7;
        end else begin
          emit(B); B = (C >> 19) & 'hFF; C &= 'h7FFFF; CT = 8;
        end
      end
    endfunction

    function void renorm();
      do begin
        A = A << 1; C = C << 1; CT = CT - 1;
        if (CT == 0) byteout();
      end while ((A & 'h8000) == 0);
    endfunction

    function void encode(int cx, int d);
      int unsigned q;
      used = 1;
      q = QE[I[cx]];
      A = A - q;
      if (d == M[cx]) begin
        if ((A & 'h8000) == 0) begin
          if (A < q) A = q; else C = C + q;
          I[cx] = NMPS[I[cx]];
          renorm();
        end else C = C + q;
      end else begin
        if (A < q) C = C + q; else A = q;
        if (SWT[I[cx]]) M[cx] = 1 - M[cx];
        I[cx] = NLPS[I[cx]];
        renorm();
      end
    endfunction

    // Terminates the codeword; returns the number of bytes it added.
    function int flush();
      int unsigned t;
      int n0;
      n0 = out.size();
      t = C + A;
      C = C | 'hFFFF;
      if (C >= t) C = C - 'h8000;
      C = C << CT; byteout();
      C = C << CT; byteout();
      if (B != 'hFF) out.push_back(byte'(B));
      restart();
      return out.size() - n0;
    endfunction
  endclass

  class ebc_ref;
    int W, H, band;
    int mag[][];
    bit sgn[][];
    bit sig[][];
    bit eta[][];
    bit refd[][];
    int rl_ok, rl_fail;

    function new(int w, int h, int b);
      W = w; H = h; band = b;
      mag = new[H]; sgn = new[H]; sig = new[H]; eta = new[H]; refd = new[H];
      foreach (mag[r]) begin
        mag[r] = new[W]; sgn[r] = new[W]; sig[r] = new[W]; eta[r] = new[W]; refd[r] = new[W];
      end
      rl_ok = 0; rl_fail = 0;
    endfunction

    function void reset_state();
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          sig[r][c] = 0; eta[r][c] = 0; refd[r][c] = 0;
        end
    endfunction

    // significance as seen from a sample of the stripe starting at row r0
    function int s(int r, int c, int r0);
      if (r < 0 || c < 0 || r >= H || c >= W || r >= r0 + 4) return 0;
      return sig[r][c];
    endfunction

    // signed contribution for sign coding
    function int sv(int r, int c, int r0);
      if (s(r, c, r0) == 0) return 0;
      return sgn[r][c] ? -1 : 1;
    endfunction

    function int zc(int r, int c, int r0);
      int h, v, d, t;
      h = s(r, c-1, r0) + s(r, c+1, r0);
      v = s(r-1, c, r0) + s(r+1, c, r0);
      d = s(r-1, c-1, r0) + s(r-1, c+1, r0) + s(r+1, c-1, r0) + s(r+1, c+1, r0);
      if (band == 1) begin t = h; h = v; v = t; end
      if (band == 3) begin
        case (d)
          0: return (h + v == 0) ? 0 : (h + v == 1) ? 1 : 2;
          1: return (h + v == 0) ? 3 : (h + v == 1) ? 4 : 5;
          2: return (h + v == 0) ? 6 : 7;
          default: return 8;
        endcase
      end
      if (h == 2) return 8;
      if (h == 1) return (v > 0) ? 7 : (d > 0) ? 6 : 5;
      if (v == 2) return 4;
      if (v == 1) return 3;
      return (d >= 2) ? 2 : d;
    endfunction

    function void sc(int r, int c, int r0, output int cx, output int d);
      int h, v, x;
      h = sv(r, c-1, r0) + sv(r, c+1, r0);
      v = sv(r-1, c, r0) + sv(r+1, c, r0);
      h = (h > 1) ? 1 : (h < -1) ? -1 : h;
      v = (v > 1) ? 1 : (v < -1) ? -1 : v;
      // table D.3 of JPEG 2000, indexed by 3*(h+1) + (v+1)
      cx = SCX[3*(h+1) + (v+1)];
      x  = SXR[3*(h+1) + (v+1)];
      d = sgn[r][c] ^ x;
    endfunction

    function int nbr_any(int r, int c, int r0);
      return s(r-1,c-1,r0) | s(r-1,c,r0) | s(r-1,c+1,r0) | s(r,c-1,r0) | s(r,c+1,r0) |
             s(r+1,c-1,r0) | s(r+1,c,r0) | s(r+1,c+1,r0);
    endfunction

    // Codes bit-plane k; appends the pairs of each pass to q[pass].
    function void plane(int k, ref sym_t q1[$], ref sym_t q2[$], ref sym_t q3[$]);
      int cx, d, bit_;
      bit prev[][];
      prev = new[H];
      foreach (prev[r]) prev[r] = new[W];
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          eta[r][c] = 0; prev[r][c] = sig[r][c];
        end
      // pass 1
      for (int r0 = 0; r0 < H; r0 += 4)
        for (int c = 0; c < W; c++)
          for (int r = r0; r < r0 + 4; r++)
            if (!sig[r][c] && nbr_any(r, c, r0)) begin
              bit_ = (mag[r][c] >> k) & 1;
              q1.push_back('{1, zc(r, c, r0), bit_});
              eta[r][c] = 1;
              if (bit_) begin
                sc(r, c, r0, cx, d);
                q1.push_back('{1, cx, d});
                sig[r][c] = 1;
              end
            end
      // pass 2
      for (int r0 = 0; r0 < H; r0 += 4)
        for (int c = 0; c < W; c++)
          for (int r = r0; r < r0 + 4; r++)
            if (prev[r][c]) begin
              bit_ = (mag[r][c] >> k) & 1;
              cx = refd[r][c] ? 2 : nbr_any(r, c, r0) ? 1 : 0;
              q2.push_back('{2, cx, bit_});
              refd[r][c] = 1;
            end
      // pass 3
      for (int r0 = 0; r0 < H; r0 += 4)
        for (int c = 0; c < W; c++) begin
          int rs;
          bit rl;
          rs = r0;
          rl = 1;
          for (int r = r0; r < r0 + 4; r++)
            if (sig[r][c] || eta[r][c] || zc(r, c, r0) != 0) rl = 0;
          if (rl) begin
            int f;
            f = -1;
            for (int r = r0 + 3; r >= r0; r--) if ((mag[r][c] >> k) & 1) f = r - r0;
            if (f < 0) begin
              q3.push_back('{3, 14, 0});
              rl_ok++;
              rs = r0 + 4;
            end else begin
              q3.push_back('{3, 14, 1});
              q3.push_back('{3, 15, (f >> 1) & 1});
              q3.push_back('{3, 15, f & 1});
              sc(r0 + f, c, r0, cx, d);
              q3.push_back('{3, cx, d});
              sig[r0+f][c] = 1;
              rl_fail++;
              rs = r0 + f + 1;
            end
          end
          for (int r = rs; r < r0 + 4; r++)
            if (!sig[r][c] && !eta[r][c]) begin
              bit_ = (mag[r][c] >> k) & 1;
              q3.push_back('{3, zc(r, c, r0), bit_});
              if (bit_) begin
                sc(r, c, r0, cx, d);
                q3.push_back('{3, cx, d});
                sig[r][c] = 1;
              end
            end
        end
    endfunction
  endclass

endpackage
