// Reference model for the bit-plane parallel EBC, used by the testbenches.
//
// It codes a code-block the textbook way: for every bit-plane it runs the
// three coding passes of the JPEG 2000 standard one after the other over
// explicit significance arrays (stripe-causal contexts, contexts reset at
// each bit-plane), records which decisions each sample produced in which
// pass, then puts the decisions in the column-switching order (Pass 1 of
// column c+1 before Pass 2/3 of column c) and runs them through a plain
// software-style MQ encoder with a byte array and pointer. It shares no
// code with the RTL, so agreement checks the equations the RTL uses to
// derive significance from magnitude bits.
package ebc_ref_pkg;

  class EbcRef;
    int W;                    // code-block width = height
    int mag[];                // raster order, row * W + col
    bit neg[];
    int band;                 // 0 LL, 1 HL, 2 LH, 3 HH
    byte unsigned stream[int][$];   // per bit-plane code word
    int nsym[int];            // decisions per bit-plane

    // MQ coder state
    int unsigned A, C, CT, bp;
    byte unsigned obuf[$];
    int cidx[19];
    bit cmps[19];

    function new(int w);
      W = w;
      mag = new[w * w];
      neg = new[w * w];
    endfunction

    // ------------------------------------------------------------ tables
    static function int qe(int i);
      int t[47] = '{'h5601,'h3401,'h1801,'h0AC1,'h0521,'h0221,'h5601,'h5401,'h4801,'h3801,
                    'h3001,'h2401,'h1C01,'h1601,'h5601,'h5401,'h5101,'h4801,'h3801,'h3401,
                    'h3001,'h2801,'h2401,'h2201,'h1C01,'h1801,'h1601,'h1401,'h1201,'h1101,
                    'h0AC1,'h09C1,'h08A1,'h0521,'h0441,'h02A1,'h0221,'h0141,'h0111,'h0085,
                    'h0049,'h0025,'h0015,'h0009,'h0005,'h0001,'h5601};
      return t[i];
    endfunction
    static function int nmps(int i);
      int t[47] = '{1,2,3,4,5,38,7,8,9,10,11,12,13,29,15,16,17,18,19,20,21,22,23,24,25,26,27,
                    28,29,30,31,32,33,34,35,36,37,38,39,40,41,42,43,44,45,45,46};
      return t[i];
    endfunction
    static function int nlps(int i);
      int t[47] = '{1,6,9,12,29,33,6,14,14,14,17,18,20,21,14,14,15,16,17,18,19,19,20,21,22,
                    23,24,25,26,27,28,29,30,31,32,33,34,35,36,37,38,39,40,41,42,43,46};
      return t[i];
    endfunction

    // ---------------------------------------------------------- MQ coder
    function void mq_init();
      A = 'h8000; C = 0; CT = 12; bp = 0;
      obuf.delete();
      obuf.push_back(8'h00);
      for (int i = 0; i < 19; i++) begin cidx[i] = 0; cmps[i] = 0; end
      cidx[0] = 4; cidx[17] = 3; cidx[18] = 46;
    endfunction

    function void byteout();
      if (obuf[bp] == 8'hFF) begin
        bp++; obuf.push_back(8'(C >> 20)); C &= 'hFFFFF; CT = 7;
      end else if (C < 'h8000000) begin
        bp++; obuf.push_back(8'(C >> 19)); C &= 'h7FFFF; CT = 8;
      end else begin
        obuf[bp] = obuf[bp] + 1;
        if (obuf[bp] == 8'hFF) begin
          C &= 'h7FFFFFF;
          bp++; obuf.push_back(8'(C >> 20)); C &= 'hFFFFF; CT = 7;
        end else begin
          bp++; obuf.push_back(8'(C >> 19)); C &= 'h7FFFF; CT = 8;
        end
      end
    endfunction

    function void renorm();
      do begin
        A = (A << 1) & 'hFFFF; C = C << 1; CT--;
        if (CT == 0) byteout();
      end while ((A & 'h8000) == 0);
    endfunction

    function void encode(int cx, bit d);
      int q;
      q = qe(cidx[cx]);
      A = A - q;
      if (d == cmps[cx]) begin
        if ((A & 'h8000) == 0) begin
          if (A < q) A = q; else C = C + q;
          cidx[cx] = nmps(cidx[cx]);
          renorm();
        end else C = C + q;
      end else begin
        if (A < q) C = C + q; else A = q;
        if (cidx[cx] == 0 || cidx[cx] == 6 || cidx[cx] == 14) cmps[cx] = !cmps[cx];
        cidx[cx] = nlps(cidx[cx]);
        renorm();
      end
    endfunction

    function void mq_flush(int k);
      int unsigned t;
      t = C + A;
      C = C | 'hFFFF;
      if (C >= t) C = C - 'h8000;
      C = C << CT; byteout();
      C = C << CT; byteout();
      stream[k] = {};
      for (int i = 1; i <= int'(bp); i++)
        if (i < int'(bp) || obuf[bp] != 8'hFF) stream[k].push_back(obuf[i]);
    endfunction

    // -------------------------------------------------- context modelling
    bit sg[];                 // significance during a bit-plane
    bit vis[];                // coded in Pass 1 of this bit-plane

    function bit sig_at(int r, int c, int r0);
      if (c < 0 || c >= W || r < 0 || r >= W) return 0;
      if (r >= r0 + 4) return 0;       // next stripe: stripe-causal
      return sg[r * W + c];
    endfunction
    function bit neg_at(int r, int c);
      if (c < 0 || c >= W || r < 0 || r >= W) return 0;
      return neg[r * W + c];
    endfunction

    function int zc(int r, int c);
      int r0, h, v, d, t;
      r0 = (r / 4) * 4;
      h = sig_at(r, c-1, r0) + sig_at(r, c+1, r0);
      v = sig_at(r-1, c, r0) + sig_at(r+1, c, r0);
      d = sig_at(r-1, c-1, r0) + sig_at(r-1, c+1, r0) + sig_at(r+1, c-1, r0) + sig_at(r+1, c+1, r0);
      if (band == 1) begin t = h; h = v; v = t; end
      if (band == 3) begin
        if (d >= 3) return 8;
        if (d == 2) return (h + v >= 1) ? 7 : 6;
        if (d == 1) return (h + v >= 2) ? 5 : (h + v == 1) ? 4 : 3;
        return (h + v >= 2) ? 2 : (h + v == 1) ? 1 : 0;
      end
      if (h == 2) return 8;
      if (h == 1) return (v >= 1) ? 7 : (d >= 1) ? 6 : 5;
      if (v == 2) return 4;
      if (v == 1) return 3;
      return (d >= 2) ? 2 : (d == 1) ? 1 : 0;
    endfunction

    function int contrib(int r, int c, int r0);
      if (!sig_at(r, c, r0)) return 0;
      return neg_at(r, c) ? -1 : 1;
    endfunction

    // returns ctx * 2 + xor bit
    function int sc(int r, int c);
      int r0, h, v, cx, x;
      r0 = (r / 4) * 4;
      h = contrib(r, c-1, r0) + contrib(r, c+1, r0);
      v = contrib(r-1, c, r0) + contrib(r+1, c, r0);
      if (h > 1) h = 1; if (h < -1) h = -1;
      if (v > 1) v = 1; if (v < -1) v = -1;
      if (h == 1)       begin x = 0; cx = (v == 1) ? 13 : (v == 0) ? 12 : 11; end
      else if (h == -1) begin x = 1; cx = (v == -1) ? 13 : (v == 0) ? 12 : 11; end
      else              begin x = (v == -1); cx = (v == 0) ? 9 : 10; end
      return cx * 2 + x;
    endfunction

    function bit any_nb(int r, int c);
      int r0;
      r0 = (r / 4) * 4;
      for (int dr = -1; dr <= 1; dr++)
        for (int dc = -1; dc <= 1; dc++)
          if ((dr != 0 || dc != 0) && sig_at(r + dr, c + dc, r0)) return 1;
      return 0;
    endfunction

    // Code bit-planes nbp-1 .. kend.
    function void run(int nbp, int kend);
      int p1s[int][$];        // decisions per sample (ctx*2+bit) in Pass 1
      int p23[int][$];        // per stripe column key: decisions of Pass 2/3
      int seq[$];
      stream.delete();
      nsym.delete();
      sg  = new[W * W];
      vis = new[W * W];
      for (int k = nbp - 1; k >= kend; k--) begin
        p1s.delete();
        p23.delete();
        for (int i = 0; i < W * W; i++) begin
          sg[i]  = (mag[i] >> (k + 1)) != 0;
          vis[i] = 0;
        end
        // Pass 1
        for (int s = 0; s < W; s += 4)
          for (int c = 0; c < W; c++)
            for (int r = s; r < s + 4; r++) begin
              int i;
              bit bb;
              i = r * W + c;
              if (!sg[i] && any_nb(r, c)) begin
                bb = (mag[i] >> k) & 1;
                vis[i] = 1;
                p1s[i].push_back(zc(r, c) * 2 + bb);
                if (bb) begin
                  int t;
                  t = sc(r, c);
                  p1s[i].push_back((t / 2) * 2 + (neg[i] ^ (t % 2)));
                  sg[i] = 1;
                end
              end
            end
        // Pass 2
        for (int s = 0; s < W; s += 4)
          for (int c = 0; c < W; c++)
            for (int r = s; r < s + 4; r++) begin
              int i, cx;
              i = r * W + c;
              if ((mag[i] >> (k + 1)) != 0) begin
                if ((mag[i] >> (k + 2)) != 0) cx = 16;
                else cx = any_nb(r, c) ? 15 : 14;
                p23[s * W + c * 4 + (r - s)].push_back(cx * 2 + ((mag[i] >> k) & 1));
              end
            end
        // Pass 3
        for (int s = 0; s < W; s += 4)
          for (int c = 0; c < W; c++) begin
            bit rl;
            int start;
            rl = 1;
            for (int r = s; r < s + 4; r++)
              if (sg[r * W + c] || vis[r * W + c] || zc(r, c) != 0) rl = 0;
            start = s;
            if (rl) begin
              int pos;
              pos = -1;
              for (int r = s + 3; r >= s; r--) if ((mag[r * W + c] >> k) & 1) pos = r - s;
              if (pos < 0) begin
                p23[s * W + c * 4].push_back(17 * 2 + 0);
                start = s + 4;
              end else begin
                int t;
                p23[s * W + c * 4].push_back(17 * 2 + 1);
                p23[s * W + c * 4].push_back(18 * 2 + (pos >> 1));
                p23[s * W + c * 4].push_back(18 * 2 + (pos & 1));
                t = sc(s + pos, c);
                p23[s * W + c * 4].push_back((t / 2) * 2 + (neg[(s + pos) * W + c] ^ (t % 2)));
                sg[(s + pos) * W + c] = 1;
                start = s + pos + 1;
              end
            end
            for (int r = start; r < s + 4; r++) begin
              int i;
              bit bb;
              i = r * W + c;
              if (!sg[i] && !vis[i]) begin
                bb = (mag[i] >> k) & 1;
                p23[s * W + c * 4 + (r - s)].push_back(zc(r, c) * 2 + bb);
                if (bb) begin
                  int t;
                  t = sc(r, c);
                  p23[s * W + c * 4 + (r - s)].push_back((t / 2) * 2 + (neg[i] ^ (t % 2)));
                  sg[i] = 1;
                end
              end
            end
          end
        // column-switching order
        seq = {};
        for (int s = 0; s < W; s += 4)
          for (int c = -1; c < W; c++) begin
            if (c + 1 < W)
              for (int r = s; r < s + 4; r++)
                if (p1s.exists(r * W + c + 1)) seq = {seq, p1s[r * W + c + 1]};
            if (c >= 0)
              for (int r = 0; r < 4; r++)
                if (p23.exists(s * W + c * 4 + r)) seq = {seq, p23[s * W + c * 4 + r]};
          end
        mq_init();
        foreach (seq[j]) encode(seq[j] / 2, seq[j] % 2);
        mq_flush(k);
        nsym[k] = seq.size();
      end
    endfunction
  endclass

endpackage
