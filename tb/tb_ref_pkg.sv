// tb_ref_pkg: reference model for the testbenches of the bit-plane parallel
// embedded block coder.
//
// Everything here is written the straightforward software way, on whole
// arrays, to be compared with the windowed, pipelined hardware:
//  * mq_encode: MQ arithmetic coder over a list of context-decision pairs,
//    with a byte buffer whose slot 0 is the placeholder byte, contexts reset
//    at the start and the standard termination at the end.
//  * block_symbols: the context-decision pairs of one bit-plane and one
//    coding pass of a code-block, with the coding-pass rule and contexts the
//    hardware implements (see bp_cf): scan order, neighbour contributions
//    decided by comparing scan positions, stripe-causal neighbours.
//  * bpg_words: the bit-plane grouped, sign-scattered memory image.
package tb_ref_pkg;

  typedef byte unsigned bq_t[$];

  // Loop bounds read from a variable keep the simulator from unrolling the
  // small loops of the model.
  int one = 1;
  typedef int unsigned  sq_t[$];      // pair = cx*2 + d

  // MQ probability table of JPEG 2000: Qe, NMPS, NLPS, SWITCH.
  function automatic void qe_tab(input int i, output int qe, output int nm, output int nl, output int sw);
    int t [47][4] = '{
      '{'h5601, 1, 1,1}, '{'h3401, 2, 6,0}, '{'h1801, 3, 9,0}, '{'h0AC1, 4,12,0},
      '{'h0521, 5,29,0}, '{'h0221,38,33,0}, '{'h5601, 7, 6,1}, '{'h5401, 8,14,0},
      '{'h4801, 9,14,0}, '{'h3801,10,14,0}, '{'h3001,11,17,0}, '{'h2401,12,18,0},
      '{'h1C01,13,20,0}, '{'h1601,29,21,0}, '{'h5601,15,14,1}, '{'h5401,16,14,0},
      '{'h5101,17,15,0}, '{'h4801,18,16,0}, '{'h3801,19,17,0}, '{'h3401,20,18,0},
      '{'h3001,21,19,0}, '{'h2801,22,19,0}, '{'h2401,23,20,0}, '{'h2201,24,21,0},
      '{'h1C01,25,22,0}, '{'h1801,26,23,0}, '{'h1601,27,24,0}, '{'h1401,28,25,0},
      '{'h1201,29,26,0}, '{'h1101,30,27,0}, '{'h0AC1,31,28,0}, '{'h09C1,32,29,0},
      '{'h08A1,33,30,0}, '{'h0521,34,31,0}, '{'h0441,35,32,0}, '{'h02A1,36,33,0},
      '{'h0221,37,34,0}, '{'h0141,38,35,0}, '{'h0111,39,36,0}, '{'h0085,40,37,0},
      '{'h0049,41,38,0}, '{'h0025,42,39,0}, '{'h0015,43,40,0}, '{'h0009,44,41,0},
      '{'h0005,45,42,0}, '{'h0001,45,43,0}, '{'h5601,46,46,0}};
    qe = t[i][0]; nm = t[i][1]; nl = t[i][2]; sw = t[i][3];
  endfunction

  function automatic bq_t mq_encode(input sq_t syms);
    int unsigned a, c, ct, bp;
    byte unsigned buf_[$];
    int idx [19];
    int mps [19];
    bq_t res;
    for (int i = 0; i < 19 * one; i++) begin idx[i] = 0; mps[i] = 0; end
    idx[0] = 4; idx[17] = 3; idx[18] = 46;
    a = 'h8000; c = 0; ct = 12; bp = 0;
    buf_.push_back(0);
    foreach (syms[n]) begin
      int cx, d, qe, nm, nl, sw;
      cx = syms[n] / 2; d = syms[n] % 2;
      qe_tab(idx[cx], qe, nm, nl, sw);
      a = a - qe;
      if (d == mps[cx]) begin
        if ((a & 'h8000) == 0) begin
          if (a < qe) a = qe; else c = c + qe;
          idx[cx] = nm;
          renorm(a, c, ct, bp, buf_);
        end else c = c + qe;
      end else begin
        if (a < qe) c = c + qe; else a = qe;
        if (sw) mps[cx] = 1 - mps[cx];
        idx[cx] = nl;
        renorm(a, c, ct, bp, buf_);
      end
    end
    begin
      int unsigned tempc;
      tempc = c + a;
      c = c | 'hFFFF;
      if (c >= tempc) c = c - 'h8000;
      c = c << ct; byteout(c, ct, bp, buf_);
      c = c << ct; byteout(c, ct, bp, buf_);
      if (buf_[bp] != 8'hFF) bp++;
    end
    for (int i = 1; i < int'(bp); i++) res.push_back(buf_[i]);
    return res;
  endfunction

  function automatic void renorm(inout int unsigned a, inout int unsigned c, inout int unsigned ct,
                        inout int unsigned bp, ref byte unsigned buf_[$]);
    do begin
      a = (a << 1) & 'hFFFF; c = c << 1; ct = ct - 1;
      if (ct == 0) byteout(c, ct, bp, buf_);
    end while ((a & 'h8000) == 0);
  endfunction

  function automatic void byteout(inout int unsigned c, inout int unsigned ct, inout int unsigned bp,
                         ref byte unsigned buf_[$]);
    if (buf_[bp] == 8'hFF) begin
      bp++; buf_.push_back(byte'(c >> 20)); c = c & 'hFFFFF; ct = 7;
    end else if (c < 'h8000000) begin
      bp++; buf_.push_back(byte'(c >> 19)); c = c & 'h7FFFF; ct = 8;
    end else begin
      buf_[bp] = buf_[bp] + 1;
      if (buf_[bp] == 8'hFF) begin
        c = c & 'h7FFFFFF; bp++; buf_.push_back(byte'(c >> 20)); c = c & 'hFFFFF; ct = 7;
      end else begin
        bp++; buf_.push_back(byte'(c >> 19)); c = c & 'h7FFFF; ct = 8;
      end
    end
  endfunction

  // ---- context tables, written as in the standard's tables ----
  function automatic int zc(input int band, input int h, input int v, input int d);
    int t;
    if (band == 1) begin t = h; h = v; v = t; end
    if (band == 2) begin
      int hv = h + v;
      if (d >= 3) return 8;
      if (d == 2) return (hv >= 1) ? 7 : 6;
      if (d == 1) return (hv == 0) ? 3 : ((hv == 1) ? 4 : 5);
      return (hv == 0) ? 0 : ((hv == 1) ? 1 : 2);
    end
    if (h == 2) return 8;
    if (h == 1) return (v >= 1) ? 7 : ((d >= 1) ? 6 : 5);
    if (v == 2) return 4;
    if (v == 1) return 3;
    return (d >= 2) ? 2 : d;
  endfunction

  // returns cx*2 + xorbit
  function automatic int sc(input int hc, input int vc);
    int cxt [3][3] = '{'{13, 12, 11}, '{10, 9, 10}, '{11, 12, 13}};   // [1-hc][1-vc]
    int xb  [3][3] = '{'{0, 0, 0}, '{0, 0, 1}, '{1, 1, 1}};
    if (hc > 1) hc = 1; if (hc < -1) hc = -1;
    if (vc > 1) vc = 1; if (vc < -1) vc = -1;
    return cxt[1-hc][1-vc] * 2 + xb[1-hc][1-vc];
  endfunction

  // Pairs of plane k, pass p (1..3) of a CB x CB block; mag/sgn row-major [y*CB+x].
  function automatic sq_t block_symbols(input int cb, input int band, input int k, input int p,
                                        input int unsigned mag[], input bit sgn[],
                                        output int n_rlc);
    sq_t out_;
    bit p1 [];
    int nc = cb * cb;
    p1 = new[nc];
    n_rlc = 0;
    for (int s = 0; s < cb / 4; s++)
      for (int x = 0; x < cb; x++) begin
        int skip_to;       // rows up to this one are already coded by a run
        skip_to = -1;
        for (int r = 0; r < 4 * one; r++) begin
          int y, me, ps, hs1, vs1, ds1, hsf, vsf, dsf, hc1, vc1, hcf, vcf;
          bit sig, sigp, mu;
          y = 4 * s + r; me = y * cb + x;
          sig  = (mag[me] >> (k + 1)) != 0;
          sigp = (mag[me] >> (k + 2)) != 0;
          mu   = (mag[me] >> k) & 1;
          hs1 = 0; vs1 = 0; ds1 = 0; hsf = 0; vsf = 0; dsf = 0;
          hc1 = 0; vc1 = 0; hcf = 0; vcf = 0;
          for (int dy = -one; dy <= one; dy++)
            for (int dx = -one; dx <= one; dx++) begin
              int yy, xx, nb;
              bit bef, nsig, nmu, s1, sf;
              if (dy == 0 && dx == 0) continue;
              yy = y + dy; xx = x + dx;
              if (yy < 0 || xx < 0 || yy >= cb || xx >= cb) continue;
              if (yy / 4 > s) continue;                       // next stripe
              bef = (yy / 4 < s) || (xx < x) || (xx == x && yy < y);
              nb = yy * cb + xx;
              nsig = (mag[nb] >> (k + 1)) != 0;
              nmu  = (mag[nb] >> k) & 1;
              s1 = bef ? (nsig | (nmu & p1[nb])) : nsig;
              sf = bef ? (nsig | nmu) : nsig;
              if (dy == 0) begin
                hs1 += s1; hsf += sf;
                hc1 += s1 ? (sgn[nb] ? -1 : 1) : 0; hcf += sf ? (sgn[nb] ? -1 : 1) : 0;
              end else if (dx == 0) begin
                vs1 += s1; vsf += sf;
                vc1 += s1 ? (sgn[nb] ? -1 : 1) : 0; vcf += sf ? (sgn[nb] ? -1 : 1) : 0;
              end else begin
                ds1 += s1; dsf += sf;
              end
            end
          ps = sig ? 2 : ((hs1 + vs1 + ds1) == 0 ? 3 : 1);
          p1[me] = (ps == 1);
          if (r == 0) begin
            // run mode test: the whole column insignificant with no
            // significant neighbour outside the column
            bit ok;
            ok = 1;
            for (int rr = 0; rr < 4 * one; rr++) begin
              int y2 = 4 * s + rr;
              if ((mag[y2 * cb + x] >> (k + 1)) != 0) ok = 0;
              for (int dy = -one; dy <= one; dy++)
                for (int dx = -one; dx <= one; dx += 2) begin
                  int yy = y2 + dy, xx = x + dx, nb;
                  bit bef;
                  if (yy < 0 || xx < 0 || yy >= cb || xx >= cb || yy / 4 > s) continue;
                  bef = (yy / 4 < s) || (xx < x);
                  nb = yy * cb + xx;
                  if (((mag[nb] >> (k + 1)) != 0) || (bef && ((mag[nb] >> k) & 1))) ok = 0;
                end
              if (rr == 0 && y2 > 0 && ((mag[(y2 - 1) * cb + x] >> k) != 0)) ok = 0;
            end
            if (ok) begin
              int first = -1;
              n_rlc += (p == 3);
              for (int rr = 3 * one; rr >= 0; rr--)
                if ((mag[(4 * s + rr) * cb + x] >> k) & 1) first = rr;
              if (p == 3) out_.push_back(17 * 2 + (first >= 0));
              if (first >= 0) begin
                if (p == 3) begin
                  out_.push_back(18 * 2 + (first / 2));
                  out_.push_back(18 * 2 + (first % 2));
                  out_.push_back(9 * 2 + sgn[(4 * s + first) * cb + x]);
                end
                skip_to = first;
              end else skip_to = 3;
              p1[me] = 0;
              continue;
            end
          end
          if (r <= skip_to) begin p1[me] = 0; continue; end
          if (ps != p) continue;
          if (p == 2) begin
            bit fr = sig & ~sigp;
            int cx = !fr ? 16 : ((hs1 + vs1 + ds1) > 0 ? 15 : 14);
            out_.push_back(cx * 2 + mu);
          end else if (p == 1) begin
            int scv;
            out_.push_back(zc(band, hs1, vs1, ds1) * 2 + mu);
            scv = sc(hc1, vc1);
            if (mu) out_.push_back((scv / 2) * 2 + (sgn[me] ^ (scv % 2)));
          end else begin
            int scv;
            out_.push_back(zc(band, hsf, vsf, dsf) * 2 + mu);
            scv = sc(hcf, vcf);
            if (mu) out_.push_back((scv / 2) * 2 + (sgn[me] ^ (scv % 2)));
          end
        end
      end
    return out_;
  endfunction

  // Bit-plane grouped, sign-scattered words of plane k (MSB-first packing).
  function automatic void bpg_words(input int cb, input int nplanes, input int w, input int k,
                                    input int unsigned mag[], input bit sgn[],
                                    output int unsigned words[$]);
    int unsigned cur;
    int n;
    words.delete();
    cur = 0; n = 0;
    for (int s = 0; s < cb / 4; s++)
      for (int x = 0; x < cb; x++)
        for (int r = 0; r < 4; r++) begin
          int me = (4 * s + r) * cb + x;
          int nbits;
          bit b [2];
          b[0] = (mag[me] >> k) & 1;
          b[1] = sgn[me];
          nbits = (b[0] && (mag[me] >> (k + 1)) == 0) ? 2 : 1;
          for (int i = 0; i < nbits * one; i++) begin
            cur = cur | (int'(b[i]) << (w - 1 - n));
            n++;
            if (n == w) begin words.push_back(cur); cur = 0; n = 0; end
          end
        end
    if (n != 0) words.push_back(cur);
  endfunction

endpackage
