// Reference model of the transmitter's bit and symbol processing, written
// from the IEEE 802.16 OFDM PHY formulas rather than from the RTL's
// structure: convolutional code by generator polynomials, rate-3/4
// puncturing by the standard's X=101 / Y=110 pattern, the interleaver by
// its two permutation formulas, and the constellation levels computed
// with real arithmetic.
package tx_ref_pkg;

  typedef bit bitq_t[$];

  // Rate-1/2 K=7 code, G1 = 171 (X), G2 = 133 (Y), zero start state.
  function automatic void encode(input bitq_t in, output bitq_t xs, output bitq_t ys);
    bit [6:0] win;  // win[6] = current bit, win[0] = bit 6 clocks earlier
    xs = {};
    ys = {};
    win = '0;
    foreach (in[t]) begin
      win = {in[t], win[6:1]};
      xs.push_back(^(win & 7'o171));
      ys.push_back(^(win & 7'o133));
    end
  endfunction

  // Puncture and split: X bits kept at t%3 in {0,2}, Y bits at t%3 in {0,1}.
  function automatic void puncture(input int nbpsc, input bitq_t xs, input bitq_t ys,
                                   output bitq_t sx, output bitq_t sy);
    sx = {};
    sy = {};
    foreach (xs[t]) begin
      if (nbpsc == 1 || (t % 3) != 1) sx.push_back(xs[t]);
      if (nbpsc == 1 || (t % 3) != 2) sy.push_back(ys[t]);
    end
  endfunction

  // 802.16 interleaver of one block (ncbps bits), d = 12
  function automatic bitq_t interleave(input int nbpsc, input bitq_t blk);
    int ncbps = blk.size();
    int s = (nbpsc / 2 > 1) ? nbpsc / 2 : 1;
    bitq_t out;
    out = blk;
    for (int k = 0; k < ncbps; k++) begin
      int m, j;
      m = (ncbps / 12) * (k % 12) + k / 12;
      j = s * (m / s) + (m + ncbps - (12 * m) / ncbps) % s;
      out[j] = blk[k];
    end
    return out;
  endfunction

  // Axis value for a group of bits (first bit = sign, rest Gray magnitude)
  function automatic int axis(input int nbpsc, input int bits);
    int nb, sgn, g, lvl;
    real norm, v;
    nb   = (nbpsc == 1) ? 1 : nbpsc / 2;
    sgn  = (bits >> (nb - 1)) & 1;
    g    = bits & ((1 << (nb - 1)) - 1);
    // Gray -> binary gives the ring index 0,1,2,3 -> level 1,3,5,7
    begin
      int b = g;
      for (int sh = 1; sh < 4; sh++) b = b ^ (g >> sh);
      lvl = 2 * b + 1;
    end
    case (nbpsc)
      1: norm = 1.0;
      2: norm = 2.0;
      4: norm = 10.0;
      default: norm = 42.0;
    endcase
    v = real'(lvl) / $sqrt(norm) * 16384.0;
    return (sgn != 0) ? -int'($floor(v + 0.5)) : int'($floor(v + 0.5));
  endfunction

  // Map NBPSC bits (b[0] first = MSB) to a Q2.14 point
  function automatic void map(input int nbpsc, input int sym, output int i, output int q);
    int nb = (nbpsc == 1) ? 1 : nbpsc / 2;
    if (nbpsc == 1) begin
      i = axis(1, sym);
      q = 0;
    end else begin
      i = axis(nbpsc, sym >> nb);
      q = axis(nbpsc, sym & ((1 << nb) - 1));
    end
  endfunction

  // Full branch: bits -> per-antenna symbol values (I,Q) for whole blocks
  function automatic void branch(input int nbpsc, input bitq_t bits,
                                 output int xi[$], output int xq[$],
                                 output int yi[$], output int yq[$]);
    bitq_t xs, ys, sx, sy;
    int ncbps = 192 * nbpsc;
    encode(bits, xs, ys);
    puncture(nbpsc, xs, ys, sx, sy);
    xi = {}; xq = {}; yi = {}; yq = {};
    for (int blk = 0; (blk + 1) * ncbps <= sx.size(); blk++) begin
      bitq_t bx, by, ix, iy;
      bx = sx[blk * ncbps : (blk + 1) * ncbps - 1];
      by = sy[blk * ncbps : (blk + 1) * ncbps - 1];
      ix = interleave(nbpsc, bx);
      iy = interleave(nbpsc, by);
      for (int n = 0; n < 192; n++) begin
        int symx = 0, symy = 0, a, b;
        for (int t = 0; t < nbpsc; t++) begin
          symx = (symx << 1) | int'(ix[n * nbpsc + t]);
          symy = (symy << 1) | int'(iy[n * nbpsc + t]);
        end
        map(nbpsc, symx, a, b); xi.push_back(a); xq.push_back(b);
        map(nbpsc, symy, a, b); yi.push_back(a); yq.push_back(b);
      end
    end
  endfunction

endpackage
