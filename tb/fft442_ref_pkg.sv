// fft442_ref_pkg: bit-exact software model of the 32-point 4-4-2 FFT used by
// the testbenches. It is written as plain loops over whole frames, with no
// pipelining, delays or muxes, so it checks the hardware's dataflow as well as
// its arithmetic. Arithmetic rules it models:
//   - butterflies are exact (word growth, no rounding);
//   - a twiddle W32^e with e a multiple of 8 is an exact rotation, negation
//     of the most negative code saturating;
//   - other twiddles use coefficients round(2^(TW-1) * (cos, -sin)), products
//     summed exactly, rounded half-to-even by TW-1 bits and saturated to the
//     data width.
// It also has a floating-point DFT for checking that the result is a DFT.
package fft442_ref_pkg;

  typedef longint cvec_t [32];

  function automatic longint coef(int e, int tw, bit im);
    real a, v;
    a = 2.0 * 3.14159265358979323846 * (e % 32) / 32.0;
    v = (im ? -$sin(a) : $cos(a)) * (2.0 ** (tw - 1));
    return (v >= 0.0) ? longint'($floor(v + 0.5)) : -longint'($floor(-v + 0.5));
  endfunction

  // Divide by 2^l with round-half-to-even.
  function automatic longint rne(longint v, int l);
    longint d, q, r;
    d = 64'sd1 <<< l;
    q = v >>> l;            // floor
    r = v - q * d;          // 0 <= r < d
    if (2 * r > d) q++;
    else if (2 * r == d && (q % 2 != 0)) q++;
    return q;
  endfunction

  function automatic longint sat(longint v, int w, ref int nsat);
    longint hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 1;
    lo = -(64'sd1 <<< (w - 1));
    if (v > hi) begin nsat++; return hi; end
    if (v < lo) begin nsat++; return lo; end
    return v;
  endfunction

  // Multiply (r, i) by W32^e in a w-bit datapath with tw-bit coefficients.
  task automatic twiddle(inout longint r, inout longint i, input int e,
                         input int w, input int tw,
                         ref int nsat, ref int ntriv, ref int nmult);
    longint cr, ci, pr, pi;
    int dummy;
    e = e % 32;
    if (e % 8 == 0) begin
      ntriv++;
      dummy = 0;
      case (e / 8)
        0: begin pr = r;  pi = i;  end
        1: begin pr = i;  pi = -r; end
        2: begin pr = -r; pi = -i; end
        default: begin pr = -i; pi = r; end
      endcase
      // negating the most negative code saturates
      r = sat(pr, w, dummy);
      i = sat(pi, w, dummy);
      nsat += dummy;
    end else begin
      nmult++;
      cr = coef(e, tw, 0);
      ci = coef(e, tw, 1);
      pr = r * cr - i * ci;
      pi = r * ci + i * cr;
      r = sat(rne(pr, tw - 1), w, nsat);
      i = sat(rne(pi, tw - 1), w, nsat);
    end
  endtask

  // 4-point DFT of a[0..3] (exact).
  task automatic dft4(input longint ar[4], input longint ai[4],
                      output longint yr[4], output longint yi[4]);
    for (int k = 0; k < 4; k++) begin
      yr[k] = 0; yi[k] = 0;
      for (int l = 0; l < 4; l++) begin
        case ((l * k) % 4)   // (-j)^(l*k)
          0: begin yr[k] += ar[l]; yi[k] += ai[l]; end
          1: begin yr[k] += ai[l]; yi[k] -= ar[l]; end
          2: begin yr[k] -= ar[l]; yi[k] -= ai[l]; end
          default: begin yr[k] -= ai[l]; yi[k] += ar[l]; end
        endcase
      end
    end
  endtask

  // Whole 32-point transform; X in natural frequency order.
  task automatic fft32(input cvec_t xr, input cvec_t xi, input int dw, input int tw,
                       output cvec_t Xr, output cvec_t Xi,
                       ref int nsat, ref int ntriv, ref int nmult);
    longint yr [4][8], yi [4][8];   // [m][t] after stage 1
    longint zr [4][4][2], zi [4][4][2];  // [m][q][t'] after stage 2
    longint ar [4], ai [4], br [4], bi [4];
    for (int t = 0; t < 8; t++) begin
      for (int l = 0; l < 4; l++) begin ar[l] = xr[t + 8*l]; ai[l] = xi[t + 8*l]; end
      dft4(ar, ai, br, bi);
      for (int m = 0; m < 4; m++) begin
        twiddle(br[m], bi[m], m * t, dw + 2, tw, nsat, ntriv, nmult);
        yr[m][t] = br[m]; yi[m][t] = bi[m];
      end
    end
    for (int m = 0; m < 4; m++) begin
      for (int tp = 0; tp < 2; tp++) begin
        for (int l = 0; l < 4; l++) begin ar[l] = yr[m][tp + 2*l]; ai[l] = yi[m][tp + 2*l]; end
        dft4(ar, ai, br, bi);
        for (int q = 0; q < 4; q++) begin
          twiddle(br[q], bi[q], 4 * q * tp, dw + 4, tw, nsat, ntriv, nmult);
          zr[m][q][tp] = br[q]; zi[m][q][tp] = bi[q];
        end
      end
    end
    for (int m = 0; m < 4; m++)
      for (int q = 0; q < 4; q++) begin
        Xr[m + 4*q]      = zr[m][q][0] + zr[m][q][1];
        Xi[m + 4*q]      = zi[m][q][0] + zi[m][q][1];
        Xr[m + 4*q + 16] = zr[m][q][0] - zr[m][q][1];
        Xi[m + 4*q + 16] = zi[m][q][0] - zi[m][q][1];
      end
  endtask

  // Largest deviation of (Xr, Xi) from the exact DFT of (xr, xi).
  function automatic real dft_error(cvec_t xr, cvec_t xi, cvec_t Xr, cvec_t Xi);
    real err, er, ei, a;
    err = 0.0;
    for (int k = 0; k < 32; k++) begin
      er = 0.0; ei = 0.0;
      for (int n = 0; n < 32; n++) begin
        a = -2.0 * 3.14159265358979323846 * ((n * k) % 32) / 32.0;
        er += xr[n] * $cos(a) - xi[n] * $sin(a);
        ei += xr[n] * $sin(a) + xi[n] * $cos(a);
      end
      if (er - Xr[k] > err) err = er - Xr[k];
      if (Xr[k] - er > err) err = Xr[k] - er;
      if (ei - Xi[k] > err) err = ei - Xi[k];
      if (Xi[k] - ei > err) err = Xi[k] - ei;
    end
    return err;
  endfunction

  // Output bin carried by output lane j at output clock c (core output order).
  function automatic int out_bin(int c, int j);
    int base;
    base = (c / 2) + 4 * (c % 2);
    case (j)
      0: return base;
      1: return base + 16;
      2: return base + 8;
      default: return base + 24;
    endcase
  endfunction

endpackage
