// tb_fp_ref_pkg: test images and a floating-point reference of the
// phase-only-filter correlation, for the fingerprint testbenches.
//
// gal_pix(g, i) is a pseudo-random 8-bit pixel i of gallery sample g. A probe
// is a gallery sample circularly shifted by (dr, dc). correlate() follows the
// hardware's dataflow in real arithmetic: F = DFT2(probe), G = DFT2(gallery),
// P = F conj(G)/|G| with the quadrants swapped, C = DFT2(P) / 2^log2(N) (the
// scaling the hardware's MSB selection implies), and returns the largest
// |C|^2 and its position (first in row-major order on ties).
package tb_fp_ref_pkg;

  function automatic logic [7:0] gal_pix(int g, int i);
    int unsigned h;
    h = (i + 1) * 32'h9E3779B1 ^ (g + 7) * 32'h85EBCA77;
    h ^= h >> 16;
    h *= 32'h7FEB352D;
    h ^= h >> 15;
    return h[7:0];
  endfunction

  function automatic logic [7:0] probe_pix(int n, int g, int dr, int dc, int i);
    int r, c;
    r = ((i / n) - dr + n) % n;
    c = ((i % n) - dc + n) % n;
    return gal_pix(g, r * n + c);
  endfunction

  // in-place 2-D forward DFT of n x n complex data (row-major)
  function automatic void dft2(int n, ref real re[], ref real im[]);
    real tr[], ti[];
    real pi2;
    pi2 = 2.0 * 3.14159265358979323846;
    tr = new[n * n];
    ti = new[n * n];
    for (int r = 0; r < n; r++)
      for (int k = 0; k < n; k++) begin
        tr[r*n+k] = 0; ti[r*n+k] = 0;
        for (int c = 0; c < n; c++) begin
          tr[r*n+k] += re[r*n+c] * $cos(pi2 * c * k / n) + im[r*n+c] * $sin(pi2 * c * k / n);
          ti[r*n+k] += im[r*n+c] * $cos(pi2 * c * k / n) - re[r*n+c] * $sin(pi2 * c * k / n);
        end
      end
    for (int c = 0; c < n; c++)
      for (int k = 0; k < n; k++) begin
        re[k*n+c] = 0; im[k*n+c] = 0;
        for (int r = 0; r < n; r++) begin
          re[k*n+c] += tr[r*n+c] * $cos(pi2 * r * k / n) + ti[r*n+c] * $sin(pi2 * r * k / n);
          im[k*n+c] += ti[r*n+c] * $cos(pi2 * r * k / n) - tr[r*n+c] * $sin(pi2 * r * k / n);
        end
      end
  endfunction

  function automatic void correlate(int n, int g, int pg, int dr, int dc,
                                    output real amp, output int row, output int col);
    real fr[], fi[], gr[], gi[], pr[], pim[];
    real mag, m;
    int ln, sr, sc;
    ln = $clog2(n);
    fr = new[n*n]; fi = new[n*n]; gr = new[n*n]; gi = new[n*n]; pr = new[n*n]; pim = new[n*n];
    for (int i = 0; i < n * n; i++) begin
      fr[i] = probe_pix(n, pg, dr, dc, i); fi[i] = 0;
      gr[i] = gal_pix(g, i);               gi[i] = 0;
    end
    dft2(n, fr, fi);
    dft2(n, gr, gi);
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        mag = $sqrt(gr[r*n+c] ** 2 + gi[r*n+c] ** 2);
        sr = (r + n / 2) % n;
        sc = (c + n / 2) % n;
        if (mag == 0) begin pr[sr*n+sc] = fr[r*n+c]; pim[sr*n+sc] = fi[r*n+c]; end
        else begin
          pr[sr*n+sc]  = (fr[r*n+c] * gr[r*n+c] + fi[r*n+c] * gi[r*n+c]) / mag;
          pim[sr*n+sc] = (fi[r*n+c] * gr[r*n+c] - fr[r*n+c] * gi[r*n+c]) / mag;
        end
      end
    dft2(n, pr, pim);
    amp = -1; row = 0; col = 0;
    for (int i = 0; i < n * n; i++) begin
      m = (pr[i] ** 2 + pim[i] ** 2) / (2.0 ** (2 * ln));
      if (m > amp) begin amp = m; row = i / n; col = i % n; end
    end
  endfunction

endpackage
