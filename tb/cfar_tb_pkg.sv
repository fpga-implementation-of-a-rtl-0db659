// cfar_tb_pkg: test image generator and brute-force CA-CFAR reference model
// shared by the testbenches.
//
// pix() gives a deterministic pseudo-random SAR-like image: a speckled
// background of intensity 100..227 with scattered bright "targets"
// (intensity 2000..9999) on about one pixel in 61.  ref_det() decides one
// pixel by summing the background window directly (no running sums) and
// applying d > 0 and d^2 * 2^16 > k^2 * (N*Q - S^2), d = N*x - S, which is
// x > mean + k*std without rounding.  Pixels without a full window are 0.
package cfar_tb_pkg;

  function automatic int unsigned hash3(int unsigned seed, int unsigned y, int unsigned x);
    int unsigned h;
    h = seed * 32'h9E3779B1 ^ (y * 32'h85EBCA77) ^ (x * 32'hC2B2AE3D);
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A2D39;
    h = h ^ (h >> 15);
    return h;
  endfunction

  function automatic logic [15:0] pix(int unsigned seed, int unsigned y, int unsigned x);
    int unsigned h;
    h = hash3(seed, y, x);
    if (h % 61 == 7) return 16'(2000 + (h >> 8) % 8000);
    return 16'(100 + (h >> 8) % 128);
  endfunction

  function automatic bit ref_det(int unsigned seed, int w, int h, int hw, int hh,
                                 int gw, int gh, int k_q88, int y, int x);
    logic [127:0] s, q, n, xv, d, lhs, rhs, e;
    if (gw >= hw || gh >= hh || 2 * hh + 1 > 4096) return 1'b0;
    if (y < hh || y + hh >= h || x < hw || x + hw >= w) return 1'b0;
    s = 0;
    q = 0;
    n = 0;
    for (int yy = y - hh; yy <= y + hh; yy++)
      for (int xx = x - hw; xx <= x + hw; xx++) begin
        if (yy >= y - gh && yy <= y + gh && xx >= x - gw && xx <= x + gw) continue;
        s += 128'(pix(seed, yy, xx));
        q += 128'(pix(seed, yy, xx)) * 128'(pix(seed, yy, xx));
        n += 1;
      end
    xv = 128'(pix(seed, y, x));
    if (n * xv <= s) return 1'b0;
    d   = n * xv - s;
    e   = n * q - s * s;
    lhs = (d * d) << 16;
    rhs = 128'(k_q88) * 128'(k_q88) * e;
    return lhs > rhs;
  endfunction

endpackage
