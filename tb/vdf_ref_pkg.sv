// vdf_ref_pkg -- reference model and stimulus for the VDF testbenches.
//
// ref_angle: A(xi,xj) in double precision with $acos (black pixels at pi/2,
//   the convention of the RTL).
// ref_alpha: alpha_i = sum_j A(xi,xj) over a 3x3 window.
// pick_ok:   true when `got` is an acceptable filter output for the window:
//   it must be one of the nine pixels, and its alpha must be within TOL of
//   the smallest alpha.  The tolerance absorbs the fixed-point rounding of
//   the RTL, which may choose differently between two nearly equal alphas.
// gen_image: a smooth colour test image and a noisy copy, with 3%
//   salt-and-pepper impulses (whole-pixel and single-channel, black
//   included), Gaussian noise of sigma 5, or both.
// psnr:      peak signal-to-noise ratio between two images.
package vdf_ref_pkg;
  import vdf_pkg::*;

  localparam real TOL = 0.01;

  function automatic real ref_angle(input rgb_t a, input rgb_t b);
    real dp, na, nb, c;
    if (a == '0 || b == '0) return 1.5707963267948966;
    dp = real'(a.r) * b.r + real'(a.g) * b.g + real'(a.b) * b.b;
    na = $sqrt(real'(a.r) * a.r + real'(a.g) * a.g + real'(a.b) * a.b);
    nb = $sqrt(real'(b.r) * b.r + real'(b.g) * b.g + real'(b.b) * b.b);
    c  = dp / (na * nb);
    if (c > 1.0) c = 1.0;
    return $acos(c);
  endfunction

  function automatic real ref_alpha(input rgb_t w [9], input int i);
    real s = 0.0;
    for (int j = 0; j < 9; j++) s += ref_angle(w[i], w[j]);
    return s;
  endfunction

  // index of the first minimum, in double precision
  function automatic int ref_argmin(input rgb_t w [9]);
    real best = 1.0e9, a;
    int  bi = 0;
    for (int i = 0; i < 9; i++) begin
      a = ref_alpha(w, i);
      if (a < best) begin best = a; bi = i; end
    end
    return bi;
  endfunction

  function automatic bit pick_ok(input rgb_t w [9], input rgb_t got);
    real best = 1.0e9, a, got_a = 1.0e9;
    for (int i = 0; i < 9; i++) begin
      a = ref_alpha(w, i);
      if (a < best) best = a;
      if (w[i] == got && a < got_a) got_a = a;
    end
    return got_a <= best + TOL;
  endfunction

  function automatic byte unsigned clip8(input int v);
    return (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
  endfunction

  typedef enum int {NOISE_MIXED, NOISE_IMPULSE, NOISE_GAUSS} noise_t;

  // approximately normal, zero mean, unit variance (sum of 12 uniforms)
  function automatic real gauss();
    real g = -6.0;
    for (int k = 0; k < 12; k++) g += real'($urandom_range(0, 65535)) / 65536.0;
    return g;
  endfunction

  // fills clean and img (row-major, w*h) with a smooth test image and a
  // noisy copy of it:
  //   NOISE_IMPULSE  3% impulses: black, white, or one channel at 0/255
  //   NOISE_GAUSS    additive Gaussian noise, sigma = 5, per channel
  //   NOISE_MIXED    both, the Gaussian part with sigma ~2
  function automatic void gen_image(ref rgb_t img [], ref rgb_t clean [], input int w, input int h,
                                    input int seed, input noise_t mode = NOISE_MIXED);
    rgb_t p;
    real  sigma;
    img   = new[w * h];
    clean = new[w * h];
    sigma = (mode == NOISE_GAUSS) ? 5.0 : (mode == NOISE_MIXED) ? 2.0 : 0.0;
    for (int y = 0; y < h; y++) begin
      for (int x = 0; x < w; x++) begin
        // smooth base colour, different ramps per channel
        p.r = clip8(40 + (x * 180) / w + (seed % 7));
        p.g = clip8(200 - (y * 150) / h + ((x * y + seed) % 11));
        p.b = clip8(60 + ((x + y) * 100) / (w + h) + (seed % 5));
        clean[y * w + x] = p;
        if (sigma > 0.0) begin
          p.r = clip8(int'(p.r) + int'($rtoi(sigma * gauss())));
          p.g = clip8(int'(p.g) + int'($rtoi(sigma * gauss())));
          p.b = clip8(int'(p.b) + int'($rtoi(sigma * gauss())));
        end
        if (mode != NOISE_GAUSS) begin
          case ($urandom_range(0, 199))
            0, 1:    p = '0;                          // pepper, black
            2, 3:    p = '{8'hff, 8'hff, 8'hff};      // salt, white
            4:       p.r = 8'($urandom_range(0, 1) * 255);
            5:       p.g = 8'($urandom_range(0, 1) * 255);
            default: ;
          endcase
        end
        img[y * w + x] = p;
      end
    end
  endfunction

  // peak signal-to-noise ratio of a against b over all channels, in dB
  function automatic real psnr(ref rgb_t a [], ref rgb_t b []);
    real se = 0.0, d;
    for (int n = 0; n < a.size(); n++) begin
      d = real'(a[n].r) - real'(b[n].r); se += d * d;
      d = real'(a[n].g) - real'(b[n].g); se += d * d;
      d = real'(a[n].b) - real'(b[n].b); se += d * d;
    end
    if (se == 0.0) return 99.0;
    return 10.0 * $log10(255.0 * 255.0 * 3.0 * a.size() / se);
  endfunction

  // the window whose centre is (y, x)
  function automatic void window_at(ref rgb_t img [], input int w, input int y, input int x,
                                    output rgb_t win [9]);
    for (int dy = 0; dy < 3; dy++)
      for (int dx = 0; dx < 3; dx++)
        win[dy * 3 + dx] = img[(y - 1 + dy) * w + (x - 1 + dx)];
  endfunction
endpackage
