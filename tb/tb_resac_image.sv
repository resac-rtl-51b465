// Workload testbench: image round trip through a 2-D FFT and inverse FFT
// in which every addition is done on the RESAC adder.
//
// A synthetic IMG x IMG 8-bit grayscale image (gradient, disc and texture,
// generated here) is scaled to fixed point with FRAC fractional bits,
// transformed row by row and column by column with a radix-2 FFT, then
// transformed back and divided by IMG*IMG. Every addition of the
// butterflies and of the complex multiplications goes through the adder
// under test (a subtraction adds the exact two's-complement negation);
// the multiplications by the twiddle factors are exact. The same round
// trip with exact additions gives the reference, which must reproduce the
// image exactly. Two RESAC runs are made: with no upset, and with every
// LOLSP bit flipped for every addition (worst case, as the LOLSP is not
// protected). The reconstructed images must have PSNR above 30 dB and a
// whole-image SSIM close to one (above 0.95 here).
module tb_resac_image;
  import resac_pkg::*;

  localparam int IMG  = 32;    // image side, a power of two
  localparam int LOG  = 5;     // log2(IMG)
  localparam int FRAC = 8;     // fractional bits of the fixed-point data
  localparam int TW   = 14;    // fractional bits of the twiddle factors

  logic [ADDER_W-1:0] a, b;
  logic [ADDER_W:0]   sum;
  logic [MSP_W:0]     m1;
  logic [HOLSP_W-1:0] m2;
  logic [LOLSP_W-1:0] r;

  int checks = 0, failures = 0;
  int mode;            // 0: exact additions, 1: RESAC, 2: RESAC with LOLSP upsets
  longint n_adds = 0;

  int pix   [IMG][IMG];
  int re    [IMG][IMG];
  int im    [IMG][IMG];
  int out   [IMG][IMG];
  int vre   [IMG];
  int vim   [IMG];
  int wre   [IMG/2];
  int wim   [IMG/2];

  resac_adder dut (.a(a), .b(b), .sum(sum), .m1(m1), .m2(m2), .r(r));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add(input int x, input int y, output int s);
    if (mode == 0) begin
      s = x + y;
    end else begin
      a = x; b = y;
      #1;
      s = int'(sum[ADDER_W-1:0]);
      n_adds++;
    end
  endtask

  function automatic int mul(input int x, input int w);
    longint p;
    p = longint'(x) * longint'(w);
    return int'((p + (longint'(1) << (TW - 1))) >>> TW);
  endfunction

  // In-place radix-2 FFT of vre/vim; inv selects conjugate twiddles.
  task automatic fft1d(input bit inv);
    int half, step, k, j, t;
    int tr, ti, ur, ui, xr, xi;
    for (int i = 0; i < IMG; i++) begin
      j = 0;
      for (int bit_i = 0; bit_i < LOG; bit_i++) j |= ((i >> bit_i) & 1) << (LOG - 1 - bit_i);
      if (j > i) begin
        t = vre[i]; vre[i] = vre[j]; vre[j] = t;
        t = vim[i]; vim[i] = vim[j]; vim[j] = t;
      end
    end
    for (half = 1; half < IMG; half *= 2) begin
      step = IMG / (2 * half);
      for (int s0 = 0; s0 < IMG; s0 += 2 * half) begin
        for (int m = 0; m < half; m++) begin
          int wr, wi;
          k  = m * step;
          wr = wre[k];
          wi = inv ? -wim[k] : wim[k];
          xr = vre[s0 + m + half];
          xi = vim[s0 + m + half];
          add(mul(xr, wr), -mul(xi, wi), tr);
          add(mul(xr, wi), mul(xi, wr), ti);
          ur = vre[s0 + m];
          ui = vim[s0 + m];
          add(ur, tr, vre[s0 + m]);
          add(ui, ti, vim[s0 + m]);
          add(ur, -tr, vre[s0 + m + half]);
          add(ui, -ti, vim[s0 + m + half]);
        end
      end
    end
  endtask

  task automatic fft2d(input bit inv);
    for (int y = 0; y < IMG; y++) begin
      for (int x = 0; x < IMG; x++) begin vre[x] = re[y][x]; vim[x] = im[y][x]; end
      fft1d(inv);
      for (int x = 0; x < IMG; x++) begin re[y][x] = vre[x]; im[y][x] = vim[x]; end
    end
    for (int x = 0; x < IMG; x++) begin
      for (int y = 0; y < IMG; y++) begin vre[y] = re[y][x]; vim[y] = im[y][x]; end
      fft1d(inv);
      for (int y = 0; y < IMG; y++) begin re[y][x] = vre[y]; im[y][x] = vim[y]; end
    end
  endtask

  task automatic round_trip();
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) begin
        re[y][x] = pix[y][x] << FRAC;
        im[y][x] = 0;
      end
    fft2d(1'b0);
    fft2d(1'b1);
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) begin
        int v;
        v = (re[y][x] + (1 << (FRAC + 2 * LOG - 1))) >>> (FRAC + 2 * LOG);
        out[y][x] = (v < 0) ? 0 : (v > 255) ? 255 : v;
      end
  endtask

  function automatic real psnr();
    real mse;
    mse = 0.0;
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++)
        mse += real'((out[y][x] - pix[y][x]) * (out[y][x] - pix[y][x]));
    mse = mse / real'(IMG * IMG);
    if (mse == 0.0) return 99.0;
    return 10.0 * $log10(255.0 * 255.0 / mse);
  endfunction

  // SSIM over the whole image as one window.
  function automatic real ssim();
    real mx, my, vx, vy, cxy, c1, c2, n;
    n = real'(IMG * IMG);
    mx = 0.0; my = 0.0; vx = 0.0; vy = 0.0; cxy = 0.0;
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) begin
        mx += real'(pix[y][x]); my += real'(out[y][x]);
      end
    mx /= n; my /= n;
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) begin
        vx  += (real'(pix[y][x]) - mx) ** 2;
        vy  += (real'(out[y][x]) - my) ** 2;
        cxy += (real'(pix[y][x]) - mx) * (real'(out[y][x]) - my);
      end
    vx /= n; vy /= n; cxy /= n;
    c1 = (0.01 * 255.0) ** 2;
    c2 = (0.03 * 255.0) ** 2;
    return ((2.0 * mx * my + c1) * (2.0 * cxy + c2)) /
           ((mx * mx + my * my + c1) * (vx + vy + c2));
  endfunction

  initial begin
    real p, s;
    for (int k = 0; k < IMG / 2; k++) begin
      wre[k] = int'($cos(2.0 * 3.14159265358979 * k / IMG) * (1 << TW));
      wim[k] = -int'($sin(2.0 * 3.14159265358979 * k / IMG) * (1 << TW));
    end
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) begin
        int v;
        v = 4 * x + 2 * y + ((x * y * 7) % 23);
        if ((x - 12) * (x - 12) + (y - 18) * (y - 18) < 60) v += 90;
        pix[y][x] = v % 256;
      end

    mode = 0;
    round_trip();
    checks++;
    if (psnr() != 99.0) begin
      failures++;
      $display("FAIL exact round trip is not lossless, PSNR %0.2f dB", psnr());
    end

    mode = 1;
    round_trip();
    p = psnr(); s = ssim();
    $display("RESAC, no upset:             PSNR %0.2f dB  SSIM %0.5f", p, s);
    checks++; if (!(p > 30.0)) begin failures++; $display("FAIL PSNR"); end
    checks++; if (!(s > 0.95)) begin failures++; $display("FAIL SSIM"); end

    mode = 2;
    force dut.r = '0;
    round_trip();
    release dut.r;
    p = psnr(); s = ssim();
    $display("RESAC, worst LOLSP upsets:   PSNR %0.2f dB  SSIM %0.5f", p, s);
    checks++; if (!(p > 30.0)) begin failures++; $display("FAIL PSNR with upsets"); end
    checks++; if (!(s > 0.95)) begin failures++; $display("FAIL SSIM with upsets"); end

    $display("additions on the adder: %0d", n_adds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
