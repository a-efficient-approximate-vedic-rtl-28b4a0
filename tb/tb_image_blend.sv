// tb_image_blend: multiply-blend workload on the 4x4 approximate multiplier.
//
// Multiplicative blending sets each output pixel to the product of the two
// input pixels. Here the inputs are 8-bit grey-scale images generated in the
// bench; each pixel is cut to its upper 4 bits, so the 8-bit product
// (a >> 4) * (b >> 4) is the blend A * B / 256 at 4-bit precision. Four
// image pairs of W x H pixels are generated (smooth crater-like surface,
// flat grey, radial gradient, stripes, each against a synthetic foreground
// with pseudo-random texture) and blended twice: with the avmt module and
// with exact integer multiplication.
//
// Checks: every avmt pixel equals an independent integer model of the
// approximate product; SSIM of the exact blend against itself is 1; SSIM of
// the approximate blend against the exact blend lies in (0, 1). SSIM is the
// mean over non-overlapping 8 x 8 windows with the usual constants
// C1 = (0.01 * 255)^2 and C2 = (0.03 * 255)^2. The per-pair SSIM and the
// share of wrong pixels are printed; they describe these synthetic images,
// not any particular photograph. Mechanisms counted (failure if never seen):
// pixels hit by the approximation, pixels that come out exact.
module tb_image_blend;
  timeunit 1ns; timeprecision 1ps;

  localparam int W = 64;
  localparam int H = 64;
  localparam int WIN = 8;
  localparam int NPAIRS = 4;

  logic [3:0] a, b;
  logic [7:0] z;
  int checks = 0, failures = 0;
  int n_wrong_px = 0, n_exact_px = 0;

  avmt dut (.a, .b, .z);

  int img_a [H][W];
  int img_b [H][W];
  int out_x [H][W];  // exact blend
  int out_p [H][W];  // approximate blend from the multiplier

  function automatic int sub_ref(int x, int y);
    return (x == 3 && y == 3) ? 15 : x * y;
  endfunction

  function automatic int approx_ref(int x, int y);
    int s;
    s = sub_ref(x % 4, y % 4) + 4 * sub_ref(x % 4, y / 4)
      + 4 * sub_ref(x / 4, y % 4) + 16 * sub_ref(x / 4, y / 4);
    return s % 256;
  endfunction

  function automatic int clip8(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  // Background image of pair k.
  function automatic int gen_a(int k, int y, int x);
    int dx, dy, r2;
    case (k)
      0: begin  // crater-like surface: mid grey with dark discs
        dx = x - 20; dy = y - 24; r2 = dx * dx + dy * dy;
        if (r2 < 80) return 70 + r2;
        dx = x - 44; dy = y - 40; r2 = dx * dx + dy * dy;
        if (r2 < 50) return 90 + r2;
        return 150 + ((x * 7 + y * 3) % 23);
      end
      1: return 128;                                    // flat grey
      2: begin                                          // radial gradient
        dx = x - W / 2; dy = y - H / 2;
        return clip8(255 - 3 * (dx * dx + dy * dy) / 8);
      end
      default: return ((x / 8) % 2 == 0) ? 220 : 90;    // stripes
    endcase
  endfunction

  // Foreground image: a dark figure on a bright sky with texture.
  function automatic int gen_b(int y, int x, int noise);
    int v;
    v = 200 - 2 * y;
    if (x > 20 && x < 36 && y > 16) v = 40;             // body
    if ((x - 28) * (x - 28) + (y - 12) * (y - 12) < 30) v = 60;  // head
    if (y > 48 && (x == 44 || x == 45 || x == 52 || x == 53)) v = 30;  // legs
    return clip8(v + noise);
  endfunction

  function automatic real ssim(ref int p [H][W], ref int q [H][W]);
    real c1, c2, acc;
    int nwin;
    c1 = (0.01 * 255.0) ** 2;
    c2 = (0.03 * 255.0) ** 2;
    acc = 0.0; nwin = 0;
    for (int wy = 0; wy < H; wy += WIN) begin
      for (int wx = 0; wx < W; wx += WIN) begin
        real mp, mq, vp, vq, cpq, n;
        n = real'(WIN * WIN);
        mp = 0.0; mq = 0.0;
        for (int y = wy; y < wy + WIN; y++)
          for (int x = wx; x < wx + WIN; x++) begin
            mp += real'(p[y][x]); mq += real'(q[y][x]);
          end
        mp /= n; mq /= n;
        vp = 0.0; vq = 0.0; cpq = 0.0;
        for (int y = wy; y < wy + WIN; y++)
          for (int x = wx; x < wx + WIN; x++) begin
            vp  += (real'(p[y][x]) - mp) ** 2;
            vq  += (real'(q[y][x]) - mq) ** 2;
            cpq += (real'(p[y][x]) - mp) * (real'(q[y][x]) - mq);
          end
        vp /= (n - 1.0); vq /= (n - 1.0); cpq /= (n - 1.0);
        acc += ((2.0 * mp * mq + c1) * (2.0 * cpq + c2))
             / ((mp * mp + mq * mq + c1) * (vp + vq + c2));
        nwin++;
      end
    end
    return acc / real'(nwin);
  endfunction

  initial begin
    real s_self, s_apx, s_sum;
    int wrong_pair;
    void'($urandom(12345));
    s_sum = 0.0;
    for (int k = 0; k < NPAIRS; k++) begin
      wrong_pair = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          img_a[y][x] = gen_a(k, y, x);
          img_b[y][x] = gen_b(y, x, int'($urandom_range(0, 30)) - 15);
        end
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          int pa, pb;
          pa = img_a[y][x] / 16;
          pb = img_b[y][x] / 16;
          a = 4'(pa); b = 4'(pb);
          #1;
          out_x[y][x] = pa * pb;
          out_p[y][x] = int'(z);
          checks++;
          if (int'(z) != approx_ref(pa, pb)) begin
            failures++;
            if (failures < 10)
              $display("FAIL pair %0d pixel (%0d,%0d) %0d x %0d got %0d", k, y, x, pa, pb, z);
          end
          if (int'(z) != pa * pb) begin
            n_wrong_px++; wrong_pair++;
          end else n_exact_px++;
        end
      s_self = ssim(out_x, out_x);
      s_apx  = ssim(out_x, out_p);
      s_sum += s_apx;
      $display("pair %0d: SSIM(approx vs exact) = %0.3f, wrong pixels %0d of %0d",
               k, s_apx, wrong_pair, W * H);
      checks++;
      if (s_self < 0.999999 || s_self > 1.000001) begin
        failures++;
        $display("FAIL SSIM self-check %f", s_self);
      end
      checks++;
      if (!(s_apx > 0.0 && s_apx <= 1.0)) begin
        failures++;
        $display("FAIL SSIM out of range %f", s_apx);
      end
    end
    $display("average SSIM over %0d pairs: %0.3f", NPAIRS, s_sum / NPAIRS);
    $display("mechanisms: approximated pixels=%0d exact pixels=%0d", n_wrong_px, n_exact_px);
    checks++;
    if (n_wrong_px == 0 || n_exact_px == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
