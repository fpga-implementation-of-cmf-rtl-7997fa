// tb_cmf_filter: end-to-end test of the complex matched filter at a
// reduced size (7x7 mask, 24-pixel rows, 16-row frames).
//
// Two filters see the same pixel stream:
//   u_full  a multiplier at every position; its mask is computed here from
//           the CMF formula M = exp(j*2*theta) * r(rho),
//           r(rho) = exp(-(rho-r0)^2/s^2) + exp(-(rho+r0)^2/s^2),
//           quantised to 8-bit signed with the largest value at 127, and
//           loaded through the serial chains. A second mask (other r0)
//           is loaded between frames.
//   u_opt   built with a multiplier plan from a fixed mask whose values
//           were rounded (within +-8, and +-26 for equal / opposite
//           pairs) to zeros, powers of two, equal and opposite pairs, so
//           every kind of tap is present; only its multiplier positions
//           are loaded.
// Frames hold noise plus bright straight lines at known angles, and the
// pixel enable has random gaps (stalls). Checks, all against values
// computed here:
//   * conv_re / conv_im equal the exact correlation of the window with
//     the mask for every pixel whose window lies in data already sent,
//     8 cycles after the pixel (2 + 2*log2(8));
//   * mag within 4.5 % of |conv|, vec = mag * (cos, sin)(angle), and
//     out_valid 35 cycles after conv_valid;
//   * at window centres on a line, the halved angle equals the line
//     direction (modulo 180 degrees) within 8 degrees.
// Counts of stalls, mask loads, tap kinds, and line detections must all
// be non-zero.
module tb_cmf_filter;
  import cmf_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int M   = 7;
  localparam int R   = 24;
  localparam int H   = 16;
  localparam int C0  = (M - 1) / 2;
  localparam int LATC = 8;         // pixel to conv_valid
  localparam int LATV = 35;        // conv_valid to out_valid
  localparam int AW  = PROD_W + 2 * $clog2(M);
  localparam real PI = 3.14159265358979;

  // Fixed mask of u_opt, C[row][col], row 0 at the top of the window.
  localparam int ORE [M][M] = '{
    '{  0,  -8, -32,  -64, -32,  -8,  0},
    '{  8,   0, -86, -127, -86,   0,  8},
    '{ 32,  85,   0,  -64,   0,  85, 32},
    '{ 64, 127,  64,    0,  64, 127, 64},
    '{ 32,  85,   0,  -64,   0,  85, 32},
    '{  8,   0, -86, -127, -86,   0,  8},
    '{  0,  -8, -32,  -64, -32,  -8,  0}};
  localparam int OIM [M][M] = '{
    '{  4,  16,  32,    0, -32, -16,  -4},
    '{ 16,  79,  86,    0, -86, -79, -16},
    '{ 32,  85, 100,    0,-100, -85, -32},
    '{  0,   0,   0,    0,   0,   0,   0},
    '{-32, -85,-100,    0, 100,  85,  32},
    '{-16, -79, -86,    0,  86,  79,  16},
    '{ -4, -16, -32,    0,  32,  16,   4}};

  // Chain position (k, j) multiplies pixel (y-k, x-j): mask entry
  // C[M-1-k][M-1-j].
  function automatic tap_pair_plan_t [M-1:0][M-1:0] opt_plan();
    tap_pair_plan_t [M-1:0][M-1:0] p;
    for (int k = 0; k < M; k++)
      for (int j = 0; j < M; j++)
        p[k][j] = plan_pair(ORE[M-1-k][M-1-j], OIM[M-1-k][M-1-j]);
    return p;
  endfunction
  localparam tap_pair_plan_t [M-1:0][M-1:0] OPLAN = opt_plan();

  int checks = 0, failures = 0;
  int n_stall = 0, n_load = 0, n_line = 0, n_conv = 0, n_vec = 0;
  int n_kind [5] = '{0, 0, 0, 0, 0};

  logic  rst_n, pix_valid;
  pix_t  pix;
  logic  cs_re [2];
  logic  cs_im [2];
  coef_t ci_re [2];
  coef_t ci_im [2];
  logic  cv [2];
  logic  ov [2];
  logic signed [AW-1:0]    cre_o [2];
  logic signed [AW-1:0]    cim_o [2];
  logic        [AW-1:0]    mag_o [2];
  logic signed [ANG_W-1:0] ang_o [2];
  logic signed [AW:0]      vx_o  [2];
  logic signed [AW:0]      vy_o  [2];

  cmf_filter #(.M(M), .R(R)) u_full (
    .clk(clk), .rst_n(rst_n), .pix_valid(pix_valid), .pix(pix),
    .coef_re_shift(cs_re[0]), .coef_re_in(ci_re[0]),
    .coef_im_shift(cs_im[0]), .coef_im_in(ci_im[0]),
    .conv_valid(cv[0]), .conv_re(cre_o[0]), .conv_im(cim_o[0]),
    .out_valid(ov[0]), .mag(mag_o[0]), .angle(ang_o[0]), .vec_x(vx_o[0]), .vec_y(vy_o[0])
  );
  cmf_filter #(.M(M), .R(R), .PLAN(OPLAN)) u_opt (
    .clk(clk), .rst_n(rst_n), .pix_valid(pix_valid), .pix(pix),
    .coef_re_shift(cs_re[1]), .coef_re_in(ci_re[1]),
    .coef_im_shift(cs_im[1]), .coef_im_in(ci_im[1]),
    .conv_valid(cv[1]), .conv_re(cre_o[1]), .conv_im(cim_o[1]),
    .out_valid(ov[1]), .mag(mag_o[1]), .angle(ang_o[1]), .vec_x(vx_o[1]), .vec_y(vy_o[1])
  );

  // Mask coefficients by chain position, per instance.
  int cre [2][M][M];
  int cim [2][M][M];

  typedef struct {
    int  cyc;        // cycle the pixel was accepted
    bit  full;       // window lies in data already sent
    int  re [2];
    int  im [2];
    real line_ang;   // line direction at the window centre, or -1000
  } exp_t;
  exp_t qc [2][$];
  exp_t qv [2][$];

  int hist [$];
  int cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic expect_true(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // CMF mask for radius r0 and width s, quantised to 8 bits; the centre
  // is zero (the angle is undefined there).
  task automatic make_cmf_mask(real r0, real s);
    real fre [M][M];
    real fim [M][M];
    real mx = 0.0, rho, th, rr;
    for (int row = 0; row < M; row++)
      for (int col = 0; col < M; col++) begin
        rho = $sqrt(real'((row - C0) ** 2 + (col - C0) ** 2));
        th  = $atan2(real'(row - C0), real'(col - C0));
        rr  = $exp(-((rho - r0) ** 2) / (s * s)) + $exp(-((rho + r0) ** 2) / (s * s));
        fre[row][col] = (rho == 0.0) ? 0.0 : $cos(2.0 * th) * rr;
        fim[row][col] = (rho == 0.0) ? 0.0 : $sin(2.0 * th) * rr;
        if (rabs(fre[row][col]) > mx) mx = rabs(fre[row][col]);
        if (rabs(fim[row][col]) > mx) mx = rabs(fim[row][col]);
      end
    for (int k = 0; k < M; k++)
      for (int j = 0; j < M; j++) begin
        cre[0][k][j] = $rtoi($floor(fre[M-1-k][M-1-j] / mx * 127.0 + 0.5));
        cim[0][k][j] = $rtoi($floor(fim[M-1-k][M-1-j] / mx * 127.0 + 0.5));
      end
  endtask

  // Serial load of one instance: last chain position first.
  task automatic load_mask(int inst);
    for (int part = 0; part < 2; part++)
      for (int k = M - 1; k >= 0; k--)
        for (int j = M - 1; j >= 0; j--) begin
          if (inst == 1 && part == 0 && OPLAN[k][j].re.kind != TAP_MUL) continue;
          if (inst == 1 && part == 1 && OPLAN[k][j].im.kind != TAP_MUL) continue;
          @(negedge clk);
          if (part == 0) begin cs_re[inst] = 1'b1; ci_re[inst] = coef_t'(cre[inst][k][j]); cs_im[inst] = 1'b0; end
          else           begin cs_im[inst] = 1'b1; ci_im[inst] = coef_t'(cim[inst][k][j]); cs_re[inst] = 1'b0; end
        end
    @(negedge clk);
    cs_re[inst] = 1'b0; cs_im[inst] = 1'b0;
    n_load++;
  endtask

  // Test image: noise plus three bright lines through the frame.
  localparam int NL = 3;
  localparam real LY [NL] = '{4.0, 8.0, 11.0};
  localparam real LX [NL] = '{6.0, 17.0, 10.0};
  localparam real LA [NL] = '{30.0, -60.0, 0.0};   // degrees, y axis down

  function automatic real line_dist(int l, real y, real x);
    real a = LA[l] * PI / 180.0;
    return rabs(-(x - LX[l]) * $sin(a) + (y - LY[l]) * $cos(a));
  endfunction

  function automatic int image_pixel(int y, int x, int frame);
    real v = 20.0 + real'($urandom_range(0, 12));
    real d;
    if (frame > 0) begin
      for (int l = 0; l < NL; l++) begin
        d = line_dist(l, real'(y), real'(x));
        if (d < 1.5) v += 180.0 * (1.0 - d / 1.5);
      end
    end
    return (v > 255.0) ? 255 : $rtoi(v);
  endfunction

  // Direction of the only line near (y, x), or -1000 if none / several.
  function automatic real line_at(int y, int x);
    real found = -1000.0;
    int  near = 0;
    for (int l = 0; l < NL; l++) begin
      if (line_dist(l, real'(y), real'(x)) < 0.35) found = LA[l];
      if (line_dist(l, real'(y), real'(x)) < 4.0) near++;
    end
    return (near == 1) ? found : -1000.0;
  endfunction

  task automatic send_frame(int frame);
    int y, x, n;
    exp_t e;
    for (y = 0; y < H; y++)
      for (x = 0; x < R; x++) begin
        @(negedge clk);
        while ($urandom_range(0, 5) == 0) begin
          pix_valid = 1'b0;
          n_stall++;
          @(negedge clk);
        end
        pix_valid = 1'b1;
        pix = pix_t'(image_pixel(y, x, frame));
        hist.push_back(int'(pix));
        n = hist.size() - 1;
        e.cyc = cyc;
        e.full = (n >= (M - 1) * R + M - 1);
        e.line_ang = -1000.0;
        for (int i = 0; i < 2; i++) begin
          e.re[i] = 0; e.im[i] = 0;
          if (e.full)
            for (int k = 0; k < M; k++)
              for (int j = 0; j < M; j++) begin
                e.re[i] += hist[n - k * R - j] * cre[i][k][j];
                e.im[i] += hist[n - k * R - j] * cim[i][k][j];
              end
        end
        // Window centre (y - C0, x - C0), only when the window does not wrap.
        if (frame > 0 && x >= M - 1 && y >= M - 1) e.line_ang = line_at(y - C0, x - C0);
        qc[0].push_back(e);
        qc[1].push_back(e);
      end
    @(negedge clk);
    pix_valid = 1'b0;
  endtask

  // Output monitors, one per instance.
  for (genvar i = 0; i < 2; i++) begin : g_mon
    always @(posedge clk) begin
      #1;
      if (cv[i]) begin
        exp_t e;
        if (qc[i].size() == 0) begin
          failures++; $display("FAIL unexpected conv_valid");
        end else begin
          e = qc[i].pop_front();
          expect_true("conv latency", cyc - e.cyc == LATC);
          if (e.full) begin
            n_conv++;
            expect_true("conv_re", int'(cre_o[i]) == e.re[i]);
            expect_true("conv_im", int'(cim_o[i]) == e.im[i]);
          end
          e.cyc = cyc;
          qv[i].push_back(e);
        end
      end
      if (ov[i]) begin
        exp_t e;
        real m, th, d;
        if (qv[i].size() == 0) begin
          failures++; $display("FAIL unexpected out_valid");
        end else begin
          e = qv[i].pop_front();
          expect_true("vector latency", cyc - e.cyc == LATV);
          if (e.full) begin
            n_vec++;
            m = $sqrt(real'(e.re[i]) ** 2 + real'(e.im[i]) ** 2);
            expect_true("magnitude", real'(mag_o[i]) <= m * 1.045 + 2.0 && real'(mag_o[i]) >= m * 0.955 - 2.0);
            th = real'(ang_o[i]) / 65536.0 * 2.0 * PI;
            d = $sqrt((real'(vx_o[i]) - real'(mag_o[i]) * $cos(th)) ** 2 +
                      (real'(vy_o[i]) - real'(mag_o[i]) * $sin(th)) ** 2);
            expect_true("vector", d <= 0.001 * real'(mag_o[i]) + 12.0);
            if (i == 0 && e.line_ang > -999.0) begin
              d = real'(ang_o[i]) / 65536.0 * 360.0 - e.line_ang;
              while (d > 90.0)   d -= 180.0;
              while (d <= -90.0) d += 180.0;
              n_line++;
              expect_true($sformatf("line direction %f vs %f", real'(ang_o[i]) / 65536.0 * 360.0, e.line_ang),
                          d < 8.0 && d > -8.0);
            end
          end
        end
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; pix_valid = 1'b0; pix = '0;
    cs_re = '{0, 0}; cs_im = '{0, 0}; ci_re = '{0, 0}; ci_im = '{0, 0};
    for (int k = 0; k < M; k++)
      for (int j = 0; j < M; j++) begin
        cre[1][k][j] = ORE[M-1-k][M-1-j];
        cim[1][k][j] = OIM[M-1-k][M-1-j];
        n_kind[int'(OPLAN[k][j].re.kind)]++;
        n_kind[int'(OPLAN[k][j].im.kind)]++;
      end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    make_cmf_mask(2.0, 1.2);
    load_mask(0);
    load_mask(1);
    send_frame(0);
    send_frame(1);
    repeat (LATC + LATV + 5) @(posedge clk);
    // New mask for the full instance, then another frame with lines.
    make_cmf_mask(1.5, 1.0);
    load_mask(0);
    send_frame(2);
    repeat (LATC + LATV + 5) @(posedge clk);

    $display("pixels %0d, full windows %0d, vectors %0d, stalls %0d, mask loads %0d, line points %0d",
             hist.size(), n_conv, n_vec, n_stall, n_load, n_line);
    $display("tap kinds: mul %0d zero %0d shift %0d same %0d neg %0d",
             n_kind[0], n_kind[1], n_kind[2], n_kind[3], n_kind[4]);
    expect_true("stalls happened", n_stall > 0);
    expect_true("mask reloaded", n_load >= 3);
    expect_true("line points checked", n_line > 0);
    for (int i = 0; i < 5; i++) expect_true($sformatf("tap kind %0d used", i), n_kind[i] > 0);
    expect_true("all outputs drained", qc[0].size() == 0 && qv[0].size() == 0 && qc[1].size() == 0 && qv[1].size() == 0);
    expect_true("windows compared", n_conv > 0 && n_vec == n_conv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
