// tb_cmf_full: one complete 640 x 480 frame through the filter at its
// default size (15 x 15 mask, 640-pixel rows, 16 CORDIC iterations).
//
// The mask is computed here from the CMF formula
//   M = exp(j*2*theta) * r(rho),
//   r(rho) = exp(-(rho-r0)^2/s^2) + exp(-(rho+r0)^2/s^2),
// with r0 = 3 and s = 1.5 (so that 2*r0 + 6*s = 15 fills the mask),
// quantised to 8-bit signed with the largest value at 127 and loaded
// through the serial chains (225 real, 225 imaginary values). The frame
// is noise plus bright lines at known angles; pixels arrive one per
// clock with a short gap after every row (line blanking). Checks:
//   * conv_re / conv_im equal the exact correlation for every pixel whose
//     window lies in data already sent (about 298 000 pixels);
//   * each conv result appears 10 cycles and each vector 45 cycles after
//     its pixel, so the filter keeps pace with one pixel per clock;
//   * mag within 4.5 % of |conv| and vec = mag * (cos, sin)(angle);
//   * at window centres on a line the halved angle gives the line
//     direction (modulo 180 degrees) within 8 degrees.
module tb_cmf_full;
  import cmf_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int M    = 15;
  localparam int R    = 640;
  localparam int H    = 480;
  localparam int C0   = (M - 1) / 2;
  localparam int LATC = 10;
  localparam int LATV = 35;
  localparam int AW   = PROD_W + 2 * $clog2(M);
  localparam real PI  = 3.14159265358979;

  int checks = 0, failures = 0;
  int n_stall = 0, n_line = 0, n_conv = 0, n_vec = 0;

  logic  rst_n, pix_valid;
  pix_t  pix;
  logic  cs_re, cs_im;
  coef_t ci_re, ci_im;
  logic  cv, ov;
  logic signed [AW-1:0]    cre_o, cim_o;
  logic        [AW-1:0]    mag_o;
  logic signed [ANG_W-1:0] ang_o;
  logic signed [AW:0]      vx_o, vy_o;

  cmf_filter u_dut (
    .clk(clk), .rst_n(rst_n), .pix_valid(pix_valid), .pix(pix),
    .coef_re_shift(cs_re), .coef_re_in(ci_re),
    .coef_im_shift(cs_im), .coef_im_in(ci_im),
    .conv_valid(cv), .conv_re(cre_o), .conv_im(cim_o),
    .out_valid(ov), .mag(mag_o), .angle(ang_o), .vec_x(vx_o), .vec_y(vy_o)
  );

  int cre [M][M];
  int cim [M][M];

  typedef struct {
    int  cyc;
    bit  full;
    int  re;
    int  im;
    real line_ang;
  } exp_t;
  exp_t qc [$];
  exp_t qv [$];

  int hist [$];
  int cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic expect_true(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

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
        cre[k][j] = $rtoi($floor(fre[M-1-k][M-1-j] / mx * 127.0 + 0.5));
        cim[k][j] = $rtoi($floor(fim[M-1-k][M-1-j] / mx * 127.0 + 0.5));
      end
  endtask

  task automatic load_mask();
    for (int part = 0; part < 2; part++)
      for (int k = M - 1; k >= 0; k--)
        for (int j = M - 1; j >= 0; j--) begin
          @(negedge clk);
          if (part == 0) begin cs_re = 1'b1; ci_re = coef_t'(cre[k][j]); cs_im = 1'b0; end
          else           begin cs_im = 1'b1; ci_im = coef_t'(cim[k][j]); cs_re = 1'b0; end
        end
    @(negedge clk);
    cs_re = 1'b0; cs_im = 1'b0;
  endtask

  localparam int NL = 5;
  localparam real LY [NL] = '{100.0, 240.0, 380.0, 240.0, 300.0};
  localparam real LX [NL] = '{120.0, 320.0, 500.0, 80.0, 560.0};
  localparam real LA [NL] = '{20.0, -45.0, 75.0, 90.0, 0.0};

  function automatic real line_dist(int l, real y, real x);
    real a = LA[l] * PI / 180.0;
    return rabs(-(x - LX[l]) * $sin(a) + (y - LY[l]) * $cos(a));
  endfunction

  function automatic int image_pixel(int y, int x);
    real v = 20.0 + real'($urandom_range(0, 12));
    real d;
    for (int l = 0; l < NL; l++) begin
      d = line_dist(l, real'(y), real'(x));
      if (d < 2.0) v += 180.0 * (1.0 - d / 2.0);
    end
    return (v > 255.0) ? 255 : $rtoi(v);
  endfunction

  function automatic real line_at(int y, int x);
    real found = -1000.0;
    int  near = 0;
    for (int l = 0; l < NL; l++) begin
      if (line_dist(l, real'(y), real'(x)) < 0.35) found = LA[l];
      if (line_dist(l, real'(y), real'(x)) < 10.0) near++;
    end
    return (near == 1) ? found : -1000.0;
  endfunction

  task automatic send_frame();
    int n;
    exp_t e;
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < R; x++) begin
        @(negedge clk);
        pix_valid = 1'b1;
        pix = pix_t'(image_pixel(y, x));
        hist.push_back(int'(pix));
        n = hist.size() - 1;
        e.cyc = cyc;
        e.full = (n >= (M - 1) * R + M - 1);
        e.re = 0; e.im = 0;
        if (e.full)
          for (int k = 0; k < M; k++)
            for (int j = 0; j < M; j++) begin
              e.re += hist[n - k * R - j] * cre[k][j];
              e.im += hist[n - k * R - j] * cim[k][j];
            end
        e.line_ang = -1000.0;
        if (x >= M - 1 && y >= M - 1) e.line_ang = line_at(y - C0, x - C0);
        qc.push_back(e);
      end
      // Line blanking.
      repeat (4) begin
        @(negedge clk);
        pix_valid = 1'b0;
        n_stall++;
      end
    end
    @(negedge clk);
    pix_valid = 1'b0;
  endtask

  always @(posedge clk) begin
    #1;
    if (cv) begin
      exp_t e;
      if (qc.size() == 0) begin
        failures++; $display("FAIL unexpected conv_valid");
      end else begin
        e = qc.pop_front();
        expect_true("conv latency", cyc - e.cyc == LATC);
        if (e.full) begin
          n_conv++;
          expect_true("conv_re", int'(cre_o) == e.re);
          expect_true("conv_im", int'(cim_o) == e.im);
        end
        e.cyc = cyc;
        qv.push_back(e);
      end
    end
    if (ov) begin
      exp_t e;
      real m, th, d;
      if (qv.size() == 0) begin
        failures++; $display("FAIL unexpected out_valid");
      end else begin
        e = qv.pop_front();
        expect_true("vector latency", cyc - e.cyc == LATV);
        if (e.full) begin
          n_vec++;
          m = $sqrt(real'(e.re) ** 2 + real'(e.im) ** 2);
          expect_true("magnitude", real'(mag_o) <= m * 1.045 + 2.0 && real'(mag_o) >= m * 0.955 - 2.0);
          th = real'(ang_o) / 65536.0 * 2.0 * PI;
          d = $sqrt((real'(vx_o) - real'(mag_o) * $cos(th)) ** 2 +
                    (real'(vy_o) - real'(mag_o) * $sin(th)) ** 2);
          expect_true("vector", d <= 0.001 * real'(mag_o) + 12.0);
          if (e.line_ang > -999.0) begin
            d = real'(ang_o) / 65536.0 * 360.0 - e.line_ang;
            while (d > 90.0)   d -= 180.0;
            while (d <= -90.0) d += 180.0;
            n_line++;
            expect_true($sformatf("line direction %f vs %f", real'(ang_o) / 65536.0 * 360.0, e.line_ang),
                        d < 8.0 && d > -8.0);
          end
        end
      end
    end
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    rst_n = 1'b0; pix_valid = 1'b0; pix = '0;
    cs_re = 1'b0; cs_im = 1'b0; ci_re = '0; ci_im = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    make_cmf_mask(3.0, 1.5);
    load_mask();
    t0 = cyc;
    send_frame();
    repeat (LATC + LATV + 5) @(posedge clk);
    $display("frame %0dx%0d in %0d cycles: full windows %0d, vectors %0d, blanking cycles %0d, line points %0d",
             R, H, cyc - t0, n_conv, n_vec, n_stall, n_line);
    expect_true("one pixel per clock", cyc - t0 <= R * H + n_stall + LATC + LATV + 10);
    expect_true("line points checked", n_line > 0);
    expect_true("all outputs drained", qc.size() == 0 && qv.size() == 0);
    expect_true("windows compared", n_conv == R * H - ((M - 1) * R + M - 1) && n_vec == n_conv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
