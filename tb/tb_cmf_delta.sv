// tb_cmf_delta: the round-off experiment. Four 15 x 15 filters are built
// from the same CMF mask (r0 = 3, sigma = 1.5) with round-off intervals
// DELTA = 0, 4, 10 and 28, so each has its own multiplier plan. All
// filter the same 64-pixel-wide, 48-row image (noise plus lines). For
// each build the testbench reports
//   * multipliers used (equal to the loadable coefficient registers),
//   * mask error: L2 norm of (rounded - ideal mask) / L2 norm of ideal,
//   * PSNR of the output intensity against the intensity computed here
//     in double precision with the ideal mask,
// and checks, against values computed here:
//   * every coefficient moved by at most DELTA from its 8-bit value;
//   * conv_re / conv_im equal the exact correlation with the rounded
//     mask for every full window;
//   * more DELTA never needs more multipliers, and DELTA = 0 has the
//     lowest mask error and a PSNR above 30 dB.
module tb_cmf_delta;
  import cmf_pkg::*;
  import cmf_mask_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int  M   = 15;
  localparam int  R   = 64;
  localparam int  H   = 48;
  localparam int  C0  = (M - 1) / 2;
  localparam int  ND  = 4;
  localparam int  DELTAS [ND] = '{0, 4, 10, 28};
  localparam real R0  = 3.0;
  localparam real SG  = 1.5;
  localparam real SC  = cmf_scale(M, R0, SG);
  localparam int  AW  = PROD_W + 2 * $clog2(M);

  function automatic tap_pair_plan_t [M-1:0][M-1:0] mkplan(int delta);
    tap_pair_plan_t [M-1:0][M-1:0] p;
    for (int k = 0; k < M; k++)
      for (int j = 0; j < M; j++)
        p[k][j] = cmf_tap_plan(k, j, M, R0, SG, SC, delta);
    return p;
  endfunction

  int checks = 0, failures = 0;

  logic  rst_n, pix_valid;
  pix_t  pix;
  logic  cs_re [ND];
  logic  cs_im [ND];
  coef_t ci_re [ND];
  coef_t ci_im [ND];
  logic  cv [ND];
  logic  ov [ND];
  logic signed [AW-1:0]    cre_o [ND];
  logic signed [AW-1:0]    cim_o [ND];
  logic        [AW-1:0]    mag_o [ND];
  logic signed [ANG_W-1:0] ang_o [ND];
  logic signed [AW:0]      vx_o  [ND];
  logic signed [AW:0]      vy_o  [ND];

  // Plans by instance, for loading and counting.
  tap_pair_plan_t [M-1:0][M-1:0] plans [ND];

  for (genvar d = 0; d < ND; d++) begin : g_flt
    localparam tap_pair_plan_t [M-1:0][M-1:0] PL = mkplan(DELTAS[d]);
    cmf_filter #(.M(M), .R(R), .PLAN(PL)) u_dut (
      .clk(clk), .rst_n(rst_n), .pix_valid(pix_valid), .pix(pix),
      .coef_re_shift(cs_re[d]), .coef_re_in(ci_re[d]),
      .coef_im_shift(cs_im[d]), .coef_im_in(ci_im[d]),
      .conv_valid(cv[d]), .conv_re(cre_o[d]), .conv_im(cim_o[d]),
      .out_valid(ov[d]), .mag(mag_o[d]), .angle(ang_o[d]), .vec_x(vx_o[d]), .vec_y(vy_o[d])
    );
    initial plans[d] = PL;
  end

  // Rounded coefficients by chain position (k, j) and ideal scaled mask.
  int  cre [ND][M][M];
  int  cim [ND][M][M];
  real ire [M][M];
  real iim [M][M];

  int  hist [$];
  int  exp_re [ND][$];
  int  exp_im [ND][$];
  real ideal_mag [ND][$];
  bit  full_q [ND][$];
  bit  full_v [ND][$];
  real sq_err [ND];
  real peak = 0.0;
  int  n_out [ND];

  task automatic expect_true(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic load_masks();
    for (int d = 0; d < ND; d++)
      for (int part = 0; part < 2; part++)
        for (int k = M - 1; k >= 0; k--)
          for (int j = M - 1; j >= 0; j--) begin
            if (part == 0 && plans[d][k][j].re.kind != TAP_MUL) continue;
            if (part == 1 && plans[d][k][j].im.kind != TAP_MUL) continue;
            @(negedge clk);
            cs_re[d] = (part == 0); cs_im[d] = (part == 1);
            ci_re[d] = coef_t'(cre[d][k][j]); ci_im[d] = coef_t'(cim[d][k][j]);
            @(negedge clk);
            cs_re[d] = 1'b0; cs_im[d] = 1'b0;
          end
  endtask

  function automatic real line_dist(real y, real x, real y0, real x0, real a_deg);
    real a = a_deg * 3.14159265358979 / 180.0;
    real d = -(x - x0) * $sin(a) + (y - y0) * $cos(a);
    return (d < 0.0) ? -d : d;
  endfunction

  function automatic int image_pixel(int y, int x);
    real v = 30.0 + real'($urandom_range(0, 20));
    real d;
    d = line_dist(real'(y), real'(x), 20.0, 20.0, 35.0);
    if (d < 2.0) v += 150.0 * (1.0 - d / 2.0);
    d = line_dist(real'(y), real'(x), 30.0, 45.0, -70.0);
    if (d < 2.0) v += 150.0 * (1.0 - d / 2.0);
    return (v > 255.0) ? 255 : $rtoi(v);
  endfunction

  for (genvar d = 0; d < ND; d++) begin : g_mon
    always @(posedge clk) begin : p_mon
      bit  f;
      int  er, ei;
      real im;
      #1;
      if (cv[d]) begin
        f  = full_q[d].pop_front();
        er = exp_re[d].pop_front();
        ei = exp_im[d].pop_front();
        if (f) begin
          expect_true($sformatf("conv_re delta %0d", DELTAS[d]), int'(cre_o[d]) == er);
          expect_true($sformatf("conv_im delta %0d", DELTAS[d]), int'(cim_o[d]) == ei);
        end
        full_v[d].push_back(f);
      end
      if (ov[d]) begin
        f  = full_v[d].pop_front();
        im = ideal_mag[d].pop_front();
        if (f) begin
          sq_err[d] += (real'(mag_o[d]) - im) ** 2;
          n_out[d]++;
        end
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real merr [ND];
    real mnorm;
    int  nmul [ND];
    int  n, q;
    real xr, xi, m;
    rst_n = 1'b0; pix_valid = 1'b0; pix = '0;
    for (int d = 0; d < ND; d++) begin
      cs_re[d] = 1'b0; cs_im[d] = 1'b0; ci_re[d] = '0; ci_im[d] = '0;
      sq_err[d] = 0.0; n_out[d] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // Masks, round-off bounds, multiplier counts, mask errors.
    mnorm = 0.0;
    for (int k = 0; k < M; k++)
      for (int j = 0; j < M; j++) begin
        ire[k][j] = cmf_ideal(1'b0, M - 1 - k, M - 1 - j, M, R0, SG) * SC;
        iim[k][j] = cmf_ideal(1'b1, M - 1 - k, M - 1 - j, M, R0, SG) * SC;
        mnorm += ire[k][j] ** 2 + iim[k][j] ** 2;
      end
    for (int d = 0; d < ND; d++) begin
      nmul[d] = 0; merr[d] = 0.0;
      for (int k = 0; k < M; k++)
        for (int j = 0; j < M; j++) begin
          cre[d][k][j] = cmf_rounded(1'b0, M - 1 - k, M - 1 - j, M, R0, SG, SC, DELTAS[d]);
          cim[d][k][j] = cmf_rounded(1'b1, M - 1 - k, M - 1 - j, M, R0, SG, SC, DELTAS[d]);
          q = $rtoi($floor(ire[k][j] + 0.5));
          expect_true("real coefficient within delta", cre[d][k][j] - q <= DELTAS[d] && q - cre[d][k][j] <= DELTAS[d]);
          q = $rtoi($floor(iim[k][j] + 0.5));
          expect_true("imaginary coefficient within delta", cim[d][k][j] - q <= DELTAS[d] && q - cim[d][k][j] <= DELTAS[d]);
          if (plans[d][k][j].re.kind == TAP_MUL) nmul[d]++;
          if (plans[d][k][j].im.kind == TAP_MUL) nmul[d]++;
          merr[d] += (real'(cre[d][k][j]) - ire[k][j]) ** 2 + (real'(cim[d][k][j]) - iim[k][j]) ** 2;
        end
      merr[d] = $sqrt(merr[d] / mnorm) * 100.0;
    end

    load_masks();

    for (int y = 0; y < H; y++)
      for (int x = 0; x < R; x++) begin
        @(negedge clk);
        pix_valid = 1'b1;
        pix = pix_t'(image_pixel(y, x));
        hist.push_back(int'(pix));
        n = hist.size() - 1;
        xr = 0.0; xi = 0.0;
        for (int k = 0; k < M; k++)
          for (int j = 0; j < M; j++)
            if (n >= (M - 1) * R + M - 1) begin
              xr += real'(hist[n - k * R - j]) * ire[k][j];
              xi += real'(hist[n - k * R - j]) * iim[k][j];
            end
        m = $sqrt(xr * xr + xi * xi);
        if (n >= (M - 1) * R + M - 1 && m > peak) peak = m;
        for (int d = 0; d < ND; d++) begin
          int er, ei;
          er = 0; ei = 0;
          if (n >= (M - 1) * R + M - 1)
            for (int k = 0; k < M; k++)
              for (int j = 0; j < M; j++) begin
                er += hist[n - k * R - j] * cre[d][k][j];
                ei += hist[n - k * R - j] * cim[d][k][j];
              end
          full_q[d].push_back(n >= (M - 1) * R + M - 1);
          exp_re[d].push_back(er);
          exp_im[d].push_back(ei);
          ideal_mag[d].push_back(m);
        end
      end
    @(negedge clk);
    pix_valid = 1'b0;
    repeat (60) @(posedge clk);

    for (int d = 0; d < ND; d++) begin
      real psnr;
      psnr = 10.0 * $log10(peak * peak / (sq_err[d] / real'(n_out[d]) + 1e-9));
      $display("delta %2d: multipliers %3d, mask error %5.2f %%, PSNR %5.2f dB over %0d pixels",
               DELTAS[d], nmul[d], merr[d], psnr, n_out[d]);
      expect_true("outputs seen", n_out[d] == R * H - ((M - 1) * R + M - 1));
      if (d == 0) expect_true("PSNR at delta 0 above 30 dB", psnr > 30.0);
      if (d > 0) begin
        expect_true("multipliers do not grow with delta", nmul[d] <= nmul[d-1]);
        expect_true("mask error lowest at delta 0", merr[d] >= merr[0]);
      end
    end
    expect_true("fewer multipliers at the largest delta", nmul[ND-1] < nmul[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
