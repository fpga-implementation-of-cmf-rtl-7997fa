// cmf_filter: real-time complex matched filter (CMF) for line extraction.
//
// The filter correlates a raster-scan pixel stream with one complex
// M x M mask, whose real and imaginary parts are two real masks, and
// turns the complex result into a matching intensity vector: the
// strength of a line-like feature at each pixel and its direction.
//
// Structure (one pixel per enabled clock, no external memory):
//   * M active parts (active_part), one per mask row. Each holds M
//     pixels in registers, multiplies them with that row's real and
//     imaginary coefficients and sums the row in two adder trees.
//   * M-1 passive parts (passive_part), RAM delays of R - M pixels that
//     chain the active parts, so that together they hold
//     M^2 + (M-1)(R-M) pixels and present an M x M sliding window.
//   * Two adder trees (tree_adder) sum the M row results into the complex
//     convolution value conv_re + j*conv_im.
//   * cmf_vector computes the intensity |conv|, halves the angle of conv
//     between two CORDICs and returns the vector (vec_x, vec_y).
//
// Window geometry: active part k, register j holds the pixel k rows
// above and j columns left of the newest pixel. The coefficient loaded
// for (k, j) therefore multiplies image pixel (y - k, x - j); a mask
// given as C[row][col], row 0 at the top, is loaded with
// (k, j) = (M-1-row, M-1-col). Near the left image edge the window
// wraps into the previous row, as a plain line-buffer structure does.
//
// Coefficient load: two serial chains (real, imaginary). A value shifted
// in enters active part 0 position 0 and moves up through positions
// 1..M-1, then into active part 1, and so on; only TAP_MUL positions of
// PLAN hold a register. Load the chain value for the last position first.
//
// Timing: pix is taken when pix_valid is high; nothing in the window
// moves otherwise. For every accepted pixel conv_valid rises
// 2 + 2*ceil(log2(M)) cycles later and out_valid 2*NIT + 3 cycles after
// that (45 cycles in total with the defaults).
//
// Follows the description: 15 x 15 mask, 640-pixel rows, active/passive
// window, real and imaginary coefficient rows with separate multipliers,
// tree adders, absolute value, angle halving between two CORDICs, and
// the multiplier plan (equal / inverse / zero / 2^N savings, fixed when
// the filter is built). This design's own choices: 8-bit pixels, 8-bit
// signed coefficients, 24-bit accumulation (exact), 16 CORDIC iterations,
// 16-bit binary angles, the pipelining and the serial chain order.
module cmf_filter
  import cmf_pkg::*;
#(
  parameter int unsigned    M    = MSIZE_DEF,
  parameter int unsigned    R    = RSIZE_DEF,
  parameter int unsigned    NIT  = 16,
  parameter tap_pair_plan_t [M-1:0][M-1:0] PLAN = {M*M{PAIR_PLAN_MUL}},
  localparam int unsigned   ROW_W = PROD_W + $clog2(M),
  localparam int unsigned   ACC_W = ROW_W + $clog2(M)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // pixel stream from the image sensor interface
  input  logic                    pix_valid,
  input  pix_t                    pix,
  // serial mask coefficient load
  input  logic                    coef_re_shift,
  input  coef_t                   coef_re_in,
  input  logic                    coef_im_shift,
  input  coef_t                   coef_im_in,
  // complex convolution value
  output logic                    conv_valid,
  output logic signed [ACC_W-1:0] conv_re,
  output logic signed [ACC_W-1:0] conv_im,
  // matching intensity vector
  output logic                    out_valid,
  output logic        [ACC_W-1:0] mag,
  output logic signed [ANG_W-1:0] angle,
  output logic signed [ACC_W:0]   vec_x,
  output logic signed [ACC_W:0]   vec_y
);

  localparam int unsigned LAT_CONV = 2 + 2 * $clog2(M);

  if (M < 2 || R < M + 2) begin : g_bad_size
    $error("cmf_filter: need M >= 2 and R >= M + 2");
  end

  pix_t  row_in   [M];
  pix_t  row_out  [M];
  coef_t cre_link [M+1];
  coef_t cim_link [M+1];
  logic signed [ROW_W-1:0] row_re [M];
  logic signed [ROW_W-1:0] row_im [M];

  assign row_in[0]   = pix;
  assign cre_link[0] = coef_re_in;
  assign cim_link[0] = coef_im_in;

  for (genvar k = 0; k < M; k++) begin : g_row
    active_part #(.M(M), .ROW_W(ROW_W), .PLAN(PLAN[k])) u_active (
      .clk          (clk),
      .rst_n        (rst_n),
      .shift        (pix_valid),
      .pix_in       (row_in[k]),
      .pix_out      (row_out[k]),
      .coef_re_shift(coef_re_shift),
      .coef_re_in   (cre_link[k]),
      .coef_re_out  (cre_link[k+1]),
      .coef_im_shift(coef_im_shift),
      .coef_im_in   (cim_link[k]),
      .coef_im_out  (cim_link[k+1]),
      .row_re       (row_re[k]),
      .row_im       (row_im[k])
    );
    if (k < M - 1) begin : g_passive
      passive_part #(.W(PIX_W), .DEPTH(R - M)) u_passive (
        .clk  (clk),
        .rst_n(rst_n),
        .shift(pix_valid),
        .din  (row_out[k]),
        .dout (row_in[k+1])
      );
    end
  end

  tree_adder #(.N(M), .W_IN(ROW_W), .W_OUT(ACC_W)) u_sum_re (
    .clk(clk), .in_data(row_re), .sum(conv_re)
  );
  tree_adder #(.N(M), .W_IN(ROW_W), .W_OUT(ACC_W)) u_sum_im (
    .clk(clk), .in_data(row_im), .sum(conv_im)
  );

  logic [LAT_CONV-1:0] cvld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cvld <= '0;
    else        cvld <= {cvld[LAT_CONV-2:0], pix_valid};
  end
  assign conv_valid = cvld[LAT_CONV-1];

  cmf_vector #(.W(ACC_W), .NIT(NIT)) u_vector (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (conv_valid),
    .re       (conv_re),
    .im       (conv_im),
    .out_valid(out_valid),
    .mag      (mag),
    .angle    (angle),
    .vec_x    (vec_x),
    .vec_y    (vec_y)
  );

  // The last coefficient chain outputs and the last row's pixel output
  // have no consumer.
  logic unused;
  assign unused = ^{cre_link[M], cim_link[M], row_out[M-1]};

endmodule
