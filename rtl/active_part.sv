// active_part: one row of the CMF sliding window.
//
// The row holds M pixels in a serial-in parallel-out shift register (the
// "active part" of the description). Each register drives one tap_mult,
// which multiplies the pixel with that position's real and imaginary
// mask coefficient; two pipelined adder trees sum the M real and the M
// imaginary products into the row results. The last pixel register feeds
// the passive part that delays the stream to the next row.
//
// Mask coefficients sit in two further shift registers, one for the real
// and one for the imaginary part, loaded serially (coef_*_in, advanced by
// coef_*_shift) and chained from row to row through coef_*_out. Only
// positions whose PLAN entry is TAP_MUL own a coefficient register; the
// others are built into the structure (zero, shift, shared or inverted
// product), so each chain is as long as the number of multipliers of that
// part. Chain order: a loaded value enters at the multiplier nearest the
// pixel input (position 0) and moves towards position M-1.
//
// Timing: pixels shift on 'shift' (the pixel enable). Row results appear
// 1 + ceil(log2(M)) clock cycles after the window they belong to, every
// cycle. Register 0 holds the newest pixel; pix_out is register M-1.
// Serial loading, the coefficient rows beside the pixel row and the
// per-row adder trees follow the description; the tree pipelining and
// the chain order are this design's choice.
module active_part
  import cmf_pkg::*;
#(
  parameter int unsigned    M     = 15,
  parameter int unsigned    ROW_W = PROD_W + $clog2(M),
  parameter tap_pair_plan_t [M-1:0] PLAN = {M{PAIR_PLAN_MUL}}
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // pixel stream
  input  logic                    shift,
  input  pix_t                    pix_in,
  output pix_t                    pix_out,
  // serial coefficient load
  input  logic                    coef_re_shift,
  input  coef_t                   coef_re_in,
  output coef_t                   coef_re_out,
  input  logic                    coef_im_shift,
  input  coef_t                   coef_im_in,
  output coef_t                   coef_im_out,
  // row results
  output logic signed [ROW_W-1:0] row_re,
  output logic signed [ROW_W-1:0] row_im
);

  // Index of position j in the real (part=0) or imaginary (part=1) chain,
  // or the chain length for j = M.
  function automatic int chain_idx(int part, int j);
    int n = 0;
    for (int k = 0; k < j; k++) begin
      if (part == 0 && PLAN[k].re.kind == TAP_MUL) n++;
      if (part == 1 && PLAN[k].im.kind == TAP_MUL) n++;
    end
    return n;
  endfunction

  localparam int unsigned NRE = chain_idx(0, M);
  localparam int unsigned NIM = chain_idx(1, M);

  // ---------------- pixel shift register (active part) ----------------
  pix_t win [M];

  always_ff @(posedge clk) begin
    if (shift) begin
      win[0] <= pix_in;
      for (int j = 1; j < M; j++) win[j] <= win[j-1];
    end
  end

  assign pix_out = win[M-1];

  // ---------------- coefficient chains ----------------
  coef_t cre [NRE > 0 ? NRE : 1];
  coef_t cim [NIM > 0 ? NIM : 1];

  if (NRE > 0) begin : g_cre
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < NRE; i++) cre[i] <= '0;
      end else if (coef_re_shift) begin
        cre[0] <= coef_re_in;
        for (int i = 1; i < NRE; i++) cre[i] <= cre[i-1];
      end
    end
    assign coef_re_out = cre[NRE-1];
  end else begin : g_nore
    assign cre[0]      = '0;
    assign coef_re_out = coef_re_in;
  end

  if (NIM > 0) begin : g_cim
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < NIM; i++) cim[i] <= '0;
      end else if (coef_im_shift) begin
        cim[0] <= coef_im_in;
        for (int i = 1; i < NIM; i++) cim[i] <= cim[i-1];
      end
    end
    assign coef_im_out = cim[NIM-1];
  end else begin : g_noim
    assign cim[0]      = '0;
    assign coef_im_out = coef_im_in;
  end

  // ---------------- taps and row adder trees ----------------
  prod_t p_re [M];
  prod_t p_im [M];

  for (genvar j = 0; j < M; j++) begin : g_tap
    localparam int IRE = (chain_idx(0, j) < (NRE > 0 ? NRE : 1)) ? chain_idx(0, j) : 0;
    localparam int IIM = (chain_idx(1, j) < (NIM > 0 ? NIM : 1)) ? chain_idx(1, j) : 0;
    tap_mult #(.PLAN(PLAN[j])) u_tap (
      .clk    (clk),
      .pix    (win[j]),
      .coef_re(cre[IRE]),
      .coef_im(cim[IIM]),
      .prod_re(p_re[j]),
      .prod_im(p_im[j])
    );
  end

  tree_adder #(.N(M), .W_IN(PROD_W), .W_OUT(ROW_W)) u_tree_re (
    .clk(clk), .in_data(p_re), .sum(row_re)
  );
  tree_adder #(.N(M), .W_IN(PROD_W), .W_OUT(ROW_W)) u_tree_im (
    .clk(clk), .in_data(p_im), .sum(row_im)
  );

endmodule
