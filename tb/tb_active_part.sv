// tb_active_part: two 5-tap active parts, one with a multiplier at every
// position and one built with a mixed plan (zero, shared, inverted,
// shift and multiplier products). For each: the coefficients are loaded
// serially, the chain output is checked to pass the values on in order,
// random pixels are shifted in with a random enable, and the row sums are
// compared with sums computed here from a model of the pixel window, 4
// cycles (1 product + 3 tree levels) after each window. The mask of the
// first instance is then reloaded and the run repeated.
module tb_active_part;
  import cmf_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int M   = 5;
  localparam int LAT = 4;
  localparam int RW  = PROD_W + 3;

  // Mixed row: (re, im) coefficient pairs of positions 0..4.
  localparam int ORE [M] = '{0, 37, 53, -16, 99};
  localparam int OIM [M] = '{0, 37, -53, 91, -45};

  function automatic tap_pair_plan_t [M-1:0] opt_plan();
    tap_pair_plan_t [M-1:0] p;
    for (int j = 0; j < M; j++) p[j] = plan_pair(ORE[j], OIM[j]);
    return p;
  endfunction
  localparam tap_pair_plan_t [M-1:0] OPLAN = opt_plan();

  int checks = 0, failures = 0;

  logic  rst_n, shift;
  pix_t  pix;
  logic  cs_re [2];
  logic  cs_im [2];
  coef_t ci_re [2];
  coef_t ci_im [2];
  coef_t co_re [2];
  coef_t co_im [2];
  pix_t  pout [2];
  logic signed [RW-1:0] rre [2];
  logic signed [RW-1:0] rim [2];

  active_part #(.M(M)) u_full (
    .clk(clk), .rst_n(rst_n), .shift(shift), .pix_in(pix), .pix_out(pout[0]),
    .coef_re_shift(cs_re[0]), .coef_re_in(ci_re[0]), .coef_re_out(co_re[0]),
    .coef_im_shift(cs_im[0]), .coef_im_in(ci_im[0]), .coef_im_out(co_im[0]),
    .row_re(rre[0]), .row_im(rim[0])
  );
  active_part #(.M(M), .PLAN(OPLAN)) u_opt (
    .clk(clk), .rst_n(rst_n), .shift(shift), .pix_in(pix), .pix_out(pout[1]),
    .coef_re_shift(cs_re[1]), .coef_re_in(ci_re[1]), .coef_re_out(co_re[1]),
    .coef_im_shift(cs_im[1]), .coef_im_in(ci_im[1]), .coef_im_out(co_im[1]),
    .row_re(rre[1]), .row_im(rim[1])
  );

  int cre [2][M];
  int cim [2][M];
  int hist [$];

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Shift a list of values into one chain, last position first.
  task automatic load_chain(int inst, bit imag, int vals[$]);
    for (int i = vals.size() - 1; i >= 0; i--) begin
      @(negedge clk);
      if (imag) begin cs_im[inst] = 1'b1; ci_im[inst] = coef_t'(vals[i]); end
      else      begin cs_re[inst] = 1'b1; ci_re[inst] = coef_t'(vals[i]); end
    end
    @(negedge clk);
    cs_re[inst] = 1'b0; cs_im[inst] = 1'b0;
  endtask

  task automatic load_full_random();
    int v[$];
    v = {};
    for (int j = 0; j < M; j++) begin cre[0][j] = int'($urandom_range(0, 255)) - 128; v.push_back(cre[0][j]); end
    load_chain(0, 1'b0, v);
    v = {};
    for (int j = 0; j < M; j++) begin cim[0][j] = int'($urandom_range(0, 255)) - 128; v.push_back(cim[0][j]); end
    load_chain(0, 1'b1, v);
  endtask

  typedef struct { bit v; int e[4]; } exp_t;

  task automatic run_pixels(int n_pix);
    exp_t q [$];
    exp_t e;
    for (int n = 0; n < n_pix + LAT; n++) begin
      @(negedge clk);
      shift = (n < n_pix) && ($urandom_range(0, 3) != 0);
      pix   = pix_t'($urandom);
      @(posedge clk); #1;
      if (shift) hist.push_back(int'(pix));
      e.v = (hist.size() >= M);
      e.e = '{0, 0, 0, 0};
      if (e.v) begin
        for (int j = 0; j < M; j++) begin
          int px = hist[hist.size() - 1 - j];
          e.e[0] += px * cre[0][j];
          e.e[1] += px * cim[0][j];
          e.e[2] += px * ORE[j];
          e.e[3] += px * OIM[j];
        end
      end
      q.push_back(e);
      if (q.size() >= LAT + 1) begin
        e = q.pop_front();
        if (e.v) begin
          expect_eq("full re", int'(rre[0]), e.e[0]);
          expect_eq("full im", int'(rim[0]), e.e[1]);
          expect_eq("opt re",  int'(rre[1]), e.e[2]);
          expect_eq("opt im",  int'(rim[1]), e.e[3]);
        end
      end
      if (hist.size() >= M) expect_eq("pix_out", int'(pout[0]), hist[hist.size() - M]);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v[$];
    rst_n = 1'b0; shift = 1'b0; pix = '0;
    cs_re = '{0, 0}; cs_im = '{0, 0}; ci_re = '{0, 0}; ci_im = '{0, 0};
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    load_full_random();
    // Mixed row: only multiplier positions are loaded.
    v = {}; for (int j = 0; j < M; j++) if (OPLAN[j].re.kind == TAP_MUL) v.push_back(ORE[j]);
    load_chain(1, 1'b0, v);
    v = {}; for (int j = 0; j < M; j++) if (OPLAN[j].im.kind == TAP_MUL) v.push_back(OIM[j]);
    load_chain(1, 1'b1, v);
    // The chain output holds the value of the last multiplier position;
    // for the mixed row this also shows that its chains are 3 (real) and
    // 2 (imaginary) registers long.
    expect_eq("chain out re", int'(co_re[0]), cre[0][M-1]);
    expect_eq("chain out im", int'(co_im[0]), cim[0][M-1]);
    expect_eq("opt chain out re", int'(co_re[1]), ORE[4]);
    expect_eq("opt chain out im", int'(co_im[1]), OIM[4]);

    run_pixels(1500);
    load_full_random();
    run_pixels(1500);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
