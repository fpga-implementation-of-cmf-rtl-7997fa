// tb_tap_mult: checks every product kind of tap_mult against products
// computed here with plain integer arithmetic. Five instances cover a
// multiplier pair, negative and positive power-of-two shifts, zero, and
// the imaginary part reusing the real product unchanged and inverted.
// Each product must appear exactly one clock after its pixel.
module tb_tap_mult;
  import cmf_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam tap_plan_t SHN3 = '{kind: TAP_SHIFT, neg: 1'b1, shamt: 3'd3};
  localparam tap_plan_t SHP0 = '{kind: TAP_SHIFT, neg: 1'b0, shamt: 3'd0};
  localparam tap_plan_t SHP6 = '{kind: TAP_SHIFT, neg: 1'b0, shamt: 3'd6};
  localparam tap_plan_t ZERO = '{kind: TAP_ZERO,  neg: 1'b0, shamt: 3'd0};
  localparam tap_plan_t SAME = '{kind: TAP_SAME,  neg: 1'b0, shamt: 3'd0};
  localparam tap_plan_t NEG  = '{kind: TAP_NEG,   neg: 1'b0, shamt: 3'd0};

  localparam tap_pair_plan_t PL [5] = '{
    '{re: PLAN_MUL, im: PLAN_MUL},
    '{re: SHN3,     im: NEG},
    '{re: PLAN_MUL, im: SAME},
    '{re: ZERO,     im: SHP0},
    '{re: SHP6,     im: PLAN_MUL}
  };

  pix_t  pix;
  coef_t cre, cim;
  prod_t pre [5];
  prod_t pim [5];

  for (genvar i = 0; i < 5; i++) begin : g_dut
    tap_mult #(.PLAN(PL[i])) u_dut (
      .clk(clk), .pix(pix), .coef_re(cre), .coef_im(cim),
      .prod_re(pre[i]), .prod_im(pim[i])
    );
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    int p, a, b;
    pix = '0; cre = '0; cim = '0;
    for (int n = 0; n < 2000; n++) begin
      // Corner values first, then random ones.
      p = (n == 0) ? 255 : (n == 1) ? 0 : int'($urandom_range(0, 255));
      a = (n == 0) ? -128 : int'($urandom_range(0, 255)) - 128;
      b = (n == 0) ? 127 : int'($urandom_range(0, 255)) - 128;
      @(negedge clk);
      pix = pix_t'(p); cre = coef_t'(a); cim = coef_t'(b);
      @(posedge clk); #1;
      expect_eq("mul re",   int'(pre[0]), p * a);
      expect_eq("mul im",   int'(pim[0]), p * b);
      expect_eq("shift -8", int'(pre[1]), -8 * p);
      expect_eq("neg im",   int'(pim[1]), 8 * p);
      expect_eq("mul re 2", int'(pre[2]), p * a);
      expect_eq("same im",  int'(pim[2]), p * a);
      expect_eq("zero re",  int'(pre[3]), 0);
      expect_eq("shift 1",  int'(pim[3]), p);
      expect_eq("shift 64", int'(pre[4]), 64 * p);
      expect_eq("mul im 4", int'(pim[4]), p * b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
