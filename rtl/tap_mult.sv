// tap_mult: the real and imaginary products of one mask position.
//
// Every position of the complex mask multiplies the same pixel with a
// real and an imaginary coefficient. How each product is formed is fixed
// at build time by PLAN (see cmf_pkg):
//   TAP_MUL   pixel * coefficient, a hardware multiplier fed by the
//             coefficient register of the active part;
//   TAP_ZERO  constant 0, no multiplier;
//   TAP_SHIFT pixel shifted left by SHAMT, negated if NEG (coefficient
//             +-2^SHAMT), no multiplier;
//   TAP_SAME  (imaginary only) the real product itself, no multiplier;
//   TAP_NEG   (imaginary only) the real product inverted and incremented
//             (two's complement), no multiplier.
// These are the equal-, inverse-, zero- and power-of-two savings of the
// design description; the default plan uses two multipliers.
// Timing: both products are registered, one cycle after the pixel.
// The coefficient inputs of a non-multiplier product are not used.
module tap_mult
  import cmf_pkg::*;
#(
  parameter tap_pair_plan_t PLAN = PAIR_PLAN_MUL
) (
  input  logic  clk,
  input  pix_t  pix,
  input  coef_t coef_re,
  input  coef_t coef_im,
  output prod_t prod_re,
  output prod_t prod_im
);

  localparam int unsigned EXT_W = PROD_W + 1;

  // Only the imaginary product can borrow the real one.
  if (PLAN.re.kind == TAP_SAME || PLAN.re.kind == TAP_NEG) begin : g_bad_plan
    $error("tap_mult: the real product cannot be TAP_SAME or TAP_NEG");
  end

  logic signed [EXT_W-1:0] pix_s;
  prod_t re_c, im_c;

  assign pix_s = EXT_W'(signed'({1'b0, pix}));

  // Product of one part computed on its own (multiplier, zero or shift).
  function automatic prod_t own_product(tap_plan_t p, logic signed [EXT_W-1:0] px, coef_t c);
    // Every product fits PROD_W bits: |pixel * coefficient| < 2^15.
    prod_t r;
    case (p.kind)
      TAP_ZERO:  r = '0;
      TAP_SHIFT: r = prod_t'(p.neg ? -(px <<< p.shamt) : (px <<< p.shamt));
      default:   r = prod_t'(px * EXT_W'(c));
    endcase
    return r;
  endfunction

  always_comb begin
    re_c = own_product(PLAN.re, pix_s, coef_re);
    case (PLAN.im.kind)
      TAP_SAME: im_c = re_c;
      TAP_NEG:  im_c = ~re_c + prod_t'(1);
      default:  im_c = own_product(PLAN.im, pix_s, coef_im);
    endcase
  end

  always_ff @(posedge clk) begin
    prod_re <= re_c;
    prod_im <= im_c;
  end

endmodule
