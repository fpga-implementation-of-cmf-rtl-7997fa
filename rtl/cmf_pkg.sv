// cmf_pkg: types and constants shared by the complex matched filter (CMF).
//
// The CMF convolves a grey-scale pixel stream with one complex mask,
// M(rho, theta) = exp(j*2*theta) * r(rho), realised as two real masks
// (real and imaginary part) held as signed 8-bit coefficients. This
// package holds the default sizes (15x15 mask, 640-pixel rows, from the
// design description), the word widths (this design's choice), the
// per-tap "multiplier plan" used for the multiplier-saving optimisation,
// and the CORDIC arctangent table.
//
// Tap plan: each mask position owns one real and one imaginary product.
// A product is formed by a multiplier fed from a loadable coefficient
// register (TAP_MUL), is a constant zero (TAP_ZERO), is a shift of the
// pixel by SHAMT with an optional negation (TAP_SHIFT, coefficient
// +-2^SHAMT), or - for the imaginary part only - reuses the real product
// unchanged (TAP_SAME) or negated (TAP_NEG). The plan is fixed when the
// filter is built; only TAP_MUL coefficients are loadable at run time.
package cmf_pkg;

  // Default geometry (design description: 15x15 mask, 640 columns).
  localparam int unsigned MSIZE_DEF  = 15;
  localparam int unsigned RSIZE_DEF  = 640;
  // Word widths (own choice: 8-bit pixels from the sensor, 8-bit signed
  // coefficients as used for the round-off analysis).
  localparam int unsigned PIX_W      = 8;
  localparam int unsigned COEF_W     = 8;
  localparam int unsigned PROD_W     = PIX_W + COEF_W;   // signed product
  // Angle: binary angle, a full turn is 2**ANG_W.
  localparam int unsigned ANG_W      = 16;
  // CORDIC internal angle resolution: a full turn is 2**CORDIC_AW.
  localparam int unsigned CORDIC_AW  = 20;
  localparam int unsigned CORDIC_MAXIT = 20;

  typedef logic        [PIX_W-1:0]  pix_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [PROD_W-1:0] prod_t;

  typedef enum logic [2:0] {
    TAP_MUL   = 3'd0,
    TAP_ZERO  = 3'd1,
    TAP_SHIFT = 3'd2,
    TAP_SAME  = 3'd3,
    TAP_NEG   = 3'd4
  } tap_kind_e;

  typedef struct packed {
    tap_kind_e   kind;
    logic        neg;     // TAP_SHIFT: coefficient is -2**shamt
    logic [2:0]  shamt;   // TAP_SHIFT: shift distance
  } tap_plan_t;

  typedef struct packed {
    tap_plan_t re;
    tap_plan_t im;
  } tap_pair_plan_t;

  localparam tap_plan_t      PLAN_MUL      = '{kind: TAP_MUL, neg: 1'b0, shamt: 3'd0};
  localparam tap_pair_plan_t PAIR_PLAN_MUL = '{re: PLAN_MUL, im: PLAN_MUL};

  // Build the plan of a single coefficient value on its own
  // (zero, +-2^N or a real multiplier). Shifts reach 2^7 = 128: a wired
  // shift is not limited to the 8-bit range of a loadable coefficient.
  function automatic tap_plan_t plan_single(int c);
    tap_plan_t p;
    int a;
    p = PLAN_MUL;
    a = (c < 0) ? -c : c;
    if (c == 0) begin
      p.kind = TAP_ZERO;
    end else begin
      for (int n = 0; n < COEF_W; n++) begin
        if (a == (1 << n)) begin
          p.kind  = TAP_SHIFT;
          p.neg   = (c < 0);
          p.shamt = 3'(n);
        end
      end
    end
    return p;
  endfunction

  // Plan one mask position from its (already rounded) coefficients.
  // The imaginary part reuses the real product when the values are equal
  // or opposite, unless it is zero or a power of two on its own.
  function automatic tap_pair_plan_t plan_pair(int re, int im);
    tap_pair_plan_t p;
    p.re = plan_single(re);
    p.im = plan_single(im);
    if (p.im.kind == TAP_MUL && p.re.kind == TAP_MUL) begin
      if (im == re)       p.im = '{kind: TAP_SAME, neg: 1'b0, shamt: 3'd0};
      else if (im == -re) p.im = '{kind: TAP_NEG,  neg: 1'b0, shamt: 3'd0};
    end
    return p;
  endfunction

  // Arctangent table: ATAN[i] = round(atan(2**-i) / (2*pi) * 2**CORDIC_AW).
  localparam int CORDIC_ATAN [CORDIC_MAXIT] = '{
    131072, 77376, 40884, 20753, 10417, 5213, 2607, 1304, 652, 326,
    163, 81, 41, 20, 10, 5, 3, 1, 1, 0
  };

  // Reciprocal of the CORDIC gain, round(2**16 / prod_i sqrt(1 + 2**-2i)).
  localparam int unsigned CORDIC_INVK_Q16 = 39797;

endpackage
