// abs_approx: fast approximation of the magnitude sqrt(re^2 + im^2).
//
// The CMF output is complex; its absolute value is the line intensity. A
// true square root is too slow at pixel rate, so the design uses the
// shift-and-add approximation found in RTL design textbooks:
//   x = max(|re|, |im|),  y = min(|re|, |im|)
//   mag = max(x, x - x/8 + y/2)
// which stays within about 3 % of the exact value and needs only
// comparators, shifts and adders. The choice of this particular formula
// is this design's reading of the "simple but fast method" the
// description cites. The W-bit unsigned result cannot overflow (it is at
// most 1.375 * 2^(W-1)). Timing: registered, one cycle latency.
module abs_approx #(
  parameter int unsigned W = 24
) (
  input  logic                clk,
  input  logic signed [W-1:0] re,
  input  logic signed [W-1:0] im,
  output logic        [W-1:0] mag
);

  logic [W-1:0] a_re, a_im, x, y, t;

  always_comb begin
    a_re = re[W-1] ? W'(-re) : W'(re);
    a_im = im[W-1] ? W'(-im) : W'(im);
    x    = (a_re >= a_im) ? a_re : a_im;
    y    = (a_re >= a_im) ? a_im : a_re;
    t    = x - (x >> 3) + (y >> 1);
  end

  always_ff @(posedge clk) mag <= (t > x) ? t : x;

endmodule
