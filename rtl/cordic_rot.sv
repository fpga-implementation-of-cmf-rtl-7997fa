// cordic_rot: pipelined CORDIC in rotation mode (polar to Cartesian).
//
// Rotates the vector (r, 0) by a binary angle (a full turn is 2^ANG_W,
// signed, covering (-180, 180] degrees) and returns its Cartesian
// components x = r*cos(angle), y = r*sin(angle). The magnitude is first
// multiplied by 1/K (K = 1.6468, the CORDIC gain of the micro-rotations)
// so the outputs carry the true length of r. A quadrant stage handles
// angles beyond +-90 degrees; NIT micro-rotations by +-atan(2^-i) then
// drive the residual angle to zero.
// Timing: fully pipelined, one input per clock, latency 2 + NIT cycles.
// The description states only that a second CORDIC converts back to
// Cartesian coordinates; the gain correction, widths and iteration count
// are this design's choice.
module cordic_rot
  import cmf_pkg::*;
#(
  parameter int unsigned W   = 24,
  parameter int unsigned NIT = 16
) (
  input  logic                    clk,
  input  logic        [W-1:0]     r_in,
  input  logic signed [ANG_W-1:0] angle,
  output logic signed [W:0]       x_out,
  output logic signed [W:0]       y_out
);

  localparam int unsigned XW = W + 2;
  localparam int unsigned AW = CORDIC_AW;

  // Stage A: gain compensation r * round(2^16 / K) / 2^16.
  logic [W-1:0]          r_c;
  logic signed [AW-1:0]  a_c;
  logic [W+16:0]         r_scaled;
  assign r_scaled = (W+17)'(r_in) * (W+17)'(CORDIC_INVK_Q16);

  always_ff @(posedge clk) begin
    r_c <= W'(r_scaled >> 16);
    a_c <= {angle, (AW - ANG_W)'(0)};
  end

  logic signed [XW-1:0] xs [NIT+1];
  logic signed [XW-1:0] ys [NIT+1];
  logic signed [AW-1:0] zs [NIT+1];

  // Stage B: quadrant correction.
  localparam logic signed [AW-1:0] QUARTER = AW'(1 << (AW - 2));

  always_ff @(posedge clk) begin
    if (a_c > QUARTER) begin
      xs[0] <= '0;
      ys[0] <= XW'(r_c);
      zs[0] <= a_c - QUARTER;
    end else if (a_c < -QUARTER) begin
      xs[0] <= '0;
      ys[0] <= -XW'(r_c);
      zs[0] <= a_c + QUARTER;
    end else begin
      xs[0] <= XW'(r_c);
      ys[0] <= '0;
      zs[0] <= a_c;
    end
  end

  for (genvar i = 0; i < NIT; i++) begin : g_it
    localparam logic signed [AW-1:0] ATAN = AW'(CORDIC_ATAN[i]);
    always_ff @(posedge clk) begin
      if (!zs[i][AW-1]) begin
        xs[i+1] <= xs[i] - (ys[i] >>> i);
        ys[i+1] <= ys[i] + (xs[i] >>> i);
        zs[i+1] <= zs[i] - ATAN;
      end else begin
        xs[i+1] <= xs[i] + (ys[i] >>> i);
        ys[i+1] <= ys[i] - (xs[i] >>> i);
        zs[i+1] <= zs[i] + ATAN;
      end
    end
  end

  assign x_out = (W+1)'(xs[NIT]);
  assign y_out = (W+1)'(ys[NIT]);

endmodule
