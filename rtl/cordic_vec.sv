// cordic_vec: pipelined CORDIC in vectoring mode (Cartesian to polar).
//
// Turns the complex filter result (x, y) into its angle and (gain-scaled)
// magnitude. A first stage moves the vector into the right half-plane by
// a +-90 degree rotation; then NIT micro-rotations by +-atan(2^-i) drive y
// to zero while the rotation angles are accumulated. Angles are binary
// angles: a full turn is 2^ANG_W, so the output is a signed two's
// complement angle covering (-180, 180] degrees and wraps naturally.
// Internally the angle keeps CORDIC_AW bits (a full turn is 2^CORDIC_AW).
// mag is the magnitude multiplied by the CORDIC gain K = 1.6468.
// Timing: fully pipelined, one input per clock, latency 1 + NIT cycles.
// The description states only that a CORDIC converts from Cartesian to
// polar coordinates; the iteration count and widths are this design's.
module cordic_vec
  import cmf_pkg::*;
#(
  parameter int unsigned W   = 24,
  parameter int unsigned NIT = 16
) (
  input  logic                    clk,
  input  logic signed [W-1:0]     x_in,
  input  logic signed [W-1:0]     y_in,
  output logic signed [ANG_W-1:0] angle,
  output logic        [W+1:0]     mag
);

  localparam int unsigned XW = W + 2;
  localparam int unsigned AW = CORDIC_AW;

  logic signed [XW-1:0] xs [NIT+1];
  logic signed [XW-1:0] ys [NIT+1];
  logic signed [AW-1:0] zs [NIT+1];

  // Stage 0: quadrant correction.
  logic signed [XW-1:0] xi, yi;
  assign xi = XW'(x_in);
  assign yi = XW'(y_in);

  always_ff @(posedge clk) begin
    if (x_in[W-1]) begin
      if (!y_in[W-1]) begin          // second quadrant: rotate by -90
        xs[0] <= yi;
        ys[0] <= -xi;
        zs[0] <= AW'(1 << (AW - 2));
      end else begin                 // third quadrant: rotate by +90
        xs[0] <= -yi;
        ys[0] <= xi;
        zs[0] <= -AW'(1 << (AW - 2));
      end
    end else begin
      xs[0] <= xi;
      ys[0] <= yi;
      zs[0] <= '0;
    end
  end

  for (genvar i = 0; i < NIT; i++) begin : g_it
    localparam logic signed [AW-1:0] ATAN = AW'(CORDIC_ATAN[i]);
    always_ff @(posedge clk) begin
      if (!ys[i][XW-1]) begin
        xs[i+1] <= xs[i] + (ys[i] >>> i);
        ys[i+1] <= ys[i] - (xs[i] >>> i);
        zs[i+1] <= zs[i] + ATAN;
      end else begin
        xs[i+1] <= xs[i] - (ys[i] >>> i);
        ys[i+1] <= ys[i] + (xs[i] >>> i);
        zs[i+1] <= zs[i] - ATAN;
      end
    end
  end

  // Round the internal angle to ANG_W bits.
  logic [AW-1:0] z_round;
  assign z_round = zs[NIT] + AW'(1 << (AW - ANG_W - 1));
  assign angle   = ANG_W'(z_round >> (AW - ANG_W));
  assign mag     = xs[NIT];

endmodule
