// cmf_vector: from the complex convolution result to the matching
// intensity vector.
//
// The convolution with the complex CMF mask yields, per pixel, a complex
// value whose angle is twice the direction of the line found there. This
// block
//   1. computes its absolute value (the line intensity) with abs_approx,
//   2. converts it to polar form with a vectoring CORDIC (cordic_vec),
//   3. halves the angle (arithmetic shift of the binary angle, so the
//      result lies in (-90, 90] degrees: a line direction), and
//   4. converts back with a rotation CORDIC (cordic_rot), rotating the
//      intensity by the halved angle.
// Outputs per pixel: intensity mag, halved angle, and the vector
// (vec_x, vec_y) = mag * (cos, sin)(angle). All are aligned with out_valid.
// Timing: one pixel per clock; latency LAT = 2*NIT + 3 cycles.
// The two CORDICs, the halving in polar form and the separate absolute
// value circuit follow the description; feeding the approximate
// absolute value (not the CORDIC magnitude) into the second CORDIC is
// this design's choice.
module cmf_vector
  import cmf_pkg::*;
#(
  parameter int unsigned W   = 24,
  parameter int unsigned NIT = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [W-1:0]     re,
  input  logic signed [W-1:0]     im,
  output logic                    out_valid,
  output logic        [W-1:0]     mag,
  output logic signed [ANG_W-1:0] angle,
  output logic signed [W:0]       vec_x,
  output logic signed [W:0]       vec_y
);

  localparam int unsigned LAT_VEC = 1 + NIT;
  localparam int unsigned LAT_ROT = 2 + NIT;
  localparam int unsigned LAT     = LAT_VEC + LAT_ROT;

  logic        [W-1:0]     mag_a, mag_v;
  logic signed [ANG_W-1:0] ang_full, ang_half;
  logic        [W+1:0]     unused_cmag;

  abs_approx #(.W(W)) u_abs (.clk(clk), .re(re), .im(im), .mag(mag_a));

  cordic_vec #(.W(W), .NIT(NIT)) u_vec (
    .clk(clk), .x_in(re), .y_in(im), .angle(ang_full), .mag(unused_cmag)
  );

  // Align the intensity with the vectoring CORDIC output.
  pipe_delay #(.W(W), .N(LAT_VEC - 1)) u_dly_mag (.clk(clk), .din(mag_a), .dout(mag_v));

  // Angle reduction by half in polar coordinates.
  assign ang_half = ang_full >>> 1;

  cordic_rot #(.W(W), .NIT(NIT)) u_rot (
    .clk(clk), .r_in(mag_v), .angle(ang_half), .x_out(vec_x), .y_out(vec_y)
  );

  pipe_delay #(.W(W),     .N(LAT_ROT)) u_dly_mo (.clk(clk), .din(mag_v),    .dout(mag));
  pipe_delay #(.W(ANG_W), .N(LAT_ROT)) u_dly_ao (.clk(clk), .din(ang_half), .dout(angle));

  // Valid flags, cleared by reset.
  logic [LAT-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LAT-2:0], in_valid};
  end
  assign out_valid = vld[LAT-1];

endmodule
