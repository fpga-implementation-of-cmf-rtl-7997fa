// tb_cmf_vector: random complex inputs with a new one every clock and
// gaps in in_valid. Checks against floating-point values computed here:
//   * out_valid rises exactly 35 cycles (2*16 + 3) after in_valid;
//   * mag is within 4.5 % of |re + j*im|;
//   * angle is half of atan2(im, re), as a 16-bit binary angle, so it
//     lies in (-90, 90] degrees;
//   * (vec_x, vec_y) equals mag * (cos, sin) of that half angle.
module tb_cmf_vector;
  import cmf_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int LAT = 35;
  localparam real PI = 3.14159265358979;

  logic rst_n, in_valid, out_valid;
  logic signed [23:0] re, im;
  logic        [23:0] mag;
  logic signed [15:0] angle;
  logic signed [24:0] vx, vy;

  cmf_vector #(.W(24), .NIT(16)) u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .re(re), .im(im),
    .out_valid(out_valid), .mag(mag), .angle(angle), .vec_x(vx), .vec_y(vy)
  );

  typedef struct { bit v; real m; real a; } exp_t;
  exp_t q [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_t e;
    real d, th, tol;
    rst_n = 1'b0; in_valid = 1'b0; re = '0; im = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 5000 + LAT; n++) begin
      @(negedge clk);
      in_valid = (n < 5000) && ($urandom_range(0, 4) != 0);
      re = 24'($signed(24'($urandom)) >>> $urandom_range(1, 8));
      im = 24'($signed(24'($urandom)) >>> $urandom_range(1, 8));
      e.v = in_valid;
      e.m = $sqrt(real'(re) * real'(re) + real'(im) * real'(im));
      e.a = $atan2(real'(im), real'(re)) / 2.0 / (2.0 * PI) * 65536.0;
      q.push_back(e);
      @(posedge clk); #1;
      if (q.size() >= LAT) begin
        e = q.pop_front();
        checks++;
        if (out_valid !== e.v) begin
          failures++; $display("FAIL out_valid at n=%0d", n);
        end
        if (e.v) begin
          checks += 3;
          if (real'(mag) > e.m * 1.045 + 2.0 || real'(mag) < e.m * 0.955 - 2.0) begin
            failures++; $display("FAIL mag %0d expected %f", mag, e.m);
          end
          d = real'(angle) - e.a;
          tol = 2.0 + 65536.0 / (2.0 * PI) * 16.0 / (e.m + 1.0);
          if (d > tol || d < -tol) begin
            failures++; $display("FAIL angle %0d expected %f", angle, e.a);
          end
          th = real'(angle) / 65536.0 * 2.0 * PI;
          d = $sqrt((real'(vx) - real'(mag) * $cos(th)) ** 2 + (real'(vy) - real'(mag) * $sin(th)) ** 2);
          if (d > 0.001 * real'(mag) + 12.0) begin
            failures++; $display("FAIL vector (%0d,%0d) for mag %0d angle %0d", vx, vy, mag, angle);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
