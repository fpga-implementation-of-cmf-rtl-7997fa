// tb_cordic_rot: random magnitudes and angles over the full turn; the
// outputs must equal r*cos(angle) and r*sin(angle), computed here in
// floating point, within 0.05 % of r + 10 LSB (rounding of
// the shifted terms), 18 cycles (2 + 16
// iterations) after the input, with a new input every clock.
module tb_cordic_rot;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic        [23:0] r;
  logic signed [15:0] ang;
  logic signed [24:0] xo, yo;

  localparam int LAT = 18;
  localparam real PI = 3.14159265358979;

  cordic_rot #(.W(24), .NIT(16)) u_dut (.clk(clk), .r_in(r), .angle(ang), .x_out(xo), .y_out(yo));

  real ex_x [$];
  real ex_y [$];
  real ex_r [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th, ex, ey, er;
    for (int n = 0; n < 4000 + LAT; n++) begin
      @(negedge clk);
      r = 24'($urandom);
      if (n % 4 == 0) r = r >> 9;
      if (n == 2) r = 24'hFFFFFF;
      ang = 16'($urandom);
      if (n == 5) ang = -16'sd32768;
      if (n == 6) ang = 16'sd16384;
      th = real'(ang) / 65536.0 * 2.0 * PI;
      ex_x.push_back(real'(r) * $cos(th));
      ex_y.push_back(real'(r) * $sin(th));
      ex_r.push_back(real'(r));
      @(posedge clk); #1;
      if (ex_x.size() >= LAT) begin
        ex = ex_x.pop_front();
        ey = ex_y.pop_front();
        er = ex_r.pop_front() * 0.0005 + 10.0;
        checks += 2;
        if (real'(xo) > ex + er || real'(xo) < ex - er) begin
          failures++; $display("FAIL x %0d expected %f", xo, ex);
        end
        if (real'(yo) > ey + er || real'(yo) < ey - er) begin
          failures++; $display("FAIL y %0d expected %f", yo, ey);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
