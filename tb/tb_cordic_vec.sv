// tb_cordic_vec: random vectors in all four quadrants; the angle must
// match atan2 (converted to a 16-bit binary angle) within 2 LSB, the
// magnitude must be the exact length times the CORDIC gain within
// 0.05 % + 4, and each result must appear 17 cycles (1 + 16 iterations)
// after its input while a new input is applied every clock.
module tb_cordic_vec;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic signed [23:0] x, y;
  logic signed [15:0] ang;
  logic        [25:0] mag;

  localparam int LAT = 17;
  localparam real PI = 3.14159265358979;
  localparam real K  = 1.6467602581210656;

  cordic_vec #(.W(24), .NIT(16)) u_dut (.clk(clk), .x_in(x), .y_in(y), .angle(ang), .mag(mag));

  real ex_ang [$];
  real ex_mag [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, m, d, tol;
    for (int n = 0; n < 4000 + LAT; n++) begin
      @(negedge clk);
      x = 24'($urandom); y = 24'($urandom);
      if (n % 5 == 0) begin x = x >>> 10; y = y >>> 10; end
      if (n == 3) begin x = -24'sd8388608; y = 24'sd0; end
      if (n == 4) begin x = 24'sd0; y = -24'sd5000000; end
      ex_ang.push_back($atan2(real'(y), real'(x)) / (2.0 * PI) * 65536.0);
      ex_mag.push_back(K * $sqrt(real'(x) * real'(x) + real'(y) * real'(y)));
      @(posedge clk); #1;
      if (ex_ang.size() >= LAT) begin
        a = ex_ang.pop_front();
        m = ex_mag.pop_front();
        d = real'(ang) - a;
        // 2 LSB, plus the rounding of the shifted x and y, which matters for
        // short vectors (about 16 LSB of length error over 16 iterations).
        tol = 2.0 + 65536.0 / (2.0 * PI) * 16.0 / (m / K + 1.0);
        // Wrap the difference into (-32768, 32768].
        while (d > 32768.0)   d -= 65536.0;
        while (d <= -32768.0) d += 65536.0;
        checks++;
        if (d > tol || d < -tol) begin
          failures++; $display("FAIL angle %0d expected %f", ang, a);
        end
        checks++;
        if (real'(mag) > m * 1.0005 + 16.0 || real'(mag) < m * 0.9995 - 16.0) begin
          failures++; $display("FAIL magnitude %0d expected %f", mag, m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
