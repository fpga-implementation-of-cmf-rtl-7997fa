// tb_abs_approx: compares the approximate magnitude with the exact
// sqrt(re^2 + im^2) computed here in floating point. Every result must
// be within 4.5 % (plus one LSB) of the exact value and appear one clock
// after its inputs. Includes the extreme input -2^23.
module tb_abs_approx;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic signed [23:0] re, im;
  logic        [23:0] mag;
  real worst = 0.0;

  abs_approx #(.W(24)) u_dut (.clk(clk), .re(re), .im(im), .mag(mag));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ex, err;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      case (n)
        0: begin re = -24'sd8388608; im = -24'sd8388608; end
        1: begin re = 24'sd0; im = 24'sd0; end
        2: begin re = 24'sd1000; im = 24'sd0; end
        default: begin
          re = 24'($urandom);
          im = (n % 3 == 0) ? 24'($signed(re) / 2) : 24'($urandom);
          if (n % 7 == 0) begin re = re >>> 12; im = im >>> 12; end
        end
      endcase
      ex = $sqrt(real'(re) * real'(re) + real'(im) * real'(im));
      @(posedge clk); #1;
      err = (real'(mag) - ex) / (ex + 1.0);
      if (err < 0.0) err = -err;
      if (err > worst) worst = err;
      checks++;
      if (real'(mag) > ex * 1.045 + 1.0 || real'(mag) < ex * 0.955 - 1.0) begin
        failures++;
        $display("FAIL re=%0d im=%0d mag=%0d exact=%f", re, im, mag, ex);
      end
    end
    $display("largest relative error %f", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
