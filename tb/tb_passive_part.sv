// tb_passive_part: drives the RAM delay line with random data and a
// random shift enable, and checks after every shift that the output is
// the input of exactly DEPTH shifts before (the first DEPTH outputs are
// stale and not compared). Three depths: the default 625, 10, and a
// register-only 2.
module tb_passive_part;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst_n, shift;
  logic [7:0] din;
  logic [7:0] d625, d10, d2;

  passive_part #(.W(8))               u_625 (.clk(clk), .rst_n(rst_n), .shift(shift), .din(din), .dout(d625));
  passive_part #(.W(8), .DEPTH(10))   u_10  (.clk(clk), .rst_n(rst_n), .shift(shift), .din(din), .dout(d10));
  passive_part #(.W(8), .DEPTH(2))    u_2   (.clk(clk), .rst_n(rst_n), .shift(shift), .din(din), .dout(d2));

  logic [7:0] hist [$];
  int idle = 0;

  task automatic check_depth(int depth, logic [7:0] got, string name);
    int s = hist.size() - 1;       // index of the latest shift
    if (s - depth + 1 >= 0) begin
      checks++;
      if (got !== hist[s - depth + 1]) begin
        failures++;
        $display("FAIL %s shift %0d: got %0h expected %0h", name, s, got, hist[s - depth + 1]);
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] prev10;
    rst_n = 1'b0; shift = 1'b0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      shift = ($urandom_range(0, 3) != 0);
      din   = 8'($urandom);
      prev10 = d10;
      @(posedge clk); #1;
      if (shift) begin
        hist.push_back(din);
        check_depth(625, d625, "depth625");
        check_depth(10,  d10,  "depth10");
        check_depth(2,   d2,   "depth2");
      end else begin
        idle++;
        checks++;
        if (d10 !== prev10) begin
          failures++; $display("FAIL output moved without shift");
        end
      end
    end
    if (idle == 0) begin failures++; $display("FAIL no idle cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
