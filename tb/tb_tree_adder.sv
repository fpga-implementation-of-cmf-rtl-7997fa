// tb_tree_adder: feeds a new random input set every clock to two adder
// trees (15 and 5 inputs) and checks each sum against a sum computed
// here, ceil(log2(N)) cycles later, which also checks one result per
// cycle.
module tb_tree_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic signed [15:0] a15 [15];
  logic signed [15:0] a5  [5];
  logic signed [19:0] s15;
  logic signed [18:0] s5;

  tree_adder #(.N(15), .W_IN(16), .W_OUT(20)) u_t15 (.clk(clk), .in_data(a15), .sum(s15));
  tree_adder #(.N(5),  .W_IN(16), .W_OUT(19)) u_t5  (.clk(clk), .in_data(a5),  .sum(s5));

  int exp15 [$];
  int exp5  [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, t;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      s = 0; t = 0;
      for (int i = 0; i < 15; i++) begin
        a15[i] = (n == 0) ? -16'sd32768 : (n == 1) ? 16'sd32767 : 16'($urandom);
        s += int'(a15[i]);
      end
      for (int i = 0; i < 5; i++) begin
        a5[i] = (n == 2) ? -16'sd32768 : 16'($urandom);
        t += int'(a5[i]);
      end
      exp15.push_back(s);
      exp5.push_back(t);
      // Results for the input set of 4 (resp. 3) cycles ago.
      if (exp15.size() > 4) begin
        checks++;
        if (int'(s15) != exp15.pop_front()) begin
          failures++; $display("FAIL 15-input tree at n=%0d", n);
        end
      end
      if (exp5.size() > 3) begin
        checks++;
        if (int'(s5) != exp5.pop_front()) begin
          failures++; $display("FAIL 5-input tree at n=%0d", n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
