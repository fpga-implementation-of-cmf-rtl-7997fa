// pipe_delay: N-cycle register delay of a W-bit word (N = 0 is a wire).
// Used to keep side-band values (magnitude, angle, valid flags) aligned
// with the pipelined arithmetic of the filter. The registers are not
// reset; a valid flag that needs a defined start is cleared by its user.
module pipe_delay #(
  parameter int unsigned W = 1,
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (N == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [W-1:0] sr [N];
    always_ff @(posedge clk) begin
      sr[0] <= din;
      for (int i = 1; i < N; i++) sr[i] <= sr[i-1];
    end
    assign dout = sr[N-1];
  end

endmodule
