// passive_part: serial-in serial-out pixel delay held in block RAM.
//
// Between two active parts of the sliding window the stream must be
// delayed by the rest of an image row, P = R_size - M_size pixels. The
// description stores these pixels in RAM bits and lets them act as a
// serial-in serial-out shift register. Here the RAM is a circular buffer
// of P-1 words plus a registered read port: on every shift the word at
// the pointer is read into the output register and replaced by the new
// pixel, and the pointer advances. After a shift, dout is the din of
// exactly P shifts earlier (counting the current one as the first), the
// same as a P-stage shift register. Nothing moves while shift is low.
// The pointer resets to 0; the RAM content is not reset, so the first P
// outputs after reset are stale data, as in the hardware described.
module passive_part #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 625   // P = 640 - 15
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (DEPTH >= 3) begin : g_ram
    localparam int unsigned D  = DEPTH - 1;
    localparam int unsigned AW = $clog2(D);

    logic [W-1:0]  mem [D];
    logic [AW-1:0] ptr;

    always_ff @(posedge clk) begin
      if (shift) begin
        dout     <= mem[ptr];
        mem[ptr] <= din;
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)             ptr <= '0;
      else if (shift)         ptr <= (ptr == AW'(D - 1)) ? '0 : ptr + 1'b1;
    end
  end else begin : g_reg
    // Very short delays are plain registers.
    logic [W-1:0] sr [DEPTH];
    always_ff @(posedge clk) begin
      if (shift) begin
        sr[0] <= din;
        for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
      end
    end
    assign dout = sr[DEPTH-1];
  end

endmodule
