// tree_adder: pipelined binary adder tree.
//
// Sums N signed inputs of W_IN bits into one signed W_OUT-bit result.
// The inputs are sign-extended to W_OUT, padded with zeros to the next
// power of two, and added pairwise, one tree level per clock cycle with a
// register after every level. Latency is LAT = ceil(log2(N)) cycles (0 for
// N = 1) and a new set of inputs is accepted every cycle. The tree is used
// twice in the filter: inside each active part to sum one row of
// products, and after the active parts to sum the row results. The
// register after every level is this design's choice (pixel-rate
// throughput); the description only names a tree adder.
module tree_adder #(
  parameter int unsigned N     = 15,
  parameter int unsigned W_IN  = 16,
  parameter int unsigned W_OUT = 20
) (
  input  logic                    clk,
  input  logic signed [W_IN-1:0]  in_data [N],
  output logic signed [W_OUT-1:0] sum
);

  localparam int unsigned LAT = (N > 1) ? $clog2(N) : 0;
  localparam int unsigned NP  = 1 << LAT;

  logic signed [W_OUT-1:0] lvl [LAT+1][NP];

  for (genvar i = 0; i < NP; i++) begin : g_leaf
    if (i < N) begin : g_in
      assign lvl[0][i] = W_OUT'(in_data[i]);
    end else begin : g_pad
      assign lvl[0][i] = '0;
    end
  end

  for (genvar l = 1; l <= LAT; l++) begin : g_level
    for (genvar i = 0; i < (NP >> l); i++) begin : g_node
      always_ff @(posedge clk) lvl[l][i] <= lvl[l-1][2*i] + lvl[l-1][2*i+1];
    end
    // Upper half of the level array is unused.
    for (genvar i = (NP >> l); i < NP; i++) begin : g_unused
      assign lvl[l][i] = '0;
    end
  end

  assign sum = lvl[LAT][0];

endmodule
