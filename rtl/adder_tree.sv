// adder_tree: pipelined adder tree that combines the outputs of D partial
// LUTs of a decomposed DA filter.
//
// The D signed inputs are padded with zeros to the next power of two and
// added pairwise in ceil(log2 D) levels, each level ending in a register, so
// the sum appears ceil(log2 D) cycles after its inputs and a new sum is
// accepted every cycle. Inputs and sum share the width W: the caller sizes W
// for the sum of all taps, so no level can overflow. With D = 1 the input is
// passed on without delay.
module adder_tree #(
  parameter int D = 2,
  parameter int W = 11
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] in [D],
  output logic signed [W-1:0] sum
);

  localparam int LEVELS = (D > 1) ? $clog2(D) : 0;
  localparam int P      = 2 ** LEVELS;

  logic signed [W-1:0] node [LEVELS+1][P];

  for (genvar k = 0; k < P; k++) begin : g_leaf
    if (k < D) begin : g_in
      assign node[0][k] = in[k];
    end else begin : g_pad
      assign node[0][k] = '0;
    end
  end

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    for (genvar k = 0; k < (P >> l); k++) begin : g_node
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) node[l][k] <= '0;
        else        node[l][k] <= node[l-1][2*k] + node[l-1][2*k+1];
      end
    end
    // Unused upper slots of this level.
    for (genvar k = (P >> l); k < P; k++) begin : g_unused
      assign node[l][k] = '0;
    end
  end

  assign sum = node[LEVELS][0];

endmodule
