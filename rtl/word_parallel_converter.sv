// word_parallel_converter: splits the N address bits of the systolic DA
// filter into D groups of E bits (N = D*E) and skews them in time.
//
// Group z carries the current bits of samples x[n-zE] .. x[n-zE-E+1]
// (group bit i = addr[z*E + i]) and is delayed by z clock cycles, so that it
// reaches processing element z+1 in the same cycle as the partial sum that
// has travelled through the z elements before it. Group 0 is not delayed.
module word_parallel_converter #(
  parameter int N = 8,
  parameter int D = 2,
  parameter int E = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] addr,
  output logic [E-1:0] group_out [D]
);

  for (genvar z = 0; z < D; z++) begin : g_group
    if (z == 0) begin : g_direct
      assign group_out[z] = addr[E-1:0];
    end else begin : g_delay
      logic [E-1:0] dly [z];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < z; k++) dly[k] <= '0;
        end else begin
          dly[0] <= addr[z*E +: E];
          for (int k = 1; k < z; k++) dly[k] <= dly[k-1];
        end
      end
      assign group_out[z] = dly[z-1];
    end
  end

  initial assert (N == D * E) else $error("word_parallel_converter: N must equal D*E");

endmodule
