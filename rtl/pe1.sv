// pe1: processing element of the one-dimensional systolic DA filter.
//
// In every clock cycle it reads the entry of its own E-input LUT addressed by
// VIN, adds it to the partial sum IN arriving from its left neighbour, and
// registers the result as OUT for its right neighbour:
//     OUT <= IN + LUT.Read(VIN)
// The LUT covers coefficients COEF[BASE] .. COEF[BASE+E-1] and is read
// combinationally, so each element adds exactly one cycle of latency.
module pe1 #(
  parameter int E    = 4,
  parameter int W    = 11,
  parameter int BASE = 0,
  parameter int COEF [da_pkg::MAX_TAPS] = da_pkg::DEFAULT_COEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [E-1:0]        vin,
  input  logic signed [W-1:0] pin,
  output logic signed [W-1:0] pout
);

  logic signed [W-1:0] lut_q;

  da_lut #(.E(E), .W(W), .BASE(BASE), .REG_OUT(1'b0), .COEF(COEF)) u_lut (
    .clk (clk),
    .addr(vin),
    .q   (lut_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pout <= '0;
    else        pout <= pin + lut_q;
  end

endmodule
