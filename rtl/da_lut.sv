// da_lut: distributed-arithmetic look-up table for E filter taps.
//
// Entry k holds the sum of the coefficients COEF[BASE+i] for which bit i of k
// is set, i.e. every partial sum the inner product sum_i C_i * x_ij can take
// for one bit position j. Address bit i is the current bit of sample
// x[n-BASE-i]; entry 0 is 0 and entry 2^E-1 is the sum of all E coefficients.
// The table is a constant array computed at elaboration from the coefficient
// parameter, so it maps to a ROM (distributed logic or a block memory).
//
// With REG_OUT = 0 the read is combinational, as the cycle counts of the
// filters built from it assume; REG_OUT = 1 adds an output register (one
// cycle of latency), as a synchronous block memory would.
module da_lut #(
  parameter int E       = 4,                 // address bits (taps in this LUT)
  parameter int W       = 10,                // word width of an entry
  parameter int BASE    = 0,                 // index of the first coefficient
  parameter bit REG_OUT = 1'b0,
  parameter int COEF [da_pkg::MAX_TAPS] = da_pkg::DEFAULT_COEF
) (
  input  logic                clk,
  input  logic [E-1:0]        addr,
  output logic signed [W-1:0] q
);

  typedef logic signed [W-1:0] rom_t [2**E];

  function automatic rom_t build_rom();
    rom_t r;
    for (int k = 0; k < 2**E; k++) begin
      int acc;
      acc = 0;
      for (int i = 0; i < E; i++)
        if (((k >> i) & 1) != 0) acc += COEF[BASE + i];
      r[k] = W'(acc);
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  if (REG_OUT) begin : g_reg
    always_ff @(posedge clk) q <= ROM[addr];
  end else begin : g_comb
    assign q = ROM[addr];
  end

endmodule
