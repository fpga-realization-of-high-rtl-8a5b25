// da_fir_full: N-tap distributed-arithmetic FIR filter with one full LUT and
// the bit-serial shift accumulator (BSA).
//
//   y[n] = sum_{i=0}^{N-1} C_i x[n-i]
//
// Samples are B-bit two's complement and enter bit-serially, LSB first, one
// bit per clock, on x_bit; frame_start is high in the cycle that must carry
// the LSB of a new sample. The input shift register unit holds the last N
// samples; in each cycle one bit of every sample forms the N-bit address of
// a 2^N-word LUT (every partial sum of the coefficients), and the BSA adds the
// B words read out, shifted right, subtracting the one read in the sign-bit
// time. The LUT is read combinationally, so the words reach the BSA in the
// same cycle as their address.
//
// Timing: the sample shifted in during frame k is addressed during frame k+1;
// its output y (W+B bits, W = CW + log2 N) is valid, with y_valid, in the
// first cycle of frame k+2, i.e. B cycles after its first address cycle. One
// output every B cycles. y_bit is the BSA's serial output (low result bits,
// LSB first). The structure follows the full-LUT DA filter with the BSA; the
// serial interface framing, the combinational LUT read and the output
// register-free read-out are choices of this design.
module da_fir_full #(
  parameter int N  = 8,
  parameter int B  = da_pkg::SAMPLE_W,
  parameter int CW = da_pkg::COEF_W,
  parameter int COEF [da_pkg::MAX_TAPS] = da_pkg::DEFAULT_COEF,
  localparam int W = da_pkg::sum_width(CW, N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  x_bit,
  output logic                  frame_start,
  output logic signed [W+B-1:0] y,
  output logic                  y_valid,
  output logic                  y_bit
);

  logic [$clog2(B)-1:0] count;
  logic                 s, first;
  logic [N-1:0]         addr;
  logic signed [W-1:0]  word;

  sign_control #(.B(B)) u_ctl (
    .clk(clk), .rst_n(rst_n), .count(count), .s(s), .first(first)
  );

  input_shift_register #(.N(N), .B(B)) u_isr (
    .clk(clk), .rst_n(rst_n), .x_bit(x_bit), .addr(addr)
  );

  da_lut #(.E(N), .W(W), .BASE(0), .REG_OUT(1'b0), .COEF(COEF)) u_lut (
    .clk(clk), .addr(addr), .q(word)
  );

  bsa #(.W(W), .B(B)) u_bsa (
    .clk(clk), .rst_n(rst_n), .first(first), .s(s), .a(word),
    .y_bit(y_bit), .y(y), .y_valid(y_valid)
  );

  assign frame_start = first;

endmodule
