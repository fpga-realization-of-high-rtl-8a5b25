// da_fir_top: the three distributed-arithmetic FIR filter architectures
// built around the bit-serial shift accumulator, side by side:
//
//   full_*  da_fir_full      N-tap filter with one 2^N-word LUT
//   part_*  da_fir_part      N-tap filter with D LUTs of 2^E words and an
//                            adder tree (N = D*E)
//   sys_*   da_fir_systolic  N-tap 1-D systolic array of D LUT+adder cells
//                            feeding the shift accumulator
//
// They are independent designs with their own ports and share only clock and
// reset. Each takes B-bit samples bit-serially, LSB first, on its x_bit
// input, starting a new sample in the cycle its frame_start is high, and
// delivers y[n] (W+B bits, W = CW + log2 N) with y_valid once every B cycles:
// B, B + log2 D and B + D cycles after the first address cycle respectively.
// Defaults: 8 taps, 16-bit samples, 8-bit coefficients, D = 2, E = 4.
module da_fir_top #(
  parameter int N  = 8,
  parameter int D  = 2,
  parameter int E  = 4,
  parameter int B  = da_pkg::SAMPLE_W,
  parameter int CW = da_pkg::COEF_W,
  parameter int COEF [da_pkg::MAX_TAPS] = da_pkg::DEFAULT_COEF,
  localparam int W = da_pkg::sum_width(CW, N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // full-LUT filter
  input  logic                  full_x_bit,
  output logic                  full_frame_start,
  output logic signed [W+B-1:0] full_y,
  output logic                  full_y_valid,
  output logic                  full_y_bit,
  // partitioned-LUT filter
  input  logic                  part_x_bit,
  output logic                  part_frame_start,
  output logic signed [W+B-1:0] part_y,
  output logic                  part_y_valid,
  output logic                  part_y_bit,
  // systolic filter
  input  logic                  sys_x_bit,
  output logic                  sys_frame_start,
  output logic signed [W+B-1:0] sys_y,
  output logic                  sys_y_valid,
  output logic                  sys_y_bit
);

  da_fir_full #(.N(N), .B(B), .CW(CW), .COEF(COEF)) u_full (
    .clk(clk), .rst_n(rst_n), .x_bit(full_x_bit), .frame_start(full_frame_start),
    .y(full_y), .y_valid(full_y_valid), .y_bit(full_y_bit)
  );

  da_fir_part #(.N(N), .D(D), .E(E), .B(B), .CW(CW), .COEF(COEF)) u_part (
    .clk(clk), .rst_n(rst_n), .x_bit(part_x_bit), .frame_start(part_frame_start),
    .y(part_y), .y_valid(part_y_valid), .y_bit(part_y_bit)
  );

  da_fir_systolic #(.N(N), .D(D), .E(E), .B(B), .CW(CW), .COEF(COEF)) u_sys (
    .clk(clk), .rst_n(rst_n), .x_bit(sys_x_bit), .frame_start(sys_frame_start),
    .y(sys_y), .y_valid(sys_y_valid), .y_bit(sys_y_bit)
  );

endmodule
