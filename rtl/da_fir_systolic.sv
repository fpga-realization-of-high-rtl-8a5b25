// da_fir_systolic: one-dimensional systolic distributed-arithmetic FIR
// filter, N = D*E taps, with the bit-serial shift accumulator (BSA) as its
// output cell.
//
// The input shift register unit presents one bit of each of the N latest
// samples per clock. The word parallel converter cuts these N bits into D
// groups of E and delays group z by z cycles. A chain of D pe1 cells, fed 0
// at its left end, adds the LUT entry of each group to the partial sum
// passing through (OUT <= IN + LUT(VIN)), one register per cell, so the full
// inner product for one bit position leaves the last cell D cycles after its
// address. The BSA output cell shift-accumulates these sums; the
// sign-control strobes are delayed by D cycles to match.
//
// Interface as da_fir_full: serial input x_bit, LSB first, a new sample in
// each frame of B cycles starting with frame_start. Timing: the first output
// is valid B + D cycles after the first address reaches the first cell, then
// one output every B cycles. Cells, converter and output cell follow the
// systolic DA structure; the serial framing is a choice of this design.
module da_fir_systolic #(
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
  input  logic                  x_bit,
  output logic                  frame_start,
  output logic signed [W+B-1:0] y,
  output logic                  y_valid,
  output logic                  y_bit
);

  logic [$clog2(B)-1:0] count;
  logic                 s, first;
  logic [N-1:0]         addr;
  logic [E-1:0]         vin [D];
  logic signed [W-1:0]  psum [D+1];
  logic [D:0]           s_pipe, first_pipe;

  sign_control #(.B(B)) u_ctl (
    .clk(clk), .rst_n(rst_n), .count(count), .s(s), .first(first)
  );

  input_shift_register #(.N(N), .B(B)) u_isr (
    .clk(clk), .rst_n(rst_n), .x_bit(x_bit), .addr(addr)
  );

  word_parallel_converter #(.N(N), .D(D), .E(E)) u_wpc (
    .clk(clk), .rst_n(rst_n), .addr(addr), .group_out(vin)
  );

  assign psum[0] = '0;
  for (genvar z = 0; z < D; z++) begin : g_pe
    pe1 #(.E(E), .W(W), .BASE(z * E), .COEF(COEF)) u_pe (
      .clk(clk), .rst_n(rst_n), .vin(vin[z]), .pin(psum[z]), .pout(psum[z+1])
    );
  end

  assign s_pipe[0]     = s;
  assign first_pipe[0] = first;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_pipe[D:1]     <= '0;
      first_pipe[D:1] <= '0;
    end else begin
      s_pipe[D:1]     <= s_pipe[D-1:0];
      first_pipe[D:1] <= first_pipe[D-1:0];
    end
  end

  bsa #(.W(W), .B(B)) u_sa (
    .clk(clk), .rst_n(rst_n), .first(first_pipe[D]), .s(s_pipe[D]), .a(psum[D]),
    .y_bit(y_bit), .y(y), .y_valid(y_valid)
  );

  assign frame_start = first;

  initial assert (N == D * E) else $error("da_fir_systolic: N must equal D*E");

endmodule
