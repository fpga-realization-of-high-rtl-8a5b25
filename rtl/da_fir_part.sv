// da_fir_part: N-tap distributed-arithmetic FIR filter with its LUT
// partitioned into D smaller LUTs of E address lines each (N = D*E), and the
// bit-serial shift accumulator (BSA).
//
// Instead of one 2^N-word table, LUT z holds the partial sums of coefficients
// C_{zE} .. C_{zE+E-1} and is addressed by the current bits of samples
// x[n-zE] .. x[n-zE-E+1]; D*2^E words in all. A pipelined adder tree adds
// the D LUT outputs in log2 D cycles, and the BSA accumulates the sums as in
// the full-LUT filter. The sign-bit-time and first-word strobes are delayed
// by the same log2 D cycles.
//
// Interface as da_fir_full: serial input x_bit, LSB first, a new sample
// starting in each cycle with frame_start. Timing: an output is valid
// B + log2 D cycles after its first address cycle, one every B cycles.
// The D=2, E=4 split of an 8-tap filter is the reference configuration; the
// adder tree's registers and the serial framing are choices of this design.
module da_fir_part #(
  parameter int N  = 8,
  parameter int D  = 2,
  parameter int E  = 4,
  parameter int B  = da_pkg::SAMPLE_W,
  parameter int CW = da_pkg::COEF_W,
  parameter int COEF [da_pkg::MAX_TAPS] = da_pkg::DEFAULT_COEF,
  localparam int W = da_pkg::sum_width(CW, N),
  localparam int L = (D > 1) ? $clog2(D) : 0    // adder tree latency
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
  logic signed [W-1:0]  part [D];
  logic signed [W-1:0]  word;
  logic [L:0]           s_pipe, first_pipe;

  sign_control #(.B(B)) u_ctl (
    .clk(clk), .rst_n(rst_n), .count(count), .s(s), .first(first)
  );

  input_shift_register #(.N(N), .B(B)) u_isr (
    .clk(clk), .rst_n(rst_n), .x_bit(x_bit), .addr(addr)
  );

  for (genvar z = 0; z < D; z++) begin : g_lut
    da_lut #(.E(E), .W(W), .BASE(z * E), .REG_OUT(1'b0), .COEF(COEF)) u_lut (
      .clk(clk), .addr(addr[z*E +: E]), .q(part[z])
    );
  end

  adder_tree #(.D(D), .W(W)) u_add (
    .clk(clk), .rst_n(rst_n), .in(part), .sum(word)
  );

  // Align the sign-control strobes with the adder tree output.
  assign s_pipe[0]     = s;
  assign first_pipe[0] = first;
  for (genvar k = 1; k <= L; k++) begin : g_dly
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s_pipe[k]     <= 1'b0;
        first_pipe[k] <= 1'b0;
      end else begin
        s_pipe[k]     <= s_pipe[k-1];
        first_pipe[k] <= first_pipe[k-1];
      end
    end
  end

  bsa #(.W(W), .B(B)) u_bsa (
    .clk(clk), .rst_n(rst_n), .first(first_pipe[L]), .s(s_pipe[L]), .a(word),
    .y_bit(y_bit), .y(y), .y_valid(y_valid)
  );

  assign frame_start = first;

  initial assert (N == D * E) else $error("da_fir_part: N must equal D*E");

endmodule
