// fir_checker: stimulus and scoreboard for one bit-serial DA FIR filter.
//
// It draws NSAMP random B-bit samples (sample 3 is the most negative value,
// sample 5 the most positive), sends sample k bit-serially, LSB first, in
// cycles kB .. kB+B-1 counted from the first cycle after reset, and then
// zeros. Output number m (m = 0, 1, ...) must equal
//     y[m-1] = sum_{i=0}^{N-1} C_i x[m-1-i]      (x[k] = 0 outside 0..NSAMP-1)
// and must be flagged in cycle (m+1)B + L, L being the filter's pipeline
// latency; frame_start must be high exactly in cycles that are multiples of B.
// The reference is plain integer convolution, independent of the DA tables.
// It also counts outputs whose window holds a negative sample (so the
// sign-bit-time subtraction did real work) and outputs that came exactly B
// cycles after the previous one (full throughput).
module fir_checker #(
  parameter int N     = 8,
  parameter int B     = 16,
  parameter int L     = 0,
  parameter int NSAMP = 40,
  parameter int COEF [da_pkg::MAX_TAPS] = da_pkg::DEFAULT_COEF
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               x_bit,
  input  logic               frame_start,
  input  logic signed [63:0] y,          // sign-extended filter output
  input  logic               y_valid,
  output int                 checks,
  output int                 failures,
  output int                 outputs,
  output int                 neg_windows,
  output int                 back_to_back,
  output logic               done
);

  logic [B-1:0] x [NSAMP];
  int           cyc;
  int           last_valid;

  function automatic longint sample(int k);
    if (k < 0 || k >= NSAMP) return 0;
    return longint'($signed(x[k]));
  endfunction

  function automatic longint ref_y(int k);
    longint acc = 0;
    for (int i = 0; i < N; i++) acc += longint'(COEF[i]) * sample(k - i);
    return acc;
  endfunction

  function automatic bit window_negative(int k);
    for (int i = 0; i < N; i++) if (sample(k - i) < 0) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    for (int k = 0; k < NSAMP; k++) x[k] = B'($urandom());
    x[3] = {1'b1, {(B-1){1'b0}}};
    x[5] = {1'b0, {(B-1){1'b1}}};
    checks = 0; failures = 0; outputs = 0; neg_windows = 0; back_to_back = 0;
    done = 1'b0; cyc = 0; last_valid = -1; x_bit = 1'b0;
  end

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n) begin
      // frame marker
      checks++;
      if (frame_start !== ((cyc % B) == 0)) begin
        failures++;
        $display("frame_start wrong in cycle %0d", cyc);
      end
      if (y_valid) begin
        longint exp_y;
        int     exp_cyc;
        exp_y   = ref_y(outputs - 1);
        exp_cyc = (outputs + 1) * B + L;
        checks += 2;
        if (y !== exp_y) begin
          failures++;
          $display("output %0d: y=%0d expected %0d", outputs, y, exp_y);
        end
        if (cyc != exp_cyc) begin
          failures++;
          $display("output %0d: in cycle %0d, expected cycle %0d", outputs, cyc, exp_cyc);
        end
        if (window_negative(outputs - 1)) neg_windows++;
        if (last_valid >= 0 && cyc - last_valid == B) back_to_back++;
        last_valid = cyc;
        outputs++;
        if (outputs >= NSAMP + N + 1) done = 1'b1;
      end
      // next input bit
      x_bit = ((cyc / B) < NSAMP) ? x[cyc / B][cyc % B] : 1'b0;
    end
  end

endmodule
