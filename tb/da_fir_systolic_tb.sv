// da_fir_systolic_tb: random samples through the 8-tap 1-D systolic DA filter (D=2 cells of E=4 taps) at its
// default sizes, checked against integer convolution, output by output, with
// the latency of B + D cycles from the first address cycle and the frame marker.
module da_fir_systolic_tb;
  localparam int N = 8, B = 16, CW = 8, W = CW + 3, NSAMP = 60;

  logic clk = 1'b0, rst_n = 1'b0, x_bit, frame_start, y_valid, y_bit, done;
  logic signed [W+B-1:0] y;
  int checks, failures, outputs, neg_windows, back_to_back;

  always #5 clk = ~clk;

  da_fir_systolic dut (.clk(clk), .rst_n(rst_n), .x_bit(x_bit), .frame_start(frame_start),
                   .y(y), .y_valid(y_valid), .y_bit(y_bit));

  fir_checker #(.N(N), .B(B), .L(2), .NSAMP(NSAMP)) chk (
    .clk(clk), .rst_n(rst_n), .x_bit(x_bit), .frame_start(frame_start), .y(64'(y)),
    .y_valid(y_valid), .checks(checks), .failures(failures), .outputs(outputs),
    .neg_windows(neg_windows), .back_to_back(back_to_back), .done(done));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done);
    @(negedge clk);
    $display("outputs=%0d negative_windows=%0d back_to_back=%0d", outputs, neg_windows, back_to_back);
    if (neg_windows == 0 || back_to_back == 0) begin
      $display("sign-bit subtraction or full-rate output never exercised");
      $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    end else
      $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures);
    $finish;
  end

  initial begin
    repeat ((NSAMP + N + 4) * B + 50) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
