// da_fir_top_tb: end-to-end test of the three DA FIR filters at their
// default sizes (8 taps, 16-bit samples, 8-bit coefficients, D = 2, E = 4).
// Each filter gets its own random sample stream and is checked output by
// output against integer convolution, including the cycle in which every
// output appears (B, B+1 and B+2 cycles after the first address cycle).
// Mechanisms that must occur for each filter, or a failure is counted:
//   - sign-bit-time subtraction of a non-zero word (a negative sample in the
//     window of an output),
//   - full-rate operation (an output exactly B cycles after the previous).
// Every stream holds the most negative and the most positive sample value.
module da_fir_top_tb;
  localparam int N = 8, B = 16, CW = 8, W = CW + 3, NSAMP = 80;
  localparam int NF = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic x_bit [NF], frame_start [NF], y_valid [NF], y_bit [NF], done [NF];
  logic signed [W+B-1:0] y [NF];
  int checks [NF], failures [NF], outputs [NF], neg_windows [NF], back_to_back [NF];

  always #5 clk = ~clk;

  da_fir_top dut (
    .clk(clk), .rst_n(rst_n),
    .full_x_bit(x_bit[0]), .full_frame_start(frame_start[0]), .full_y(y[0]),
    .full_y_valid(y_valid[0]), .full_y_bit(y_bit[0]),
    .part_x_bit(x_bit[1]), .part_frame_start(frame_start[1]), .part_y(y[1]),
    .part_y_valid(y_valid[1]), .part_y_bit(y_bit[1]),
    .sys_x_bit(x_bit[2]), .sys_frame_start(frame_start[2]), .sys_y(y[2]),
    .sys_y_valid(y_valid[2]), .sys_y_bit(y_bit[2])
  );

  localparam int LAT [NF] = '{0, 1, 2};

  for (genvar f = 0; f < NF; f++) begin : g_chk
    fir_checker #(.N(N), .B(B), .L(LAT[f]), .NSAMP(NSAMP)) chk (
      .clk(clk), .rst_n(rst_n), .x_bit(x_bit[f]), .frame_start(frame_start[f]),
      .y(64'(y[f])), .y_valid(y_valid[f]), .checks(checks[f]), .failures(failures[f]),
      .outputs(outputs[f]), .neg_windows(neg_windows[f]), .back_to_back(back_to_back[f]),
      .done(done[f]));
  end

  initial begin
    int tc, tf;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2]);
    @(negedge clk);
    tc = 0; tf = 0;
    for (int f = 0; f < NF; f++) begin
      $display("filter %0d: outputs=%0d sign-bit subtractions of negative samples=%0d full-rate outputs=%0d",
               f, outputs[f], neg_windows[f], back_to_back[f]);
      tc += checks[f] + 2; tf += failures[f];
      if (neg_windows[f] == 0) begin tf++; $display("filter %0d: no negative sample reached the sign-bit time", f); end
      if (back_to_back[f] == 0) begin tf++; $display("filter %0d: never produced outputs at full rate", f); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end

  initial begin
    int tc, tf;
    repeat ((NSAMP + N + 6) * B + 50) @(posedge clk);
    tc = 0; tf = 1;
    for (int f = 0; f < NF; f++) begin tc += checks[f]; tf += failures[f]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end
endmodule
