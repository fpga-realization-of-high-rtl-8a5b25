// da_fir_orders_tb: the partitioned-LUT and the systolic DA filters at the
// larger filter orders of their evaluation, 16, 32 and 64 taps, each split
// into 4-input LUTs (D = 4, 8, 16 groups of E = 4 taps), with 16-bit samples.
// Every output is checked against integer convolution and must appear
// B + log2 D (partitioned) or B + D (systolic) cycles after its first
// address cycle.
module da_fir_orders_tb;
  localparam int B = 16, CW = 8, NSAMP = 40;
  localparam int NO = 3;
  localparam int ORDERS [NO] = '{16, 32, 64};

  logic clk = 1'b0, rst_n = 1'b0;
  int checks [2*NO], failures [2*NO], outputs [2*NO];
  logic done [2*NO];

  always #5 clk = ~clk;

  for (genvar o = 0; o < NO; o++) begin : g_ord
    localparam int N = ORDERS[o];
    localparam int E = 4;
    localparam int D = N / E;
    localparam int W = CW + $clog2(N);
    for (genvar k = 0; k < 2; k++) begin : g_kind
      logic x_bit, frame_start, y_valid, y_bit;
      logic signed [W+B-1:0] y;
      int neg_windows, back_to_back;
      if (k == 0) begin : g_part
        da_fir_part #(.N(N), .D(D), .E(E)) dut (
          .clk(clk), .rst_n(rst_n), .x_bit(x_bit), .frame_start(frame_start),
          .y(y), .y_valid(y_valid), .y_bit(y_bit));
      end else begin : g_sys
        da_fir_systolic #(.N(N), .D(D), .E(E)) dut (
          .clk(clk), .rst_n(rst_n), .x_bit(x_bit), .frame_start(frame_start),
          .y(y), .y_valid(y_valid), .y_bit(y_bit));
      end
      fir_checker #(.N(N), .B(B), .L(k == 0 ? $clog2(D) : D), .NSAMP(NSAMP)) chk (
        .clk(clk), .rst_n(rst_n), .x_bit(x_bit), .frame_start(frame_start),
        .y(64'(y)), .y_valid(y_valid), .checks(checks[2*o+k]), .failures(failures[2*o+k]),
        .outputs(outputs[2*o+k]), .neg_windows(neg_windows), .back_to_back(back_to_back),
        .done(done[2*o+k]));
    end
  end

  initial begin
    int tc, tf;
    bit all;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(negedge clk);
      all = 1'b1;
      for (int i = 0; i < 2*NO; i++) all &= done[i];
    end while (!all);
    tc = 0; tf = 0;
    for (int i = 0; i < 2*NO; i++) begin
      $display("%s N=%0d: %0d outputs checked", (i % 2 == 0) ? "partitioned" : "systolic",
               ORDERS[i/2], outputs[i]);
      tc += checks[i]; tf += failures[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end

  initial begin
    int tc, tf;
    repeat ((NSAMP + 64 + 6) * B + 100) @(posedge clk);
    tc = 0; tf = 1;
    for (int i = 0; i < 2*NO; i++) begin tc += checks[i]; tf += failures[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end
endmodule
