// bsa_tb: runs the bit-serial shift accumulator at the four word widths of
// the accumulator comparison (W = 8, 16, 20, 32) with B = 16 words per
// result. Runs follow each other without a gap: `first` marks word 0 and `s`
// word B-1 of every run. Each run's words are random (run 2 uses only the
// most negative word, run 3 only the most positive) and its result is
// checked against
//     y = sum_{t=0}^{B-2} a_t 2^t - a_{B-1} 2^{B-1}
// in the cycle where the next run starts (B cycles after the run's first
// word), together with y_valid, and the serial output y_bit is checked
// against the low bits of the same value while the run is in progress.
module bsa_tb;
  localparam int B = 16, RUNS = 60;
  localparam int NW = 4;
  localparam int WS [NW] = '{8, 16, 20, 32};

  logic clk = 1'b0, rst_n = 1'b0, first, s;
  int cyc = 0;
  int checks [NW], failures [NW], results [NW];

  always #5 clk = ~clk;

  assign first = rst_n && (cyc % B == 0);
  assign s     = rst_n && (cyc % B == B - 1);

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  for (genvar g = 0; g < NW; g++) begin : g_w
    localparam int W = WS[g];
    logic [W-1:0]          a;
    logic                  y_bit, y_valid;
    logic signed [W+B-1:0] y;
    logic [W-1:0]          words [B];
    longint                cur_res, prev_res;

    bsa #(.W(W), .B(B)) dut (.clk(clk), .rst_n(rst_n), .first(first), .s(s), .a(a),
                             .y_bit(y_bit), .y(y), .y_valid(y_valid));

    initial begin
      checks[g] = 0; failures[g] = 0; results[g] = 0; a = '0;
    end

    always @(negedge clk) begin
      if (rst_n) begin
        int r, t;
        r = cyc / B;
        t = cyc % B;
        if (t == 0) begin
          // the previous run's result is due now
          checks[g]++;
          if (y_valid !== (r > 0)) begin failures[g]++; $display("W=%0d cycle %0d: y_valid=%b", W, cyc, y_valid); end
          if (r > 0) begin
            checks[g]++;
            results[g]++;
            if (longint'(y) != prev_res) begin
              failures[g]++;
              $display("W=%0d run %0d: y=%0d expected %0d", W, r - 1, y, prev_res);
            end
          end
          // words of the new run
          cur_res = 0;
          for (int k = 0; k < B; k++) begin
            if (r == 2)      words[k] = {1'b1, {(W-1){1'b0}}};
            else if (r == 3) words[k] = {1'b0, {(W-1){1'b1}}};
            else             words[k] = W'({$urandom(), $urandom()});
            if (k < B - 1) cur_res += longint'($signed(words[k])) <<< k;
            else           cur_res -= longint'($signed(words[k])) <<< k;
          end
        end else begin
          checks[g]++;
          if (y_valid !== 1'b0) begin failures[g]++; $display("W=%0d cycle %0d: stray y_valid", W, cyc); end
          // serial output: bit t-1 of the running result
          checks[g]++;
          if (y_bit !== cur_res[t-1]) begin
            failures[g]++;
            $display("W=%0d run %0d: y_bit %0d wrong", W, r, t - 1);
          end
        end
        if (t == B - 1) prev_res = cur_res;
        a = words[t];
      end
    end
  end

  initial begin
    int tc, tf;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (RUNS * B + 1) @(negedge clk);
    #1;
    tc = 0; tf = 0;
    for (int g = 0; g < NW; g++) begin
      $display("W=%0d: %0d results checked", WS[g], results[g]);
      tc += checks[g]; tf += failures[g];
    end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end

  initial begin
    int tc, tf;
    repeat (RUNS * B + 100) @(posedge clk);
    tc = 0; tf = 1;
    for (int g = 0; g < NW; g++) begin tc += checks[g]; tf += failures[g]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end
endmodule
