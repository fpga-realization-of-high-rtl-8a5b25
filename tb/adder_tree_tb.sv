// adder_tree_tb: streams random signed inputs into a 2-input tree (one
// register level) and a 5-input tree (three levels) and checks that every
// sum appears exactly log2 D cycles (rounded up) after its inputs.
module adder_tree_tb;
  localparam int W = 12, CYCLES = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [W-1:0] in2 [2], in5 [5], sum2, sum5;
  int hist2 [CYCLES], hist5 [CYCLES];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  adder_tree #(.D(2), .W(W)) dut2 (.clk(clk), .rst_n(rst_n), .in(in2), .sum(sum2));
  adder_tree #(.D(5), .W(W)) dut5 (.clk(clk), .rst_n(rst_n), .in(in5), .sum(sum5));

  initial begin
    for (int k = 0; k < 2; k++) in2[k] = '0;
    for (int k = 0; k < 5; k++) in5[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      if (c >= 1) begin
        checks++;
        if (int'(sum2) != hist2[c-1]) begin failures++; $display("D=2 cycle %0d: %0d vs %0d", c, sum2, hist2[c-1]); end
      end
      if (c >= 3) begin
        checks++;
        if (int'(sum5) != hist5[c-3]) begin failures++; $display("D=5 cycle %0d: %0d vs %0d", c, sum5, hist5[c-3]); end
      end
      hist2[c] = 0; hist5[c] = 0;
      // keep magnitudes such that the sums fit in W bits
      for (int k = 0; k < 2; k++) begin in2[k] = W'($signed(9'($urandom()))); hist2[c] += int'(in2[k]); end
      for (int k = 0; k < 5; k++) begin in5[k] = W'($signed(9'($urandom()))); hist5[c] += int'(in5[k]); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 50) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
