// sign_control_tb: after reset the count must run 0..B-1 and wrap, `first`
// must be high exactly at count 0 and `s` exactly at count B-1, every B
// cycles; checked for B = 16 and for B = 5 (a width that is not a power of 2).
module sign_control_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] count16;
  logic [2:0] count5;
  logic s16, first16, s5, first5;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sign_control #(.B(16)) dut16 (.clk(clk), .rst_n(rst_n), .count(count16), .s(s16), .first(first16));
  sign_control #(.B(5))  dut5  (.clk(clk), .rst_n(rst_n), .count(count5),  .s(s5),  .first(first5));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 200; c++) begin
      checks += 6;
      if (count16 != 4'(c % 16)) begin failures++; $display("cycle %0d: count16=%0d", c, count16); end
      if (first16 != (c % 16 == 0)) failures++;
      if (s16 != (c % 16 == 15)) failures++;
      if (count5 != 3'(c % 5)) begin failures++; $display("cycle %0d: count5=%0d", c, count5); end
      if (first5 != (c % 5 == 0)) failures++;
      if (s5 != (c % 5 == 4)) failures++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
