// da_lut_tb: reads every entry of three tables and compares it with the sum
// of the selected default coefficients: a 16-word table of taps 0..3, a
// 16-word table of taps 4..7 with a registered output (one cycle later), and
// the full 256-word table of taps 0..7.
module da_lut_tb;
  logic clk = 1'b0;
  logic [3:0] a4;
  logic [7:0] a8;
  logic signed [9:0]  q_lo, q_hi_reg;
  logic signed [10:0] q_full;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  da_lut #(.E(4), .W(10), .BASE(0)) lut_lo (.clk(clk), .addr(a4), .q(q_lo));
  da_lut #(.E(4), .W(10), .BASE(4), .REG_OUT(1'b1)) lut_hi (.clk(clk), .addr(a4), .q(q_hi_reg));
  da_lut #(.E(8), .W(11), .BASE(0)) lut_full (.clk(clk), .addr(a8), .q(q_full));

  function automatic int ref_sum(int base, int k, int e);
    int acc = 0;
    for (int i = 0; i < e; i++) if (((k >> i) & 1) != 0) acc += da_pkg::DEFAULT_COEF[base + i];
    return acc;
  endfunction

  initial begin
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      a4 = 4'(k);
      #1;
      checks++;
      if (int'(q_lo) != ref_sum(0, k, 4)) begin failures++; $display("lo[%0d]=%0d", k, q_lo); end
      @(posedge clk); #1;
      checks++;
      if (int'(q_hi_reg) != ref_sum(4, k, 4)) begin failures++; $display("hi[%0d]=%0d", k, q_hi_reg); end
    end
    for (int k = 0; k < 256; k++) begin
      a8 = 8'(k);
      #1;
      checks++;
      if (int'(q_full) != ref_sum(0, k, 8)) begin failures++; $display("full[%0d]=%0d", k, q_full); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
