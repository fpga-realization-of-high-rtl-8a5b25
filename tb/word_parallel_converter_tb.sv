// word_parallel_converter_tb: drives random address words and checks that
// group z of the output is bits z*E .. z*E+E-1 of the word applied z cycles
// earlier, for N = 8 (D = 2, E = 4) and N = 12 (D = 3, E = 4).
module word_parallel_converter_tb;
  localparam int CYCLES = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  a8;
  logic [11:0] a12;
  logic [3:0]  g8 [2], g12 [3];
  logic [11:0] hist [CYCLES];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  word_parallel_converter #(.N(8),  .D(2), .E(4)) dut8  (.clk(clk), .rst_n(rst_n), .addr(a8),  .group_out(g8));
  word_parallel_converter #(.N(12), .D(3), .E(4)) dut12 (.clk(clk), .rst_n(rst_n), .addr(a12), .group_out(g12));

  initial begin
    a8 = '0; a12 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      a12 = 12'($urandom());
      a8  = a12[7:0];
      hist[c] = a12;
      #1;
      for (int z = 0; z < 3; z++) begin
        logic [3:0] e12;
        e12 = (c - z >= 0) ? hist[c - z][z*4 +: 4] : 4'd0;
        checks++;
        if (g12[z] !== e12) begin failures++; $display("N=12 cycle %0d group %0d", c, z); end
        if (z < 2) begin
          checks++;
          if (g8[z] !== e12) begin failures++; $display("N=8 cycle %0d group %0d", c, z); end
        end
      end
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
