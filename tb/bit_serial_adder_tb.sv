// bit_serial_adder_tb: adds pairs of random 16-bit numbers bit-serially,
// LSB first, back to back with `start` in the first bit of each pair, and
// compares every sum bit with the bits of the integer sum; the carry of the
// last bit must be the 17th bit of the sum.
module bit_serial_adder_tb;
  localparam int NB = 16, PAIRS = 200;

  logic clk = 1'b0, rst_n = 1'b0, start, a, b, sum, carry, carry_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bit_serial_adder dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
                        .sum(sum), .carry(carry), .carry_q(carry_q));

  initial begin
    logic [NB-1:0] x, y;
    logic [NB:0]   s;
    start = 1'b0; a = 1'b0; b = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < PAIRS; p++) begin
      x = NB'($urandom()); y = NB'($urandom());
      if (p == 1) begin x = '1; y = '1; end
      s = {1'b0, x} + {1'b0, y};
      for (int j = 0; j < NB; j++) begin
        start = (j == 0); a = x[j]; b = y[j];
        #1;
        checks++;
        if (sum !== s[j]) begin
          failures++;
          $display("pair %0d bit %0d: sum=%b expected %b", p, j, sum, s[j]);
        end
        if (j == NB - 1) begin
          checks++;
          if (carry !== s[NB]) begin failures++; $display("pair %0d: carry out wrong", p); end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (PAIRS * NB + 100) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
