// input_shift_register_tb: shifts in random bits and checks that address bit
// i always equals the bit that entered i*B + B cycles earlier (the LSB of the
// sample held in register x[n-i]), zero before that, for N = 8, B = 16.
module input_shift_register_tb;
  localparam int N = 8, B = 16, CYCLES = 600;

  logic clk = 1'b0, rst_n = 1'b0, x_bit;
  logic [N-1:0] addr;
  logic hist [CYCLES];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  input_shift_register #(.N(N), .B(B)) dut (.clk(clk), .rst_n(rst_n), .x_bit(x_bit), .addr(addr));

  initial begin
    x_bit = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      // c bits have been shifted in so far
      for (int i = 0; i < N; i++) begin
        int age;
        logic expb;
        age  = i * B + B;
        expb = (c - age >= 0) ? hist[c - age] : 1'b0;
        checks++;
        if (addr[i] !== expb) begin
          failures++;
          $display("cycle %0d: addr[%0d]=%b expected %b", c, i, addr[i], expb);
        end
      end
      x_bit   = 1'($urandom());
      hist[c] = x_bit;
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
