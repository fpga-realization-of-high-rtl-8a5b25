// pe1_tb: drives random addresses and partial sums into a processing element
// that covers taps 4..7 and checks that OUT, one cycle later, equals IN plus
// the sum of the coefficients selected by the address.
module pe1_tb;
  localparam int E = 4, W = 11, BASE = 4, CYCLES = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [E-1:0] vin;
  logic signed [W-1:0] pin, pout;
  int expect_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pe1 #(.E(E), .W(W), .BASE(BASE)) dut (.clk(clk), .rst_n(rst_n), .vin(vin), .pin(pin), .pout(pout));

  initial begin
    vin = '0; pin = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      if (c > 0) begin
        checks++;
        if (int'(pout) != expect_q) begin failures++; $display("cycle %0d: out=%0d expected %0d", c, pout, expect_q); end
      end
      vin = E'($urandom());
      pin = W'($signed(9'($urandom())));
      expect_q = int'(pin);
      for (int i = 0; i < E; i++) if (vin[i]) expect_q += da_pkg::DEFAULT_COEF[BASE + i];
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
