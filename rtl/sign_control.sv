// sign_control: bit-time counter of a bit-serial DA filter.
//
// A sample of B bits is processed in B clock cycles (one "frame"), least
// significant bit first, so the sign bits of all samples arrive together in
// the last cycle of the frame, the sign-bit time. This unit counts the bit
// time 0..B-1 from reset and raises
//   s     in the sign-bit time (count = B-1), where the accumulator subtracts,
//   first in the first bit time (count = 0), where the accumulator restarts.
// Both outputs are decoded from the registered count, so they are valid for
// the whole cycle. The counter runs freely after reset; frames follow each
// other without gaps, giving one filter output every B cycles.
module sign_control #(
  parameter int B = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic [$clog2(B)-1:0] count,
  output logic                 s,
  output logic                 first
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         count <= '0;
    else if (count == ($clog2(B))'(B - 1)) count <= '0;
    else                                count <= count + 1'b1;
  end

  assign s     = (count == ($clog2(B))'(B - 1));
  assign first = (count == '0);

endmodule
