// bit_serial_adder: one full adder whose carry-out is stored in a D
// flip-flop and returned as the carry-in of the next clock cycle, so that a
// stream of bits presented least significant first is added with the carry
// saved from one bit position to the next.
//
//   sum   = a ^ b ^ c            carry = a&b | a&c | b&c
//   c     = carry of the previous cycle (0 in a cycle with start = 1)
//
// `start` clears the carry at the beginning of a computation. It acts in the
// same cycle: the adder then sees a carry-in of 0, and the flip-flop loads
// the new carry as usual, so back-to-back computations need no idle cycle.
// `sum` and `carry` are combinational; `carry_q` is the stored carry, brought
// out so that a surrounding accumulator can read its carry-save state.
// The structure (full adder plus carry flip-flop with a reset) follows the
// classic bit-serial adder; the same-cycle form of the clear is a choice of
// this design.
module bit_serial_adder (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry,
  output logic carry_q
);

  logic c_in;

  assign c_in  = start ? 1'b0 : carry_q;
  assign sum   = a ^ b ^ c_in;
  assign carry = (a & b) | (a & c_in) | (b & c_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) carry_q <= 1'b0;
    else        carry_q <= carry;
  end

endmodule
