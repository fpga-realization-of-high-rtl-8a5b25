// bsa: bit-serial shift accumulator (BSA) of a distributed-arithmetic filter.
//
// It computes  y = sum_{t=0}^{B-2} a_t 2^t  -  a_{B-1} 2^{B-1}  from B signed
// W-bit words a_0 .. a_{B-1} that arrive one per clock, the last one in the
// sign-bit time (s = 1). This is the right-shift accumulation
// Acc = (Acc >> 1) +/- a, built from W pipelined bit-serial adders instead of
// a W-bit carry-propagate adder, so that the longest path is one full adder.
//
// Cell p (p = 0 is the least significant) is a bit_serial_adder. Its inputs
// are bit p of the word, inverted when s = 1, and the registered sum of cell
// p+1 (the right shift); its own carry is fed back through the carry flip-flop.
// The most significant cell takes its own registered sum as its shift input,
// which sign-extends the accumulator; it works with negative bit weights
// throughout, so the carry-save state is an exact two's-complement value and
// no overflow can occur. The sum register of cell 0 drops out one result bit
// per clock: y_bit, least significant first.
//
// Subtraction in the sign-bit time is "invert and add one": the XOR gates
// invert the word, and the one at the LSB, weight 2^{B-1}, is added when the
// accumulator is read out (see below), because every full adder input of the
// bottom cell is taken in that cycle.
//
// Read-out: the B-1 low result bits are collected from y_bit; the upper W+1
// bits are the carry-save state plus the pending one of the subtraction,
// resolved by one W+1-bit addition. The result is presented combinationally
// in the cycle in which `first` starts the next accumulation, with y_valid = 1
// (not after reset, before any accumulation has run). So y for words applied
// in cycles t..t+B-1 appears in cycle t+B, and a new result follows every B
// cycles. `first` clears the accumulator in the same cycle (the flip-flops of
// the bit-serial adders are reset at the start of each computation).
//
// Timing contract: `s` must be high exactly in the last word of each group of
// B words and `first` in the first one (as sign_control produces them).
module bsa #(
  parameter int W = 8,     // word width (bits of the LUT output)
  parameter int B = 16     // words per result (input sample width)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  first,    // first word of an accumulation
  input  logic                  s,        // sign-bit time: subtract this word
  input  logic [W-1:0]          a,        // signed input word
  output logic                  y_bit,    // serial result bit, LSB first
  output logic signed [W+B-1:0] y,        // full result of the previous run
  output logic                  y_valid
);

  logic [W-1:0] ax;        // word after the sign-control XOR gates
  logic [W-1:0] shift_in;  // shift input of each cell
  logic [W-1:0] cell_sum, cell_carry, carry_q;
  logic [W-1:0] sum_q;     // sum registers ("D" between cells)
  logic [B-2:0] low_q;     // collected low result bits
  logic         s_q;       // pending +1 of the subtraction
  logic         busy_q;    // an accumulation has been started

  assign ax = a ^ {W{s}};

  for (genvar p = 0; p < W; p++) begin : g_cell
    if (p == W - 1) begin : g_top
      assign shift_in[p] = first ? 1'b0 : sum_q[W-1];
    end else begin : g_mid
      assign shift_in[p] = first ? 1'b0 : sum_q[p+1];
    end
    bit_serial_adder u_bsa (
      .clk    (clk),
      .rst_n  (rst_n),
      .start  (first),
      .a      (ax[p]),
      .b      (shift_in[p]),
      .sum    (cell_sum[p]),
      .carry  (cell_carry[p]),
      .carry_q(carry_q[p])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q  <= '0;
      low_q  <= '0;
      s_q    <= 1'b0;
      busy_q <= 1'b0;
    end else begin
      sum_q  <= cell_sum;
      low_q  <= {sum_q[0], low_q[B-2:1]};
      s_q    <= s;
      if (first) busy_q <= 1'b1;
    end
  end

  assign y_bit = sum_q[0];

  // Upper part of the result: sum vector (W-bit signed) plus carry vector
  // (carry of cell p has weight 2^(p+1); that of the top cell is negative)
  // plus the deferred one of the sign-bit-time subtraction.
  logic signed [W:0] high;
  assign high = $signed({sum_q[W-1], sum_q}) + $signed({carry_q, 1'b0})
              + $signed({{W{1'b0}}, s_q});

  assign y       = {high, low_q};
  assign y_valid = first & busy_q;

  // The subtraction is only correct in the last word of a run.
  a_sign_last : assert property (@(posedge clk) disable iff (!rst_n) s |-> !first)
    else $error("bsa: sign-bit time coincides with the first word");

endmodule
