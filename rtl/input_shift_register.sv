// input_shift_register: the input shift register unit of a bit-serial DA
// filter.
//
// N registers of B bits hold the N most recent samples x[n], x[n-1], ...,
// x[n-N+1]. They form one chain of N*B bits that shifts right by one bit
// every clock: the serial input enters the most significant bit of the x[n]
// register, and the least significant bit of each register feeds the most
// significant bit of the next older one. The rightmost (least significant)
// bits of all registers form the LUT address: addr[i] is the current bit of
// x[n-i]. After B clocks every sample has moved one register down, so the
// next sample must be shifted in, LSB first, during the B cycles in which the
// current one is read out.
module input_shift_register #(
  parameter int N = 8,
  parameter int B = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         x_bit,   // serial input sample, LSB first
  output logic [N-1:0] addr     // addr[i] = current bit of x[n-i]
);

  logic [N*B-1:0] chain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chain <= '0;
    else        chain <= {x_bit, chain[N*B-1:1]};
  end

  for (genvar i = 0; i < N; i++) begin : g_addr
    assign addr[i] = chain[(N - 1 - i) * B];
  end

endmodule
