// cvd_part2_counter: Part-2 of the control vector detector, the FSM that
// "detects every M-bit vector", i.e. a modulo-M bit counter.
//
// How it works. The FSM has M states S0..S(M-1); every received bit moves
// it to the next state whatever its value, and S(M-1) returns to S0. The
// output zf is 1 while the counter is in S(M-1), i.e. in the cycle in which
// the M-th bit of a frame is on the serial input, and it is decoded from
// the state flip-flops by a single AND term (the terminal count).
//
// Interface and timing: one bit per rising clk edge; the bit value itself
// does not affect the count, so the bit stream is not an input here.
// rst is synchronous and active high and puts the counter in S0, so the
// first bit after reset is bit 1 of a frame. zf is a registered-state
// decode with no combinational path from an input.
//
// The state graph and the use of the output as the frame boundary follow
// the design; the binary state encoding and the synchronous reset are this
// design's own choices.
module cvd_part2_counter #(
  parameter int unsigned M = cvd_pkg::EX1_M   // vector (frame) length in bits
) (
  input  logic clk,
  input  logic rst,   // synchronous, active high: go to S0
  output logic zf     // 1 on the last bit of every M-bit frame
);

  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;
  typedef logic [CW-1:0] count_t;
  localparam count_t LAST = count_t'(M - 1);

  count_t count_q;

  assign zf = (count_q == LAST);

  always_ff @(posedge clk) begin
    if (rst || count_q >= LAST) count_q <= '0;
    else                         count_q <= count_q + count_t'(1);
  end

  initial assert (M >= 2) else $error("cvd_part2_counter: M must be at least 2");

endmodule
