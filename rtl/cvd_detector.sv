// cvd_detector: the complete control vector detector, Part-1 and Part-2.
//
// How it works. Part-1 (cvd_part1_fsm) recognises the desired M-bit vectors
// and gives their output combinations. On its own it cannot cope with
// vectors that overlap in the stream: after a mismatch it falls back to a
// default state and may lose the vector boundary. Part-2
// (cvd_part2_counter) counts every M bits and its output, frame, returns
// Part-1 to its initial state at the end of each M-bit frame, so that
// every frame is examined from the initial state. The vectors therefore
// arrive back to back, one per M bits, starting with the first bit after
// reset.
//
// Interface and timing: one bit x per rising clk edge, first bit of a vector
// is its MSB. z is the Mealy output of Part-1: it shows a vector's output
// combination in the cycle in which that vector's last bit is on x, and is
// zero otherwise. frame is 1 in the same cycle (the M-th bit of each frame).
// rst is synchronous and active high.
//
// The split into the two parts and the use of Part-2's output as Part-1's
// reset follow the design. Applying the external reset to Part-1 as well
// (not only to Part-2) is this design's choice, so that Part-1 starts in
// its initial state after power-up.
module cvd_detector #(
  parameter int unsigned M  = cvd_pkg::EX1_M,
  parameter int unsigned N  = cvd_pkg::EX1_N,
  parameter int unsigned OW = 1,
  parameter logic [N*M-1:0]  VECTORS = cvd_pkg::EX1_VECTORS,
  parameter logic [N*OW-1:0] CODES   = cvd_pkg::EX1_CODES
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          x,
  output logic [OW-1:0] z,
  output logic          frame
);

  logic p1_rst;

  cvd_part2_counter #(.M(M)) u_part2 (
    .clk (clk),
    .rst (rst),
    .zf  (frame)
  );

  assign p1_rst = rst | frame;

  cvd_part1_fsm #(
    .M(M), .N(N), .OW(OW), .VECTORS(VECTORS), .CODES(CODES)
  ) u_part1 (
    .clk (clk),
    .rst (p1_rst),
    .x   (x),
    .z   (z)
  );

endmodule
