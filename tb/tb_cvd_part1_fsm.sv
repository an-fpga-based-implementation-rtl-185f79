// tb_cvd_part1_fsm: self-checking test of the Part-1 FSM in its default
// configuration (eight 21-bit vectors, single output).
//
// The reference is the 31-state reduced state table of that
// example, written out below state by state with its own state names. The
// FSM under test builds its table from the vector list, so both must give
// the same output for every input sequence. The test checks:
//  - z against the reference table on every cycle of a long random stream
//    without resets, and of streams biased towards the desired vectors;
//  - each desired vector, framed with a reset on its last bit, is detected
//    in the cycle of its last bit (Mealy output, zero latency);
//  - a synchronous reset returns the FSM to the initial state.
`timescale 1ns/1ps
module tb_cvd_part1_fsm;
  import cvd_pkg::*;

  logic clk = 1'b0;
  logic rst, x;
  logic [0:0] z;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cvd_part1_fsm dut (.clk(clk), .rst(rst), .x(x), .z(z));

  // Reduced state table of the 21-bit single-output example.
  // Returns {next state, output}.
  function automatic logic [6:0] ref_step(input int s, input logic xi);
    int n; logic o;
    o = 1'b0;
    case (s)
      0:  n = xi ? 1  : 0;
      1:  n = xi ? 1  : 2;
      2:  n = xi ? 1  : 3;
      3:  n = xi ? 1  : 4;
      4:  n = xi ? 5  : 0;
      5:  n = xi ? 6  : 0;
      6:  n = xi ? 1  : 7;
      7:  n = xi ? 1  : 8;
      8:  n = xi ? 9  : 0;
      9:  n = xi ? 1  : 10;
      10: n = xi ? 12 : 11;
      11: n = xi ? 1  : 13;
      12: n = xi ? 1  : 14;
      13: n = xi ? 15 : 0;
      14: n = xi ? 16 : 0;
      15: n = xi ? 17 : 0;
      16: n = xi ? 18 : 0;
      17: n = xi ? 19 : 0;
      18: n = xi ? 20 : 0;
      19: n = xi ? 21 : 0;
      20: n = xi ? 22 : 0;
      21: n = xi ? 23 : 0;
      22: n = xi ? 24 : 0;
      23: n = xi ? 1  : 25;
      24: n = xi ? 25 : 0;
      25: n = xi ? 28 : 27;
      27: n = xi ? 32 : 31;
      28: n = xi ? 33 : 0;
      31: begin n = xi ? 1 : 0; o = ~xi; end
      32: begin n = 0;          o = xi;  end
      33: begin n = 0;          o = 1'b1; end
      default: n = 0;
    endcase
    return {6'(n), o};
  endfunction

  int ref_s;

  // One bit: present x, compare z with the reference before the edge,
  // then clock both.
  task automatic step(input logic xi, input logic r);
    logic [6:0] e;
    x = xi; rst = r;
    #1;
    e = ref_step(ref_s, xi);
    checks++;
    if (z !== e[0]) begin
      failures++;
      if (failures < 10)
        $display("FAIL: ref state S%0d x=%0b z=%0b expected %0b", ref_s, xi, z, e[0]);
    end
    @(posedge clk);
    #1;
    ref_s = r ? 0 : int'(e[6:1]);
  endtask

  int detections;
  logic [EX1_M-1:0] v;

  initial begin
    x = 1'b0; rst = 1'b1; ref_s = 0;
    @(posedge clk); #1;
    rst = 1'b0;

    // Uniform random stream, no resets.
    for (int i = 0; i < 3000; i++) step(1'($urandom_range(0, 1)), 1'b0);

    // Streams built from desired vectors with random corruptions, no resets.
    for (int k = 0; k < 300; k++) begin
      v = EX1_VECTORS[$urandom_range(0, EX1_N-1)*EX1_M +: EX1_M];
      if ($urandom_range(0, 3) == 0) v[$urandom_range(0, EX1_M-1)] ^= 1'b1;
      for (int i = EX1_M-1; i >= 0; i--) step(v[i], 1'b0);
    end

    // Framed detection of each desired vector, reset on the last bit.
    rst = 1'b1; @(posedge clk); #1; rst = 1'b0; ref_s = 0;
    detections = 0;
    for (int k = 0; k < int'(EX1_N); k++) begin
      v = EX1_VECTORS[k*EX1_M +: EX1_M];
      for (int i = EX1_M-1; i >= 1; i--) step(v[i], 1'b0);
      x = v[0]; #1;
      if (z == 1'b1) detections++;
      step(v[0], 1'b1);
    end
    checks++;
    if (detections != int'(EX1_N)) begin
      failures++;
      $display("FAIL: %0d of %0d vectors detected", detections, EX1_N);
    end

    // Reset from the middle of a vector.
    for (int i = EX1_M-1; i >= 10; i--) step(EX1_VECTORS[i], 1'b0);
    step(1'b0, 1'b1);
    for (int i = EX1_M-1; i >= 0; i--) step(EX1_VECTORS[i], 1'b0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
