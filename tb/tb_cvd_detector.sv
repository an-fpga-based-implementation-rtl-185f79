// tb_cvd_detector: self-checking test of the complete detector (Part-1 and
// Part-2) in the two 21-bit configurations:
//  - dut1: the default, eight vectors detected by a single output;
//  - dut2: the same vectors with four-bit user defined output combinations.
// Frames of 21 bits are sent back to back, MSB first: a desired vector, a
// desired vector with one bit flipped, or random bits. For every cycle the
// expected z is worked out from the frame content (the code of the matching
// vector on the frame's last bit, zero elsewhere) and compared, as is the
// frame output. The test counts how often each mechanism occurs and fails
// if one never does: detection of every vector, a rejected near miss, a
// mismatch in mid frame followed by a detection in the next frame (the
// Part-2 reset restoring alignment), and every output combination of dut2.
`timescale 1ns/1ps
module tb_cvd_detector;
  import cvd_pkg::*;
  localparam int M = EX1_M;
  localparam int N = EX1_N;

  logic clk = 1'b0;
  logic rst, x;
  logic [0:0] z1;
  logic [EX2_OW-1:0] z2;
  logic frame1, frame2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cvd_detector dut1 (.clk(clk), .rst(rst), .x(x), .z(z1), .frame(frame1));
  cvd_detector #(.OW(EX2_OW), .CODES(EX2_CODES))
    dut2 (.clk(clk), .rst(rst), .x(x), .z(z2), .frame(frame2));

  int det_count [N];
  int code_count [EX2_OW];
  int near_miss, realign;

  // Expected outputs for a complete frame.
  function automatic int match_index(input logic [M-1:0] f);
    for (int k = 0; k < N; k++)
      if (EX1_VECTORS[k*M +: M] == f) return k;
    return -1;
  endfunction

  task automatic send_frame(input logic [M-1:0] f, output bit detected);
    int k;
    logic [EX2_OW-1:0] e2;
    logic e1;
    k = match_index(f);
    detected = 1'b0;
    for (int i = M-1; i >= 0; i--) begin
      x = f[i];
      #1;
      e1 = (i == 0) && (k >= 0);
      e2 = ((i == 0) && (k >= 0)) ? EX2_CODES[k*EX2_OW +: EX2_OW] : '0;
      checks += 3;
      if (z1 !== e1) begin
        failures++;
        if (failures < 10) $display("FAIL: frame %b bit %0d z1=%b exp %b", f, i, z1, e1);
      end
      if (z2 !== e2) begin
        failures++;
        if (failures < 10) $display("FAIL: frame %b bit %0d z2=%b exp %b", f, i, z2, e2);
      end
      if (frame1 !== (i == 0) || frame2 !== (i == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL: frame signal at bit %0d", i);
      end
      if (i == 0 && k >= 0 && z1 == 1'b1) begin
        detected = 1'b1;
        det_count[k]++;
        for (int b = 0; b < EX2_OW; b++) if (z2[b]) code_count[b]++;
      end
      @(posedge clk);
      #1;
    end
  endtask

  logic [M-1:0] f;
  bit det, prev_miss;
  int kind;

  initial begin
    foreach (det_count[i]) det_count[i] = 0;
    foreach (code_count[i]) code_count[i] = 0;
    near_miss = 0; realign = 0; prev_miss = 0;
    x = 1'b0; rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;

    for (int n = 0; n < 600; n++) begin
      kind = $urandom_range(0, 3);
      f = EX1_VECTORS[$urandom_range(0, N-1)*M +: M];
      if (kind == 2) f[$urandom_range(0, M-1)] ^= 1'b1;
      if (kind == 3) f = M'({$urandom, $urandom});
      send_frame(f, det);
      if (det && prev_miss) realign++;
      prev_miss = (kind == 2) && (match_index(f) < 0);
      if (prev_miss) near_miss++;
    end

    // Every mechanism must have been exercised.
    for (int k = 0; k < N; k++) begin
      checks++;
      if (det_count[k] == 0) begin failures++; $display("FAIL: vector %0d never detected", k); end
    end
    for (int b = 0; b < EX2_OW; b++) begin
      checks++;
      if (code_count[b] == 0) begin failures++; $display("FAIL: output z%0d never set", EX2_OW-b); end
    end
    checks += 2;
    if (near_miss == 0) begin failures++; $display("FAIL: no near miss rejected"); end
    if (realign == 0)   begin failures++; $display("FAIL: no detection after a near miss"); end
    $display("near misses rejected=%0d detections right after a near miss=%0d", near_miss, realign);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
