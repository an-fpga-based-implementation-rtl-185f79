// tb_cvd_workload_4bit: the detector on every set of three and every set of
// four distinct 4-bit vectors (560 + 1820 detectors, single output).
//
// All detectors receive the same stream: the sixteen 4-bit frames in order,
// then random frames. On the last bit of every frame each detector must give
// 1 exactly when the frame is one of its own vectors, and 0 on every other
// bit. For a few vector sets the reduced state count of Part-1 is compared
// with a value worked out by hand from the construction; for all of them the
// range of state counts and of flip-flops (Part-1 state register plus the
// 2-bit Part-2 counter) is printed.
`timescale 1ns/1ps
module tb_cvd_workload_4bit;
  localparam int M = 4;

  logic clk = 1'b0;
  logic rst, x;
  logic [M-1:0] cur_frame;
  int pos;
  int checks = 0, failures = 0;
  int min3 = 1000, max3 = 0, min4 = 1000, max4 = 0;

  always #5 clk = ~clk;

  function automatic int ff_bits(input int ns);
    return $clog2(ns) + $clog2(M);
  endfunction

  // Hand-worked reduced state counts for some three-vector sets.
  function automatic int hand_count3(input int a, input int b, input int c);
    case ({4'(a), 4'(b), 4'(c)})
      {4'd0, 4'd1, 4'd2}:    return 5;
      {4'd0, 4'd1, 4'd4}:    return 6;
      {4'd3, 4'd4, 4'd15}:   return 7;
      {4'd3, 4'd5, 4'd6}:    return 6;
      {4'd3, 4'd5, 4'd7}:    return 5;
      {4'd13, 4'd14, 4'd15}: return 5;
      default:               return -1;
    endcase
  endfunction

  for (genvar a = 0; a < 16; a++) begin : g_a
    for (genvar b = a + 1; b < 16; b++) begin : g_b
      for (genvar c = b + 1; c < 16; c++) begin : g_c
        logic [0:0] z;
        logic       fr;
        cvd_detector #(.M(M), .N(3), .OW(1), .VECTORS({4'(c), 4'(b), 4'(a)}), .CODES(3'b111))
          u (.clk(clk), .rst(rst), .x(x), .z(z), .frame(fr));
        always @(negedge clk) if (!rst) begin
          checks++;
          if (z !== ((pos == M-1) && (cur_frame == a || cur_frame == b || cur_frame == c))) begin
            failures++;
            if (failures < 10) $display("FAIL: set (%0d,%0d,%0d) frame %0d bit %0d z=%b", a, b, c, cur_frame, pos, z);
          end
        end
        initial begin
          #1;
          if (u.u_part1.NUM_STATES < min3) min3 = u.u_part1.NUM_STATES;
          if (u.u_part1.NUM_STATES > max3) max3 = u.u_part1.NUM_STATES;
          if (hand_count3(a, b, c) >= 0) begin
            checks++;
            if (u.u_part1.NUM_STATES != hand_count3(a, b, c)) begin
              failures++;
              $display("FAIL: set (%0d,%0d,%0d) has %0d states, expected %0d",
                       a, b, c, u.u_part1.NUM_STATES, hand_count3(a, b, c));
            end
          end
        end
        for (genvar d = c + 1; d < 16; d++) begin : g_d
          logic [0:0] z4;
          logic       fr4;
          cvd_detector #(.M(M), .N(4), .OW(1), .VECTORS({4'(d), 4'(c), 4'(b), 4'(a)}), .CODES(4'b1111))
            u4 (.clk(clk), .rst(rst), .x(x), .z(z4), .frame(fr4));
          always @(negedge clk) if (!rst) begin
            checks++;
            if (z4 !== ((pos == M-1) &&
                        (cur_frame == a || cur_frame == b || cur_frame == c || cur_frame == d))) begin
              failures++;
              if (failures < 10) $display("FAIL: set (%0d,%0d,%0d,%0d) frame %0d bit %0d", a, b, c, d, cur_frame, pos);
            end
          end
          initial begin
            #1;
            if (u4.u_part1.NUM_STATES < min4) min4 = u4.u_part1.NUM_STATES;
            if (u4.u_part1.NUM_STATES > max4) max4 = u4.u_part1.NUM_STATES;
          end
        end
      end
    end
  end

  initial begin
    x = 1'b0; rst = 1'b1; pos = 0; cur_frame = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int f = 0; f < 16 + 48; f++) begin
      cur_frame = (f < 16) ? M'(f) : M'($urandom);
      for (pos = 0; pos < M; pos++) begin
        x = cur_frame[M-1-pos];
        @(posedge clk); #1;
      end
    end
    // Sets (0,1,2,3) and (12,13,14,15): the last-column states merge.
    checks += 2;
    if (g_a[0].g_b[1].g_c[2].g_d[3].u4.u_part1.NUM_STATES != 4) begin
      failures++; $display("FAIL: (0,1,2,3) state count");
    end
    if (g_a[12].g_b[13].g_c[14].g_d[15].u4.u_part1.NUM_STATES != 4) begin
      failures++; $display("FAIL: (12,13,14,15) state count");
    end
    $display("3 vectors: %0d..%0d states, %0d..%0d flip-flops", min3, max3, ff_bits(min3), ff_bits(max3));
    $display("4 vectors: %0d..%0d states, %0d..%0d flip-flops", min4, max4, ff_bits(min4), ff_bits(max4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
