// tb_cvd_robot_top: end-to-end test of the robot controller at its default
// size (8-bit commands, three intermediate devices).
//
// A processor stand-in sends 8-bit commands back to back on one serial
// port, MSB first, one bit per clock. The expected state of the eleven
// outputs is worked out per command from the command table below (written
// independently of the RTL): on the last bit of a known command exactly its
// output is 1, and every output is 0 on all other cycles. Commands are the
// eleven known ones in order, then a long random mix of known commands,
// unknown commands and commands that differ from a known one in one bit.
// A clear in the middle of a command checks that framing restarts.
// Mechanism counters, each of which must be non-zero: every output pulsed,
// unknown commands ignored, a known command detected right after a
// command that broke off in mid frame (frame reset at work), and a detection
// right after a mid-command clear.
`timescale 1ns/1ps
module tb_cvd_robot_top;
  logic clock = 1'b0;
  logic clear, bit_stream_x;
  logic z1_1, z2_1, z1_2, z2_2, z3_2, z4_2, z1_3, z2_3, z3_3, z4_3, z5_3;
  logic [10:0] zall;
  int checks = 0, failures = 0;

  always #5 clock = ~clock;

  cvd_robot_top dut (
    .clock(clock), .clear(clear), .bit_stream_x(bit_stream_x),
    .z1_1(z1_1), .z2_1(z2_1),
    .z1_2(z1_2), .z2_2(z2_2), .z3_2(z3_2), .z4_2(z4_2),
    .z1_3(z1_3), .z2_3(z2_3), .z3_3(z3_3), .z4_3(z4_3), .z5_3(z5_3)
  );

  assign zall = {z1_1, z2_1, z1_2, z2_2, z3_2, z4_2, z1_3, z2_3, z3_3, z4_3, z5_3};

  // Command table: output bit 10 = z1_1 ... bit 0 = z5_3.
  function automatic logic [10:0] expected(input logic [7:0] cmd);
    case (cmd)
      8'd1:    return 11'b10_0000_00000;  // arm: rotate clockwise
      8'd2:    return 11'b01_0000_00000;  // arm: rotate anti-clockwise
      8'd3:    return 11'b00_1000_00000;  // move forward
      8'd4:    return 11'b00_0100_00000;  // move backward
      8'd5:    return 11'b00_0010_00000;  // move left
      8'd6:    return 11'b00_0001_00000;  // move right
      8'd7:    return 11'b00_0000_10000;  // speed level 1
      8'd8:    return 11'b00_0000_01000;  // speed level 2
      8'd9:    return 11'b00_0000_00100;  // speed level 3
      8'd10:   return 11'b00_0000_00010;  // speed level 4
      8'd11:   return 11'b00_0000_00001;  // speed level 5
      default: return '0;
    endcase
  endfunction

  int pulses [11];
  int ignored, realigned, after_clear;
  bit prev_broken;

  // Send one command; returns 1 if it was recognised.
  task automatic send(input logic [7:0] cmd, output bit hit);
    logic [10:0] e;
    hit = 1'b0;
    for (int i = 7; i >= 0; i--) begin
      bit_stream_x = cmd[i];
      #1;
      e = (i == 0) ? expected(cmd) : '0;
      checks++;
      if (zall !== e) begin
        failures++;
        if (failures < 10) $display("FAIL: cmd %b bit %0d outputs %b expected %b", cmd, i, zall, e);
      end
      if (i == 0 && e != 0 && zall == e) begin
        hit = 1'b1;
        for (int b = 0; b < 11; b++) if (e[b]) pulses[b]++;
      end
      @(posedge clock);
      #1;
    end
  endtask

  logic [7:0] cmd;
  bit hit;
  int kind;

  initial begin
    foreach (pulses[i]) pulses[i] = 0;
    ignored = 0; realigned = 0; after_clear = 0; prev_broken = 0;
    bit_stream_x = 1'b0; clear = 1'b1;
    repeat (2) @(posedge clock);
    #1 clear = 1'b0;

    // The eleven commands in order.
    for (int c = 1; c <= 11; c++) send(8'(c), hit);

    // Random mix.
    for (int n = 0; n < 2000; n++) begin
      kind = $urandom_range(0, 3);
      cmd  = 8'($urandom_range(1, 11));
      if (kind == 2) cmd[$urandom_range(0, 7)] ^= 1'b1;
      if (kind == 3) cmd = 8'($urandom);
      send(cmd, hit);
      if (expected(cmd) == 0) begin
        ignored++;
      end else if (hit && prev_broken) begin
        realigned++;
      end
      // A command that leaves the tree before its last bit.
      prev_broken = (expected(cmd) == 0) && (cmd[7:4] != 4'b0000);
    end

    // Clear in the middle of a command, then a known command.
    for (int i = 7; i >= 4; i--) begin
      bit_stream_x = 1'b1; @(posedge clock); #1;
    end
    clear = 1'b1; @(posedge clock); #1; clear = 1'b0;
    send(8'd5, hit);
    if (hit) after_clear++;

    for (int b = 0; b < 11; b++) begin
      checks++;
      if (pulses[b] == 0) begin failures++; $display("FAIL: output %0d never pulsed", 10-b); end
    end
    checks += 3;
    if (ignored == 0)     begin failures++; $display("FAIL: no unknown command sent"); end
    if (realigned == 0)   begin failures++; $display("FAIL: no detection after a broken command"); end
    if (after_clear == 0) begin failures++; $display("FAIL: no detection after mid-command clear"); end
    $display("unknown ignored=%0d realigned=%0d after clear=%0d", ignored, realigned, after_clear);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
