// tb_cvd_part2_counter: self-checking test of the Part-2 frame counter.
//
// Runs the default 21-bit counter and an 8-bit one. For each, zf must be 1
// exactly on every M-th clock after reset (bit M, 2M, ...), and a reset in
// the middle of a frame must restart the count, so that zf next appears M
// clocks after the reset is released.
`timescale 1ns/1ps
module tb_cvd_part2_counter;
  logic clk = 1'b0;
  logic rst;
  logic zf21, zf8;
  int checks = 0, failures = 0;
  int pos;   // bit position in the frame, 1..M, counted by the testbench

  always #5 clk = ~clk;

  cvd_part2_counter dut21 (.clk(clk), .rst(rst), .zf(zf21));
  cvd_part2_counter #(.M(8)) dut8 (.clk(clk), .rst(rst), .zf(zf8));

  task automatic check_cycle(input int p);
    checks++;
    if (zf21 !== (p % 21 == 0)) begin
      failures++;
      if (failures < 10) $display("FAIL: M=21 bit %0d zf=%0b", p, zf21);
    end
    checks++;
    if (zf8 !== (p % 8 == 0)) begin
      failures++;
      if (failures < 10) $display("FAIL: M=8 bit %0d zf=%0b", p, zf8);
    end
  endtask

  initial begin
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // Bits 1..400 after reset.
    for (pos = 1; pos <= 400; pos++) begin
      check_cycle(pos);
      @(posedge clk); #1;
    end
    // Reset in mid frame.
    rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
    for (pos = 1; pos <= 200; pos++) begin
      check_cycle(pos);
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
