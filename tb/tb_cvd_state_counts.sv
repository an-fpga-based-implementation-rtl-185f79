// tb_cvd_state_counts: checks the size of the reduced Part-1 state tables
// built for the design's configurations against counts worked out by hand
// from the construction (prefix tree, last column merged into the initial
// state, column-wise merging of equivalent states):
//  - eight 21-bit words, single output:          37 tree states -> 31
//  - the same words, four-bit output codes:      37 tree states -> 34
//  - robot arm commands (2 words of 8 bits):      9 states
//  - robot direction commands (4 words):         11 states
//  - robot speed commands (5 words):             12 states
// Each table is then exercised briefly: the word list is sent in frames and
// each word's code must appear on its last bit.
`timescale 1ns/1ps
module tb_cvd_state_counts;
  import cvd_pkg::*;

  logic clk = 1'b0;
  logic rst, x;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [0:0]            z_ex1;
  logic [EX2_OW-1:0]     z_ex2;
  logic [EX3_ARM_OW-1:0] z_arm;
  logic [EX3_DIR_OW-1:0] z_dir;
  logic [EX3_SPD_OW-1:0] z_spd;

  cvd_part1_fsm u_ex1 (.clk(clk), .rst(rst), .x(x), .z(z_ex1));
  cvd_part1_fsm #(.OW(EX2_OW), .CODES(EX2_CODES)) u_ex2 (.clk(clk), .rst(rst), .x(x), .z(z_ex2));
  cvd_part1_fsm #(.M(EX3_M), .N(EX3_ARM_N), .OW(EX3_ARM_OW),
                  .VECTORS(EX3_ARM_VECTORS), .CODES(EX3_ARM_CODES))
    u_arm (.clk(clk), .rst(rst), .x(x), .z(z_arm));
  cvd_part1_fsm #(.M(EX3_M), .N(EX3_DIR_N), .OW(EX3_DIR_OW),
                  .VECTORS(EX3_DIR_VECTORS), .CODES(EX3_DIR_CODES))
    u_dir (.clk(clk), .rst(rst), .x(x), .z(z_dir));
  cvd_part1_fsm #(.M(EX3_M), .N(EX3_SPD_N), .OW(EX3_SPD_OW),
                  .VECTORS(EX3_SPD_VECTORS), .CODES(EX3_SPD_CODES))
    u_spd (.clk(clk), .rst(rst), .x(x), .z(z_spd));

  task automatic check_count(input string name, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s has %0d states, expected %0d", name, got, exp);
    end
  endtask

  initial begin
    x = 1'b0; rst = 1'b1;
    #1;
    check_count("21-bit single output", u_ex1.NUM_STATES, 31);
    check_count("21-bit 4-bit codes",   u_ex2.NUM_STATES, 34);
    check_count("robot arm",            u_arm.NUM_STATES, 9);
    check_count("robot direction",      u_dir.NUM_STATES, 11);
    check_count("robot speed",          u_spd.NUM_STATES, 12);
    @(posedge clk); #1 rst = 1'b0;

    // 21-bit words, reset on the last bit of each frame.
    for (int k = 0; k < int'(EX1_N); k++) begin
      for (int i = EX1_M-1; i >= 0; i--) begin
        x = EX1_VECTORS[k*EX1_M + i];
        rst = (i == 0);
        #1;
        if (i == 0) begin
          checks += 2;
          if (z_ex1 != 1'b1) begin failures++; $display("FAIL: ex1 word %0d", k); end
          if (z_ex2 != EX2_CODES[k*EX2_OW +: EX2_OW]) begin failures++; $display("FAIL: ex2 word %0d", k); end
        end
        @(posedge clk); #1;
      end
    end
    // 8-bit robot commands 1..11.
    for (int c = 1; c <= 11; c++) begin
      for (int i = 7; i >= 0; i--) begin
        x = c[i];
        rst = (i == 0);
        #1;
        if (i == 0) begin
          checks++;
          if (c <= 2 && z_arm != EX3_ARM_CODES[(c-1)*EX3_ARM_OW +: EX3_ARM_OW]) begin
            failures++; $display("FAIL: arm command %0d", c);
          end else if (c >= 3 && c <= 6 && z_dir != EX3_DIR_CODES[(c-3)*EX3_DIR_OW +: EX3_DIR_OW]) begin
            failures++; $display("FAIL: direction command %0d", c);
          end else if (c >= 7 && z_spd != EX3_SPD_CODES[(c-7)*EX3_SPD_OW +: EX3_SPD_OW]) begin
            failures++; $display("FAIL: speed command %0d", c);
          end
        end
        @(posedge clk); #1;
      end
    end

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
