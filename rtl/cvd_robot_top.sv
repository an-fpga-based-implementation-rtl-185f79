// cvd_robot_top: three control vector detectors used as intermediate
// devices between one serial output port of a processor and the arm,
// direction and speed drives of a robot.
//
// How it works. The processor sends 8-bit commands back to back on one
// port, one bit per clock, MSB first. All three detectors see the same bit
// stream and frame it in the same way; each knows only its own commands and
// ignores the others:
//   device 1, arm:       00000001 -> z1_1 (clockwise)
//                        00000010 -> z2_1 (anti-clockwise)
//   device 2, direction: 00000011..00000110 -> z1_2..z4_2
//                        (forward, backward, left, right)
//   device 3, speed:     00000111..00001011 -> z1_3..z5_3 (levels 1..5)
// New devices or new meanings of a port are added by changing the command
// tables (parameters in cvd_pkg) and the processor's program, not the port.
//
// Interface and timing: bit_stream_x is sampled on the rising edge of
// clock; clear is a synchronous active-high reset after which the next bit
// is the first bit of a command. Each output is a one-clock pulse in the
// cycle in which the last bit of its command is on bit_stream_x.
//
// The device split, command codes and output names follow the design; the
// separate frame counter per device (each detector is complete on its own)
// is this design's reading of it.
module cvd_robot_top #(
  parameter int unsigned M = cvd_pkg::EX3_M    // command length in bits
) (
  input  logic clock,
  input  logic clear,
  input  logic bit_stream_x,
  // device 1, arm control
  output logic z1_1, z2_1,
  // device 2, direction control
  output logic z1_2, z2_2, z3_2, z4_2,
  // device 3, speed control
  output logic z1_3, z2_3, z3_3, z4_3, z5_3
);
  import cvd_pkg::*;

  logic [EX3_ARM_OW-1:0] z_arm;
  logic [EX3_DIR_OW-1:0] z_dir;
  logic [EX3_SPD_OW-1:0] z_spd;
  logic [2:0]            frame;

  cvd_detector #(
    .M(M), .N(EX3_ARM_N), .OW(EX3_ARM_OW),
    .VECTORS(EX3_ARM_VECTORS), .CODES(EX3_ARM_CODES)
  ) u_dev1_arm (
    .clk(clock), .rst(clear), .x(bit_stream_x), .z(z_arm), .frame(frame[0])
  );

  cvd_detector #(
    .M(M), .N(EX3_DIR_N), .OW(EX3_DIR_OW),
    .VECTORS(EX3_DIR_VECTORS), .CODES(EX3_DIR_CODES)
  ) u_dev2_dir (
    .clk(clock), .rst(clear), .x(bit_stream_x), .z(z_dir), .frame(frame[1])
  );

  cvd_detector #(
    .M(M), .N(EX3_SPD_N), .OW(EX3_SPD_OW),
    .VECTORS(EX3_SPD_VECTORS), .CODES(EX3_SPD_CODES)
  ) u_dev3_spd (
    .clk(clock), .rst(clear), .x(bit_stream_x), .z(z_spd), .frame(frame[2])
  );

  assign {z1_1, z2_1}                   = z_arm;
  assign {z1_2, z2_2, z3_2, z4_2}       = z_dir;
  assign {z1_3, z2_3, z3_3, z4_3, z5_3} = z_spd;

  // The three frame counters run in lock step.
  always_ff @(posedge clock) begin
    if (!clear) begin
      assert (frame[0] == frame[1] && frame[1] == frame[2])
        else $error("cvd_robot_top: frame counters out of step");
    end
  end

endmodule
