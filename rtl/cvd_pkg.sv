// cvd_pkg: shared constants of the control vector detector.
//
// A control vector set is passed to the detector as one packed parameter:
// vector k occupies bits [k*M +: M] and is received most significant bit
// first, so bit k*M+M-1 is the first bit on the serial line. The output code
// of vector k occupies bits [k*OW +: OW] of the code parameter, and its most
// significant bit is output z1 of the detector.
//
// The three vector sets below are the worked examples of the design:
//  - EX1: eight 21-bit vectors detected by a single output (1 for each);
//  - EX2: the same vectors mapped to four-bit one-hot output combinations;
//  - EX3: the 8-bit command set of a small robot, split over three devices
//    (arm: 2 outputs, direction: 4 outputs, speed: 5 outputs).
// The bit patterns and codes are those of the examples; the packing is this
// design's own convention.
package cvd_pkg;

  // ---------------- Example 1 / 2: 8 vectors of 21 bits ----------------
  localparam int unsigned EX1_M = 21;
  localparam int unsigned EX1_N = 8;

  localparam logic [EX1_N*EX1_M-1:0] EX1_VECTORS = {
    21'b100011001010111111111,  // v7
    21'b100011001010111111110,  // v6
    21'b100011001010111111011,  // v5
    21'b100011001010111111000,  // v4
    21'b100011001000111110111,  // v3
    21'b100011001000111110110,  // v2
    21'b100011001000111110011,  // v1
    21'b100011001000111110000   // v0
  };

  // Example 1: a single output, 1 for every desired vector.
  localparam logic [EX1_N-1:0] EX1_CODES = '1;

  // Example 2: user defined output combinations z1 z2 z3 z4.
  localparam int unsigned EX2_OW = 4;
  localparam logic [EX1_N*EX2_OW-1:0] EX2_CODES = {
    4'b0001,  // v7 ...11111111
    4'b0001,  // v6 ...11111110
    4'b0010,  // v5 ...11111011
    4'b0100,  // v4 ...11111000
    4'b0001,  // v3 ...10110111
    4'b0001,  // v2 ...10110110
    4'b0010,  // v1 ...10110011
    4'b1000   // v0 ...10110000
  };

  // ---------------- Example 3: robot commands, 8 bits ----------------
  localparam int unsigned EX3_M = 8;

  // Device 1, arm control: z1_1 z2_1
  localparam int unsigned EX3_ARM_N  = 2;
  localparam int unsigned EX3_ARM_OW = 2;
  localparam logic [EX3_ARM_N*EX3_M-1:0] EX3_ARM_VECTORS = {
    8'b00000010,  // rotate anti-clockwise
    8'b00000001   // rotate clockwise
  };
  localparam logic [EX3_ARM_N*EX3_ARM_OW-1:0] EX3_ARM_CODES = {2'b01, 2'b10};

  // Device 2, direction control: z1_2 .. z4_2
  localparam int unsigned EX3_DIR_N  = 4;
  localparam int unsigned EX3_DIR_OW = 4;
  localparam logic [EX3_DIR_N*EX3_M-1:0] EX3_DIR_VECTORS = {
    8'b00000110,  // move right
    8'b00000101,  // move left
    8'b00000100,  // move backward
    8'b00000011   // move forward
  };
  localparam logic [EX3_DIR_N*EX3_DIR_OW-1:0] EX3_DIR_CODES = {
    4'b0001, 4'b0010, 4'b0100, 4'b1000
  };

  // Device 3, speed control: z1_3 .. z5_3
  localparam int unsigned EX3_SPD_N  = 5;
  localparam int unsigned EX3_SPD_OW = 5;
  localparam logic [EX3_SPD_N*EX3_M-1:0] EX3_SPD_VECTORS = {
    8'b00001011,  // speed level 5
    8'b00001010,  // speed level 4
    8'b00001001,  // speed level 3
    8'b00001000,  // speed level 2
    8'b00000111   // speed level 1
  };
  localparam logic [EX3_SPD_N*EX3_SPD_OW-1:0] EX3_SPD_CODES = {
    5'b00001, 5'b00010, 5'b00100, 5'b01000, 5'b10000
  };

endpackage
