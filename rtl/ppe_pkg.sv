// ppe_pkg: shared types and constants of the programmable ARX processing
// element (PPE).
//
// The 56-bit instruction word is split into four groups, most significant
// first: IO (2 bits), rotator (11-bit mode plus four 4-bit rotation counts
// RC3..RC0), ALU (2-bit ACC, 3-bit mode, 2-bit OP) and coefficient memory
// (2-bit R/W, 6-bit write, B and A addresses).  Field order and widths follow
// the published instruction format; placing the first field at the most
// significant end, and the meaning of the individual bits inside the IO, ACC,
// R/W and OP fields, are this design's choices.
package ppe_pkg;

  localparam int unsigned DATA_W  = 64;   // datapath width
  localparam int unsigned LANE_W  = 16;   // width of one ALU / rotator slice
  localparam int unsigned LANES   = DATA_W / LANE_W;
  localparam int unsigned CADDR_W = 6;    // coefficient RAM address bits
  localparam int unsigned IADDR_W = 6;    // instruction RAM address bits
  localparam int unsigned INSTR_W = 56;   // instruction word width

  // ALU operation (OP field).  Add and XOR are the ARX operations; the two
  // pass operations let a program move a word or the accumulator to memory.
  typedef enum logic [1:0] {
    ALU_ADD   = 2'b00,
    ALU_XOR   = 2'b01,
    ALU_PASSX = 2'b10,
    ALU_PASSY = 2'b11
  } alu_op_e;

  // ALU mode: bit k joins slice k to slice k+1 (carry passes between them).
  localparam logic [2:0] ALU_MODE_16 = 3'b000;
  localparam logic [2:0] ALU_MODE_32 = 3'b101;
  localparam logic [2:0] ALU_MODE_64 = 3'b111;

  // Rotator modes, from the rotator mode table (rotate right).
  localparam logic [10:0] ROT_64_R0  = 11'b00001010101;
  localparam logic [10:0] ROT_64_R16 = 11'b01101010101;
  localparam logic [10:0] ROT_64_R32 = 11'b10001010101;
  localparam logic [10:0] ROT_64_R48 = 11'b11101010101;
  localparam logic [10:0] ROT_32_R0  = 11'b00011011101;
  localparam logic [10:0] ROT_32_R16 = 11'b01111011101;
  localparam logic [10:0] ROT_16     = 11'b00000000000;

  typedef struct packed {
    logic [1:0]  io;        // [1]: RAM write data from external input; [0]: PE output from rotator
    logic [10:0] rot_mode;
    logic [3:0]  rc3;
    logic [3:0]  rc2;
    logic [3:0]  rc1;
    logic [3:0]  rc0;
    logic [1:0]  acc;       // [1]: ALU Y input from accumulator; [0]: load accumulator
    logic [2:0]  alu_mode;
    alu_op_e     alu_op;
    logic [1:0]  rw;        // [1]: write coefficient RAM; [0]: read ports A and B
    logic [5:0]  addrw;
    logic [5:0]  addrb;
    logic [5:0]  addra;
  } ppe_instr_t;

endpackage
