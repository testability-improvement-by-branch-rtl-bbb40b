// bpc_pkg -- shared types and constants of the branch-point-controlled ALU.
//
// The datapath is an ALU whose function is chosen by a 4-bit one-hot opcode
// register A, with two W-bit operand registers B and C.  In BIST test mode the
// concatenation {C,B} runs as one 2W-bit pseudorandom pattern generator and A
// is stepped from unit to unit whenever the pattern of the current unit's
// branch point appears.  This package holds the opcode encoding, the PRPG seed
// and feedback taps, and the branch-point cubes (care mask and value) found
// for the 8-bit datapath.
//
// Following the document: the one-hot opcodes (0001 add, 0010 subtract,
// 0100 multiply, any other code shift), the seed {C,B} = 1 with A = 0001, the
// LFSR feedback B[0]^C[3]^C[5]^C[6], and the three cubes.  The packing of the
// cubes into mask/value words over the vector {C,B} is this design's own form.
package bpc_pkg;

  // Width of each operand register B and C (8 in the main configuration).
  localparam int unsigned DATA_W  = 8;
  // Number of functional units selected by register A.
  localparam int unsigned N_UNITS = 4;
  // Number of branch points that are checked (the last unit needs none).
  localparam int unsigned N_BP    = N_UNITS - 1;

  // One-hot opcodes held in register A.  Codes outside this set select the
  // shifter, like the default arm of the case statement.
  typedef enum logic [N_UNITS-1:0] {
    OP_ADD = 4'b0001,
    OP_SUB = 4'b0010,
    OP_MUL = 4'b0100,
    OP_SHL = 4'b1000
  } opcode_e;

  // Test order of the units: index i of the branch-point arrays belongs to
  // the unit whose opcode has bit i set.
  localparam logic [N_UNITS-1:0] FIRST_UUT = OP_ADD;

  // PRPG over the 16-bit vector {C,B}: bit 0 is B[0], bit 8 is C[0].
  // Feedback k = B[0] ^ C[3] ^ C[5] ^ C[6] enters at C[7] while the vector
  // shifts one place towards B[0].  Taps are bits 0, 11, 13 and 14.
  localparam logic [2*DATA_W-1:0] PRPG_TAPS = 16'h6801;
  // Reset seed of {C,B}: C = 0, B = 1.
  localparam logic [2*DATA_W-1:0] PRPG_SEED = 16'h0001;

  // Maximum cubes of the branch points, as care mask and value over {C,B}.
  //   adder      : B[6]=1, B[0]=1
  //   subtractor : C[6]=0, B[0]=0
  //   multiplier : C[6]=1, C[3]=1, C[1]=0, B[7]=0, B[2]=0, B[0]=1
  // Element i belongs to the unit with opcode bit i.
  localparam logic [N_BP-1:0][2*DATA_W-1:0] BP_CARE = {16'h4A85, 16'h4001, 16'h0041};
  localparam logic [N_BP-1:0][2*DATA_W-1:0] BP_VALUE = {16'h4801, 16'h0000, 16'h0041};

endpackage
