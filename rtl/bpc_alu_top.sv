// bpc_alu_top -- ALU with branch point control for BIST.
//
// Registers B and C feed an adder, a subtractor, a multiplier and a shifter;
// the one-hot opcode in register A picks which result reaches OUT.  In normal
// mode (test_mode low) A, B and C load a_input, b_input and c_input on each
// clock, and OUT is the combinational result for the registered operands.
// In test mode {C,B} is a pseudorandom pattern generator and A, instead of
// being random too, names the unit under test.  Each unit receives exactly
// the run of patterns it needs: the branch-point selection circuit watches
// for the last pattern of the current unit and then advances A, so the units
// are tested one after the other (adder, subtractor, multiplier, shifter).
// The shifter, tested last, keeps the patterns until the session is stopped.
//
// Interface: clk; rst (asynchronous, active high: seed {C,B} = 1, A = 0001);
// test_mode; a_input, b_input, c_input; out (2W bits).  uut and branch expose
// register A and the branch signal so a BIST controller can observe the
// session.  Timing: one pattern per clock; OUT follows the registers
// combinationally.
//
// Following the document: the structure (registers, four units, multiplexer,
// branch point selection), the 8-bit width, PRPG, seed and cubes.  This
// design's choices: the 2W-bit OUT and the two observation outputs.  The
// response analyser that would compact OUT during BIST is not part of this
// block; OUT is brought out for one.
module bpc_alu_top #(
  parameter int unsigned W = bpc_pkg::DATA_W
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        test_mode,
  input  logic [bpc_pkg::N_UNITS-1:0] a_input,
  input  logic [W-1:0]                b_input,
  input  logic [W-1:0]                c_input,
  output logic [2*W-1:0]              out,
  output logic [bpc_pkg::N_UNITS-1:0] uut,
  output logic                        branch
);

  logic [bpc_pkg::N_UNITS-1:0] a;
  logic [W-1:0]                b, c;

  bc_prpg #(.W(W)) u_prpg (
    .clk, .rst, .test_mode,
    .b_input, .c_input,
    .b, .c
  );

  branch_point_select #(.W(W)) u_bps (
    .a, .b, .c,
    .branch_signal (branch)
  );

  opcode_reg u_areg (
    .clk, .rst, .test_mode,
    .branch_signal (branch),
    .a_input,
    .a
  );

  bpc_alu #(.W(W)) u_alu (
    .a, .b, .c,
    .out
  );

  assign uut = a;

endmodule
