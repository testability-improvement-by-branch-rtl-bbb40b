// opcode_reg -- opcode register A with its test-mode sequencing.
//
// In normal mode A loads a_input on every clock edge and steers the ALU as
// the function code.  In test mode A holds the one-hot code of the unit under
// test and moves to the next unit when branch_signal is high:
// 0001 -> 0010 -> 0100 -> 1000; any other value returns to 0001.  Without a
// branch it holds.  The asynchronous, active-high reset sets A to 0001 so
// that the adder is the first unit tested.
//
// Interface: clk, rst, test_mode, branch_signal, a_input, a.  Timing: the new
// unit takes effect from the clock edge that ends the branch-point cycle, so
// the pattern after the branch point goes to the next unit.
//
// Following the document: the reset value, the sequence and the normal-mode
// load.  Register A in test mode is no longer a PRPG; that is the point of the
// method.
module opcode_reg (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        test_mode,
  input  logic                        branch_signal,
  input  logic [bpc_pkg::N_UNITS-1:0] a_input,
  output logic [bpc_pkg::N_UNITS-1:0] a
);
  import bpc_pkg::*;

  logic [N_UNITS-1:0] a_next_unit;

  always_comb begin
    unique case (a)
      OP_ADD:  a_next_unit = OP_SUB;
      OP_SUB:  a_next_unit = OP_MUL;
      OP_MUL:  a_next_unit = OP_SHL;
      default: a_next_unit = OP_ADD;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                a <= FIRST_UUT;
    else if (!test_mode)    a <= a_input;
    else if (branch_signal) a <= a_next_unit;
  end

endmodule
