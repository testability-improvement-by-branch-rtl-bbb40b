// branch_point_select -- detects the branch point of the unit under test.
//
// Each functional unit except the last has a branch point: the last PRPG
// pattern it needs.  Rather than compare all 2W bits of {C,B} with that
// pattern, the block checks only the care bits of a maximum cube that holds
// the branch point but none of the earlier patterns applied to the same unit.
// A cube is qualified by the opcode bit of its unit, so a later pattern that
// happens to fall in the cube while another unit is under test is ignored.
//   branch_signal = OR over i of ( A[i] & (({C,B} & CARE[i]) == VALUE[i]) )
// With one-hot opcodes each cube needs one line of A.
//
// Interface: a (current opcode), b and c (current PRPG pattern),
// branch_signal (high during the cycle in which the branch-point pattern is
// applied).  Purely combinational.
//
// Following the document: the cube form of the check, its qualification by
// A, and the default cubes, which are the ones printed for the 8-bit circuit.
// A full equality comparator (the unminimised check) is the special case of an
// all-ones care mask.
module branch_point_select #(
  parameter int unsigned                  W    = bpc_pkg::DATA_W,
  parameter int unsigned                  N_BP = bpc_pkg::N_BP,
  parameter logic [N_BP-1:0][2*W-1:0]     CARE  = bpc_pkg::BP_CARE,
  parameter logic [N_BP-1:0][2*W-1:0]     VALUE = bpc_pkg::BP_VALUE
) (
  input  logic [N_BP:0]  a,
  input  logic [W-1:0]   b,
  input  logic [W-1:0]   c,
  output logic           branch_signal
);

  logic [2*W-1:0]  pattern;
  logic [N_BP-1:0] hit;

  assign pattern = {c, b};

  always_comb begin
    for (int i = 0; i < N_BP; i++)
      hit[i] = a[i] && ((pattern & CARE[i]) == VALUE[i]);
  end

  assign branch_signal = |hit;

endmodule
