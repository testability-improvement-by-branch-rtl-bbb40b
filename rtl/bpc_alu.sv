// bpc_alu -- the four functional units and the output multiplexer.
//
// An adder, a subtractor, a multiplier and a left shifter all work on the
// operands B and C at the same time; a multiplexer steered by the one-hot
// opcode A passes one result to OUT:
//   A = 0001 : OUT = B + C
//   A = 0010 : OUT = B - C
//   A = 0100 : OUT = B * C
//   other    : OUT = B << C   (unused codes fall to the shifter)
// The block is purely combinational.
//
// Interface: a (opcode), b and c (W-bit operands), out (2W bits).
//
// Following the document: the four units, the opcode map and the default arm.
// This design's choices: OUT is 2W bits wide so that the full product fits;
// sum, difference and shifted value are formed at that width, so the sum keeps
// its carry, the difference is the 2W-bit two's complement and the shift keeps
// the bits moved above B's width (0 when C >= 2W).
module bpc_alu #(
  parameter int unsigned W = bpc_pkg::DATA_W
) (
  input  logic [bpc_pkg::N_UNITS-1:0] a,
  input  logic [W-1:0]                b,
  input  logic [W-1:0]                c,
  output logic [2*W-1:0]              out
);
  import bpc_pkg::*;

  logic [2*W-1:0] b_x, c_x;
  logic [2*W-1:0] sum, diff, prod, shl;

  assign b_x = {{W{1'b0}}, b};
  assign c_x = {{W{1'b0}}, c};

  // Functional units
  assign sum  = b_x + c_x;
  assign diff = b_x - c_x;
  assign prod = b_x * c_x;
  assign shl  = b_x << c;

  // Output multiplexer
  always_comb begin
    unique case (a)
      OP_ADD:  out = sum;
      OP_SUB:  out = diff;
      OP_MUL:  out = prod;
      default: out = shl;
    endcase
  end

endmodule
