// bc_prpg -- operand registers B and C, reconfigured as one PRPG in test mode.
//
// In normal mode the two W-bit registers load b_input and c_input on every
// clock edge.  In test mode they form a single 2W-bit linear feedback shift
// register over the vector {C,B}: every bit moves one place towards B[0], and
// the XOR of the tapped bits enters at the top bit C[W-1].  Each clock edge
// thus applies a new pseudorandom pattern to the functional units.  An
// asynchronous, active-high reset loads the seed.
//
// Interface: clk, rst (async, active high), test_mode, b_input/c_input
// (normal-mode data), b/c (register outputs).  Timing: one new pattern per
// clock in test mode; outputs change only on the clock edge.
//
// Following the document: the shift direction, the taps (B[0], C[3], C[5],
// C[6], which make a maximal-length sequence of period 65535 for W = 8), the
// seed C = 0, B = 1 and the asynchronous reset.  For widths other than 8 the
// caller must supply taps; the document gives only the 8-bit polynomial.
module bc_prpg #(
  parameter int unsigned           W    = bpc_pkg::DATA_W,
  parameter logic [2*W-1:0]        TAPS = (2*W)'(bpc_pkg::PRPG_TAPS),
  parameter logic [2*W-1:0]        SEED = (2*W)'(bpc_pkg::PRPG_SEED)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         test_mode,
  input  logic [W-1:0] b_input,
  input  logic [W-1:0] c_input,
  output logic [W-1:0] b,
  output logic [W-1:0] c
);

  logic [2*W-1:0] cb_q;   // {C,B}
  logic           fb;     // feedback bit k

  assign fb = ^(cb_q & TAPS);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)            cb_q <= SEED;
    else if (test_mode) cb_q <= {fb, cb_q[2*W-1:1]};
    else                cb_q <= {c_input, b_input};
  end

  assign b = cb_q[W-1:0];
  assign c = cb_q[2*W-1:W];

endmodule
