// tb_branch_point_select -- self-checking testbench of the branch point check.
//
// Applies all 65536 values of {C,B} with each of the four one-hot opcodes and
// random other opcodes, and compares branch_signal with the three product
// terms of the 8-bit design written out bit by bit:
//   A[0] & B[6] & B[0]
//   A[1] & ~C[6] & ~B[0]
//   A[2] & C[6] & C[3] & ~C[1] & ~B[7] & ~B[2] & B[0]
// The shifter (A[3]) has no branch point.  It also checks that each of the
// three branch-point vectors of the design fires for its own unit.  (A vector
// may also lie in another unit's cube: the multiplier's does in the adder's.
// Such a hit is harmless because that unit is no longer under test.)
module tb_branch_point_select;
  logic [3:0] a;
  logic [7:0] b, c;
  logic branch_signal;
  int checks = 0, failures = 0;

  branch_point_select dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_bp(input logic [3:0] aa, input logic [7:0] bb, input logic [7:0] cc);
    return (aa[0] & bb[6] & bb[0])
         | (aa[1] & ~cc[6] & ~bb[0])
         | (aa[2] & cc[6] & cc[3] & ~cc[1] & ~bb[7] & ~bb[2] & bb[0]);
  endfunction

  task automatic apply(input logic [3:0] aa, input logic [15:0] cb);
    a = aa; {c, b} = cb; #1;
    checks++;
    if (branch_signal !== ref_bp(a, b, c)) begin
      failures++;
      $display("FAIL a=%b cb=%h got %b", a, cb, branch_signal);
    end
  endtask

  initial begin
    logic [15:0] bp [3];
    bp[0] = 16'b1110000101101011;
    bp[1] = 16'b0011000001101010;
    bp[2] = 16'b1111110001011001;
    for (int v = 0; v < 65536; v++)
      for (int u = 0; u < 4; u++) apply(4'b0001 << u, 16'(v));
    for (int n = 0; n < 20000; n++) apply(4'($urandom), 16'($urandom));
    for (int i = 0; i < 3; i++) begin
      a = 4'b0001 << i; {c, b} = bp[i]; #1;
      checks++;
      if (branch_signal !== 1'b1) begin
        failures++;
        $display("FAIL branch point %0d not detected", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
