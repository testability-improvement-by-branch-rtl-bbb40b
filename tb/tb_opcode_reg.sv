// tb_opcode_reg -- self-checking testbench of opcode register A.
//
// Checks the reset value 0001, holding without a branch in test mode, the
// sequence 0001 -> 0010 -> 0100 -> 1000 on branch_signal, the return to 0001
// from 1000 and from codes that are not one-hot, normal-mode loading of
// a_input, and asynchronous reset.  Expected values come from a reference
// written in the testbench.
module tb_opcode_reg;
  logic clk = 0, rst, test_mode, branch_signal;
  logic [3:0] a_input, a, exp_a;
  int checks = 0, failures = 0;

  opcode_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] nxt(input logic [3:0] x);
    if (x == 4'b0001) return 4'b0010;
    if (x == 4'b0010) return 4'b0100;
    if (x == 4'b0100) return 4'b1000;
    return 4'b0001;
  endfunction

  task automatic check(input string what);
    checks++;
    if (a !== exp_a) begin
      failures++;
      $display("FAIL %s: a=%b exp=%b", what, a, exp_a);
    end
  endtask

  initial begin
    test_mode = 1; branch_signal = 0; a_input = 4'b0110;
    rst = 1; #12; rst = 0;
    exp_a = 4'b0001; check("reset");
    // fixed walk through all units with idle cycles between branches
    for (int n = 0; n < 12; n++) begin
      branch_signal = 0;
      repeat (3) begin @(posedge clk); #1; check("hold"); end
      branch_signal = 1;
      @(posedge clk); #1; exp_a = nxt(exp_a); check("advance");
    end
    // random mix of modes, branches and loads
    for (int n = 0; n < 3000; n++) begin
      test_mode = ($urandom % 4) != 0;
      branch_signal = $urandom % 2;
      a_input = 4'($urandom);
      @(posedge clk); #1;
      if (!test_mode) exp_a = a_input;
      else if (branch_signal) exp_a = nxt(exp_a);
      check("random");
    end
    rst = 1; #1; exp_a = 4'b0001; check("async reset"); rst = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
