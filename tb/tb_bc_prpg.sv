// tb_bc_prpg -- self-checking testbench of the B/C operand registers and PRPG.
//
// Checks: the reset seed (C = 0, B = 1); 5000 test-mode steps against a
// reference LFSR written out bit by bit from the feedback equation
// k = B[0]^C[3]^C[5]^C[6]; that the patterns numbered 30, 60, 460 and 4460
// after the seed are the four branch-point vectors of the 8-bit design;
// normal-mode loading of b_input/c_input; and, from a loaded value, that test
// mode resumes shifting from it.  A watchdog ends the run after 20000 cycles.
module tb_bc_prpg;
  localparam int W = 8;
  logic clk = 0, rst, test_mode;
  logic [W-1:0] b_input, c_input, b, c;
  int checks = 0, failures = 0;

  bc_prpg dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [15:0] ref_step(input logic [15:0] s);
    logic k;
    k = s[0] ^ s[11] ^ s[13] ^ s[14];   // B[0] ^ C[3] ^ C[5] ^ C[6]
    return {k, s[15:1]};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] s;
    test_mode = 0; b_input = 0; c_input = 0;
    rst = 1; #12; rst = 0;
    check({c, b} === 16'h0001, "seed");
    s = 16'h0001;
    test_mode = 1;
    for (int n = 1; n <= 5000; n++) begin
      @(posedge clk); #1;
      s = ref_step(s);
      check({c, b} === s, $sformatf("step %0d got %h exp %h", n, {c, b}, s));
      if (n == 30)   check({c, b} === 16'b1110000101101011, "adder branch point");
      if (n == 60)   check({c, b} === 16'b0011000001101010, "subtractor branch point");
      if (n == 460)  check({c, b} === 16'b1111110001011001, "multiplier branch point");
      if (n == 4460) check({c, b} === 16'b1110111111100000, "shifter end point");
    end
    test_mode = 0;
    for (int n = 0; n < 50; n++) begin
      b_input = 8'($urandom); c_input = 8'($urandom);
      @(posedge clk); #1;
      check(b === b_input && c === c_input, "normal-mode load");
    end
    s = {c, b};
    test_mode = 1;
    for (int n = 0; n < 20; n++) begin
      @(posedge clk); #1;
      s = ref_step(s);
      check({c, b} === s, "shift from loaded value");
    end
    rst = 1; #1;
    check({c, b} === 16'h0001, "asynchronous reset");
    rst = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
