// tb_bpc_alu_top -- end-to-end testbench of the branch-point-controlled ALU.
//
// Runs the design with its default parameters (8-bit B and C) through:
//   1. a complete BIST session: reset, then test mode for 4500 patterns.  The
//      testbench keeps its own model of the 16-bit PRPG and of the schedule
//      of the 8-bit design (patterns 0..30 to the adder, 31..60 to the
//      subtractor, 61..460 to the multiplier, the rest to the shifter, where
//      pattern 0 is the seed).  Every cycle it checks the unit under test, the
//      branch signal (high exactly on patterns 30, 60 and 460) and OUT.  At
//      the end it checks how many patterns each unit received: 31, 30, 400
//      and, by pattern 4460, 4000.
//   2. normal mode: random loads of a_input, b_input and c_input, with the
//      four one-hot codes and the unused codes, checking OUT one cycle later.
//   3. a second reset and a shorter test session, to show that the session
//      restarts from the seed with the adder.
// It counts each mechanism (each of the three branches, patterns per unit,
// normal-mode operations, unused codes falling to the shifter, mode switches,
// restarts) and counts a failure for any that never happened.  A watchdog
// ends the run after 20000 cycles.
module tb_bpc_alu_top;
  logic clk = 0, rst, test_mode;
  logic [3:0] a_input, uut;
  logic [7:0] b_input, c_input;
  logic [15:0] out;
  logic branch;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_branch [3];
  int n_pat [4];
  int n_normal = 0, n_unused = 0, n_mode_switch = 0, n_restart = 0;

  bpc_alu_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [15:0] alu_ref(input logic [3:0] op, input logic [7:0] bb, input logic [7:0] cc);
    case (op)
      4'b0001: return 16'(bb) + 16'(cc);
      4'b0010: return 16'(bb) - 16'(cc);
      4'b0100: return 16'(bb) * 16'(cc);
      default: return (cc >= 16) ? 16'h0 : 16'(16'(bb) << cc);
    endcase
  endfunction

  function automatic int unit_of(input int n);
    if (n <= 30)  return 0;
    if (n <= 60)  return 1;
    if (n <= 460) return 2;
    return 3;
  endfunction

  // One test session of npat patterns from reset; checks every cycle.
  task automatic bist_session(input int npat, input bit count_all);
    logic [15:0] s;
    int u;
    test_mode = 1;
    rst = 1; #2; rst = 0;
    s = 16'h0001;
    for (int n = 0; n < npat; n++) begin
      #1;
      u = unit_of(n);
      check(uut === (4'b0001 << u), $sformatf("pattern %0d: uut %b", n, uut));
      check(branch === (n == 30 || n == 60 || n == 460), $sformatf("pattern %0d: branch %b", n, branch));
      check(out === alu_ref(4'b0001 << u, s[7:0], s[15:8]), $sformatf("pattern %0d: out %h", n, out));
      if (count_all) begin
        if (uut == 4'b0001) n_pat[0]++;
        if (uut == 4'b0010) n_pat[1]++;
        if (uut == 4'b0100) n_pat[2]++;
        if (uut == 4'b1000 && n <= 4460) n_pat[3]++;
        for (int i = 0; i < 3; i++) if (branch && uut[i]) n_branch[i]++;
      end
      @(posedge clk);
      s = {s[0] ^ s[11] ^ s[13] ^ s[14], s[15:1]};
    end
  endtask

  initial begin
    logic [3:0] op;
    foreach (n_branch[i]) n_branch[i] = 0;
    foreach (n_pat[i]) n_pat[i] = 0;
    a_input = 0; b_input = 0; c_input = 0;
    @(negedge clk);

    // 1. full BIST session
    bist_session(4500, 1);
    check(n_pat[0] == 31,   $sformatf("adder patterns %0d", n_pat[0]));
    check(n_pat[1] == 30,   $sformatf("subtractor patterns %0d", n_pat[1]));
    check(n_pat[2] == 400,  $sformatf("multiplier patterns %0d", n_pat[2]));
    check(n_pat[3] == 4000, $sformatf("shifter patterns %0d", n_pat[3]));

    // 2. normal mode
    @(negedge clk);
    test_mode = 0; n_mode_switch++;
    for (int n = 0; n < 400; n++) begin
      op = (n % 3 == 0) ? 4'($urandom) : 4'b0001 << ($urandom % 4);
      a_input = op; b_input = 8'($urandom);
      c_input = (n % 2 == 0) ? 8'($urandom % 18) : 8'($urandom);
      @(posedge clk); #1;
      check(uut === op, "normal-mode opcode load");
      check(out === alu_ref(op, b_input, c_input),
            $sformatf("normal a=%b b=%0d c=%0d out=%h", op, b_input, c_input, out));
      check(branch === 1'b0 || (op[2:0] != 0), "branch only from a unit with a cube");
      n_normal++;
      if (!$onehot(op)) n_unused++;
      @(negedge clk);
    end

    // 3. restart a session after normal operation
    n_mode_switch++;
    n_restart++;
    bist_session(600, 0);

    foreach (n_branch[i]) check(n_branch[i] == 1, $sformatf("branch %0d seen %0d times", i, n_branch[i]));
    check(n_normal > 0 && n_unused > 0 && n_mode_switch == 2 && n_restart == 1, "mechanism counts");
    $display("mechanisms: branches add->sub %0d sub->mul %0d mul->shl %0d; patterns add %0d sub %0d mul %0d shl %0d; normal ops %0d, unused codes %0d, mode switches %0d, restarts %0d",
             n_branch[0], n_branch[1], n_branch[2], n_pat[0], n_pat[1], n_pat[2], n_pat[3],
             n_normal, n_unused, n_mode_switch, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
