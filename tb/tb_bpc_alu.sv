// tb_bpc_alu -- self-checking testbench of the four functional units and mux.
//
// Drives random and corner operands with each one-hot opcode and with all
// twelve unused codes, and compares OUT with sum, difference (16-bit two's
// complement), product and left shift worked out in the testbench.  Unused
// codes must select the shifter.
module tb_bpc_alu;
  localparam int W = 8;
  logic [3:0] a;
  logic [W-1:0] b, c;
  logic [2*W-1:0] out;
  int checks = 0, failures = 0;

  bpc_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] expected(input logic [3:0] op, input int bb, input int cc);
    case (op)
      4'b0001: return 16'(bb + cc);
      4'b0010: return 16'(bb - cc);
      4'b0100: return 16'(bb * cc);
      default: return (cc >= 16) ? 16'h0 : 16'(bb * (1 << cc));
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 4000; n++) begin
      a = 4'($urandom);
      if (n % 2 == 0) a = 4'b0001 << (n / 2 % 4);
      if (n < 16) begin b = 8'hff; c = (n < 8) ? 8'hff : 8'(n); end
      else begin b = 8'($urandom); c = (n % 3 == 0) ? 8'($urandom % 20) : 8'($urandom); end
      #1;
      checks++;
      if (out !== expected(a, b, c)) begin
        failures++;
        $display("FAIL a=%b b=%0d c=%0d out=%h exp=%h", a, b, c, out, expected(a, b, c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
