// tb_alu: self-checking test of the ALU.
//
// Drives random and corner-case operands through every operation (add, sub,
// shifts, AND/OR/XOR/pass-B truth tables, signed and unsigned set) and
// compares result and flags with values computed here from the operation's
// definition. A watchdog ends the run if it does not finish.
module tb_alu;
  import rv3_pkg::*;

  logic        clk = 1'b0;
  word_t       a, b, r;
  alu_ctrl_t   ctrl;
  logic        c, v, n, z;
  int          checks = 0, failures = 0;

  alu dut (.a, .b, .ctrl, .r, .c, .v, .n, .z);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input word_t exp, input string what);
    #1;
    checks++;
    if (r !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: a=%h b=%h r=%h exp=%h", what, a, b, r, exp);
    end
  endtask

  function automatic word_t pick();
    case ($urandom % 6)
      0: return 32'h0;
      1: return 32'hffff_ffff;
      2: return 32'h8000_0000;
      3: return 32'h7fff_ffff;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    logic [32:0] wide;
    for (int i = 0; i < 3000; i++) begin
      a = pick();
      b = pick();
      ctrl = ALU_ADD;                   check(a + b, "add");
      wide = {1'b0, a} + {1'b0, b};
      checks++; if (c !== wide[32] || z !== (a + b == 0) || n !== wide[31]) failures++;
      checks++; if (v !== ((a[31] == b[31]) && (wide[31] != a[31]))) failures++;
      ctrl.sub = 1'b1;                  check(a - b, "sub");
      checks++; if (c !== (a >= b)) failures++;          // carry = no borrow
      checks++; if (v !== ((a[31] != b[31]) && ((a - b) >> 31 != a[31]))) failures++;
      ctrl = ALU_ADD; ctrl.fn = FN_SHIFT; ctrl.shift = SH_SLL; check(a << b[4:0], "sll");
      ctrl.shift = SH_SRL;              check(a >> b[4:0], "srl");
      ctrl.shift = SH_SRA;              check(word_t'($signed(a) >>> b[4:0]), "sra");
      ctrl = ALU_ADD; ctrl.fn = FN_BOOL;
      ctrl.bfn = BOOL_AND;              check(a & b, "and");
      ctrl.bfn = BOOL_OR;               check(a | b, "or");
      ctrl.bfn = BOOL_XOR;              check(a ^ b, "xor");
      ctrl.bfn = BOOL_PASSB;            check(b, "passb");
      ctrl = ALU_ADD; ctrl.fn = FN_SET; ctrl.sub = 1'b1;
      check(word_t'($signed(a) < $signed(b)), "slt");
      ctrl.set_u = 1'b1;                check(word_t'(a < b), "sltu");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
