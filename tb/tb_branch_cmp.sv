// tb_branch_cmp: self-checking test of the Decode-stage branch comparator.
//
// For random and corner-case operand pairs and every funct3 value, compares
// `taken` with the RV32I branch condition computed here with native signed
// and unsigned compares; checks that undefined funct3 values and
// non-branches never report taken.
module tb_branch_cmp;
  import rv3_pkg::*;

  logic       clk = 1'b0;
  logic       is_branch;
  logic [2:0] funct3;
  word_t      a, b;
  logic       taken;
  int         checks = 0, failures = 0;

  branch_cmp dut (.is_branch, .funct3, .a, .b, .taken);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t pick();
    case ($urandom % 6)
      0: return 32'h0;
      1: return 32'hffff_ffff;
      2: return 32'h8000_0000;
      3: return 32'h7fff_ffff;
      4: return 32'($urandom % 4);
      default: return $urandom;
    endcase
  endfunction

  initial begin
    logic exp;
    for (int i = 0; i < 5000; i++) begin
      a = pick();
      b = (i % 5 == 0) ? a : pick();
      for (int f = 0; f < 8; f++) begin
        funct3 = 3'(f);
        is_branch = ($urandom % 8) != 0;
        case (f)
          0: exp = (a == b);
          1: exp = (a != b);
          4: exp = ($signed(a) < $signed(b));
          5: exp = ($signed(a) >= $signed(b));
          6: exp = (a < b);
          7: exp = (a >= b);
          default: exp = 1'b0;
        endcase
        exp = exp && is_branch;
        #1;
        checks++;
        if (taken !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL f3=%0d a=%h b=%h taken=%b", f, a, b, taken);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
