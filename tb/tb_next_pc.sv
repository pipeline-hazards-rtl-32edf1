// tb_next_pc: self-checking test of the next-PC selection.
//
// For random PCs and offsets checks every btype choice: the PC-relative sum
// (Decode PC plus branch, jump or upper-immediate offset), the register-jump
// target (BT with bit 0 cleared), PC+4 when not taken and zero in reset.
module tb_next_pc;
  import rv3_pkg::*;

  logic   clk = 1'b0;
  logic   rst, taken;
  word_t  pc_f, pc_d, off_b, off_j, bt, imm_u, pc_next, pc_rel;
  btype_e btype;
  int     checks = 0, failures = 0;

  next_pc dut (.rst, .pc_f, .pc_d, .btype, .off_b, .off_j, .bt, .imm_u, .taken,
               .pc_next, .pc_rel);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    word_t off, exp;
    for (int i = 0; i < 4000; i++) begin
      pc_f  = $urandom & ~32'd3;
      pc_d  = pc_f - 4;
      off_b = {{19{1'b1}}, 13'($urandom)} & ~32'd1;
      if ($urandom % 2) off_b = {19'b0, 13'($urandom)} & ~32'd1;
      off_j = 32'($signed(21'($urandom))) & ~32'd1;
      bt    = $urandom;
      imm_u = $urandom & 32'hffff_f000;
      btype = btype_e'($urandom % 4);
      taken = $urandom;
      rst   = ($urandom % 16) == 0;
      case (btype)
        BTYPE_B:  off = off_b;
        BTYPE_J:  off = off_j;
        BTYPE_U:  off = imm_u;
        default:  off = '0;
      endcase
      if (rst) exp = '0;
      else if (!taken) exp = pc_f + 4;
      else if (btype == BTYPE_BT) exp = bt & ~32'd1;
      else exp = pc_d + off;
      #1;
      chk(pc_next == exp, $sformatf("btype=%0d taken=%b rst=%b next=%h exp=%h",
                                    btype, taken, rst, pc_next, exp));
      if (btype != BTYPE_BT) chk(pc_rel == pc_d + off, "pc-relative sum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
