// tb_fetch_decode: self-checking test of the Decode-stage decoder.
//
// Encodes random instructions of every RV32I format with the testbench
// assembler and checks register fields, the immediates recovered by the
// decoder against the immediates that were encoded, the B-operand select,
// the PC-adder select, and the branch, JAL and load/store flags.
module tb_fetch_decode;
  import rv3_pkg::*;
  import rv3_tb_pkg::*;

  logic       clk = 1'b0;
  word_t      instr, imm_i, imm_s, imm_u, off_b, off_j;
  reg_idx_t   rs1, rs2;
  logic [2:0] funct3;
  bsel_e      bsel;
  btype_e     btype;
  logic       is_branch, is_jal, is_ls;
  int         checks = 0, failures = 0;

  fetch_decode dut (.instr, .rs1, .rs2, .funct3, .imm_i, .imm_s, .imm_u, .off_b,
                    .off_j, .bsel, .btype, .is_branch, .is_jal, .is_ls);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s instr=%h", what, instr); end
  endtask

  initial begin
    int r1, r2, rd, k;
    for (int i = 0; i < 3000; i++) begin
      r1 = $urandom % 32; r2 = $urandom % 32; rd = $urandom % 32;
      // R-type
      instr = enc_r(7'h20, r2, r1, 3'd0, rd, 7'b0110011); #1;
      chk(rs1 == r1 && rs2 == r2 && bsel == BSEL_RS2 && !is_branch && !is_jal && !is_ls, "R");
      // I-type ALU
      k = int'($urandom % 4096) - 2048;
      instr = enc_i(k, r1, 3'd6, rd, 7'b0010011); #1;
      chk(imm_i == 32'(k) && bsel == BSEL_IMM_I && funct3 == 3'd6 && !is_ls, "I");
      // load
      instr = enc_i(k, r1, 3'd2, rd, 7'b0000011); #1;
      chk(imm_i == 32'(k) && bsel == BSEL_IMM_I && is_ls, "load");
      // store
      instr = enc_s(k, r2, r1, 3'd2); #1;
      chk(imm_s == 32'(k) && bsel == BSEL_IMM_S && is_ls && rs2 == r2, "store");
      // branch
      k = (int'($urandom % 8192) - 4096) & ~1;
      instr = enc_b(k, r2, r1, 3'd4); #1;
      chk(off_b == 32'(k) && is_branch && btype == BTYPE_B && bsel == BSEL_RS2, "branch");
      // JAL
      k = (int'($urandom % (1 << 21)) - (1 << 20)) & ~1;
      instr = enc_j(k, rd); #1;
      chk(off_j == 32'(k) && is_jal && btype == BTYPE_J && !is_branch, "jal");
      // LUI / AUIPC
      k = $urandom % (1 << 20);
      instr = enc_u(k, rd, 7'b0110111); #1;
      chk(imm_u == 32'(k) << 12 && bsel == BSEL_IMM_U && !is_jal, "lui");
      instr = enc_u(k, rd, 7'b0010111); #1;
      chk(imm_u == 32'(k) << 12 && btype == BTYPE_U, "auipc");
      // JALR is resolved in Execute, not flagged here
      instr = i_jalr(rd, r1, 8); #1;
      chk(!is_jal && !is_branch && bsel == BSEL_IMM_I && imm_i == 8, "jalr");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
