// tb_execute_decode: self-checking test of the Execute-stage decoder.
//
// For each RV32I instruction class, with valid and NoStall in all four
// combinations, checks the register write enable, write-back select, memory
// write and data request, the JALR redirect, forward enable and retirement
// against the two-clock load/store rule, and checks the ALU control word for
// every ALU operation.
module tb_execute_decode;
  import rv3_pkg::*;
  import rv3_tb_pkg::*;

  logic      clk = 1'b0;
  word_t     instr;
  logic      valid, nostall;
  alu_ctrl_t alu_ctrl;
  logic      werf, mem_we, data_req, jalr_taken, fwd_en, retire;
  asel_e     asel;
  int        checks = 0, failures = 0;

  execute_decode dut (.instr, .valid, .nostall, .alu_ctrl, .werf, .asel, .mem_we,
                      .data_req, .jalr_taken, .fwd_en, .retire);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s instr=%h v=%b ns=%b", what, instr, valid, nostall); end
  endtask

  // kind: 0 alu, 1 load, 2 store, 3 branch, 4 jal, 5 jalr, 6 lui, 7 auipc
  task automatic try(input word_t ins, input int kind);
    logic writes, ls, ld, ex_werf;
    instr = ins;
    writes = !(kind == 2 || kind == 3);
    ls = (kind == 1 || kind == 2);
    ld = (kind == 1);
    for (int m = 0; m < 4; m++) begin
      valid = m[0]; nostall = m[1];
      #1;
      ex_werf = valid && writes && (ld ? !nostall : nostall);
      chk(werf == ex_werf, "werf");
      chk(data_req == (valid && ls && !nostall), "data_req");
      chk(mem_we == (valid && kind == 2 && !nostall), "mem_we");
      chk(jalr_taken == (valid && nostall && kind == 5), "jalr_taken");
      chk(retire == (valid && nostall), "retire");
      chk(fwd_en == (ex_werf && !ld), "fwd_en");
      case (kind)
        1: chk(asel == ASEL_MEM, "asel mem");
        4, 5: chk(asel == ASEL_LINK, "asel link");
        7: chk(asel == ASEL_PCREL, "asel pcrel");
        default: chk(asel == ASEL_ALU, "asel alu");
      endcase
      if (kind == 1 || kind == 2 || kind == 5) chk(alu_ctrl == ALU_ADD, "address add");
    end
  endtask

  task automatic alu_op(input word_t ins, input alu_fn_e fn, input logic sub,
                        input shift_e sh, input logic [3:0] bfn, input logic su);
    instr = ins; valid = 1; nostall = 1;
    #1;
    chk(alu_ctrl.fn == fn, "alu fn");
    if (fn == FN_MATH || fn == FN_SET) chk(alu_ctrl.sub == sub, "alu sub");
    if (fn == FN_SHIFT) chk(alu_ctrl.shift == sh, "alu shift");
    if (fn == FN_BOOL) chk(alu_ctrl.bfn == bfn, "alu bool");
    if (fn == FN_SET) chk(alu_ctrl.set_u == su, "alu set_u");
  endtask

  initial begin
    for (int i = 0; i < 200; i++) begin
      int r1 = $urandom % 32, r2 = $urandom % 32, rd = $urandom % 32;
      try(i_add(rd, r1, r2), 0);
      try(i_addi(rd, r1, 5), 0);
      try(i_lw(rd, 8, r1), 1);
      try(enc_i(3, r1, 3'd4, rd, 7'b0000011), 1);
      try(i_sw(r2, 8, r1), 2);
      try(i_blt(r1, r2, 16), 3);
      try(i_jal(rd, 64), 4);
      try(i_jalr(rd, r1, 4), 5);
      try(i_lui(rd, 5), 6);
      try(enc_u(5, rd, 7'b0010111), 7);
    end
    alu_op(enc_r(7'h00, 1, 2, 3'd0, 3, 7'b0110011), FN_MATH, 0, SH_SLL, 0, 0);
    alu_op(enc_r(7'h20, 1, 2, 3'd0, 3, 7'b0110011), FN_MATH, 1, SH_SLL, 0, 0);
    alu_op(enc_i(-5, 2, 3'd0, 3, 7'b0010011) | 32'h4000_0000, FN_MATH, 0, SH_SLL, 0, 0);
    alu_op(enc_r(7'h00, 1, 2, 3'd1, 3, 7'b0110011), FN_SHIFT, 0, SH_SLL, 0, 0);
    alu_op(enc_r(7'h00, 1, 2, 3'd2, 3, 7'b0110011), FN_SET, 1, SH_SLL, 0, 0);
    alu_op(enc_r(7'h00, 1, 2, 3'd3, 3, 7'b0110011), FN_SET, 1, SH_SLL, 0, 1);
    alu_op(enc_r(7'h00, 1, 2, 3'd4, 3, 7'b0110011), FN_BOOL, 0, SH_SLL, BOOL_XOR, 0);
    alu_op(enc_r(7'h00, 1, 2, 3'd5, 3, 7'b0110011), FN_SHIFT, 0, SH_SRL, 0, 0);
    alu_op(enc_r(7'h20, 1, 2, 3'd5, 3, 7'b0110011), FN_SHIFT, 0, SH_SRA, 0, 0);
    alu_op(enc_r(7'h00, 1, 2, 3'd6, 3, 7'b0110011), FN_BOOL, 0, SH_SLL, BOOL_OR, 0);
    alu_op(enc_r(7'h00, 1, 2, 3'd7, 3, 7'b0110011), FN_BOOL, 0, SH_SLL, BOOL_AND, 0);
    alu_op(i_srai(3, 2, 4), FN_SHIFT, 0, SH_SRA, 0, 0);
    alu_op(i_lui(3, 7), FN_BOOL, 0, SH_SLL, BOOL_PASSB, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
