// rv3_tb_pkg: testbench support for the RV32I pipeline.
//
// Provides instruction encoders (a tiny assembler, one function per RV32I
// format and a few named instructions) and rv_iss, an instruction-set
// reference model that executes one instruction per step and reports what it
// did: the register written, the value, and whether the instruction was a
// load/store, a taken branch/JAL or a JALR. From that the testbenches derive
// both the expected architectural results and the expected cycle cost of the
// pipeline (1 clock, +1 for a load/store, +1 bubble after a taken branch or
// JAL, +2 bubbles after a JALR). The model is written from the RV32I
// instruction definitions, independently of the RTL.
package rv3_tb_pkg;

  function automatic logic [31:0] enc_r(input logic [6:0] f7, input int rs2, input int rs1,
                                        input logic [2:0] f3, input int rd, input logic [6:0] op);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), op};
  endfunction

  function automatic logic [31:0] enc_i(input int imm, input int rs1, input logic [2:0] f3,
                                        input int rd, input logic [6:0] op);
    logic [31:0] v = imm;
    return {v[11:0], 5'(rs1), f3, 5'(rd), op};
  endfunction

  function automatic logic [31:0] enc_s(input int imm, input int rs2, input int rs1,
                                        input logic [2:0] f3);
    logic [31:0] v = imm;
    return {v[11:5], 5'(rs2), 5'(rs1), f3, v[4:0], 7'b0100011};
  endfunction

  function automatic logic [31:0] enc_b(input int off, input int rs2, input int rs1,
                                        input logic [2:0] f3);
    logic [31:0] v = off;
    return {v[12], v[10:5], 5'(rs2), 5'(rs1), f3, v[4:1], v[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] enc_u(input int imm20, input int rd, input logic [6:0] op);
    logic [31:0] v = imm20;
    return {v[19:0], 5'(rd), op};
  endfunction

  function automatic logic [31:0] enc_j(input int off, input int rd);
    logic [31:0] v = off;
    return {v[20], v[10:1], v[11], v[19:12], 5'(rd), 7'b1101111};
  endfunction

  // named instructions used by the directed programs
  function automatic logic [31:0] i_add (int rd, int a, int b); return enc_r(7'h00, b, a, 3'd0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] i_sub (int rd, int a, int b); return enc_r(7'h20, b, a, 3'd0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] i_slt (int rd, int a, int b); return enc_r(7'h00, b, a, 3'd2, rd, 7'b0110011); endfunction
  function automatic logic [31:0] i_addi(int rd, int a, int k); return enc_i(k, a, 3'd0, rd, 7'b0010011); endfunction
  function automatic logic [31:0] i_andi(int rd, int a, int k); return enc_i(k, a, 3'd7, rd, 7'b0010011); endfunction
  function automatic logic [31:0] i_srai(int rd, int a, int k); return enc_i(k | 32'h400, a, 3'd5, rd, 7'b0010011); endfunction
  function automatic logic [31:0] i_lw  (int rd, int k, int a); return enc_i(k, a, 3'd2, rd, 7'b0000011); endfunction
  function automatic logic [31:0] i_sw  (int s, int k, int a);  return enc_s(k, s, a, 3'd2); endfunction
  function automatic logic [31:0] i_blt (int a, int b, int off); return enc_b(off, b, a, 3'd4); endfunction
  function automatic logic [31:0] i_lui (int rd, int k20); return enc_u(k20, rd, 7'b0110111); endfunction
  function automatic logic [31:0] i_jal (int rd, int off); return enc_j(off, rd); endfunction
  function automatic logic [31:0] i_jalr(int rd, int a, int k); return enc_i(k, a, 3'd0, rd, 7'b1100111); endfunction
  function automatic logic [31:0] i_halt(); return enc_j(0, 0); endfunction

  typedef struct {
    logic [31:0] pc;
    logic        wr;        // writes a register other than x0
    logic [4:0]  rd;
    logic [31:0] val;
    logic        ls;        // load or store
    logic        redirect;  // taken branch or JAL
    logic        jalr;
    logic        halt;      // jump to itself
  } step_t;

  class rv_iss;
    logic [31:0] regs [32];
    logic [31:0] mem  [];
    logic [31:0] pc;

    function new(int words);
      mem = new[words];
      foreach (mem[i]) mem[i] = 32'h0000_0013;
      foreach (regs[i]) regs[i] = '0;
      pc = '0;
    endfunction

    function logic [31:0] rd8(logic [31:0] a);
      logic [31:0] w = mem[(a >> 2) % mem.size()];
      return (w >> (8 * a[1:0])) & 32'hff;
    endfunction

    function void wr8(logic [31:0] a, logic [7:0] d);
      int idx = (a >> 2) % mem.size();
      logic [31:0] w = mem[idx];
      w[8*a[1:0] +: 8] = d;
      mem[idx] = w;
    endfunction

    function step_t step();
      step_t s;
      logic [31:0] ins = mem[(pc >> 2) % mem.size()];
      logic [6:0]  op  = ins[6:0];
      logic [2:0]  f3  = ins[14:12];
      logic [4:0]  rd  = ins[11:7];
      logic [31:0] a   = regs[ins[19:15]];
      logic [31:0] b   = regs[ins[24:20]];
      logic [31:0] ii  = {{20{ins[31]}}, ins[31:20]};
      logic [31:0] is  = {{20{ins[31]}}, ins[31:25], ins[11:7]};
      logic [31:0] ib  = {{19{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0};
      logic [31:0] ij  = {{11{ins[31]}}, ins[31], ins[19:12], ins[20], ins[30:21], 1'b0};
      logic [31:0] iu  = {ins[31:12], 12'b0};
      logic [31:0] npc = pc + 4;
      logic [31:0] res = '0;
      logic        w   = 1'b0;
      logic [31:0] opb;
      logic [31:0] ea;
      logic        t;
      logic [31:0] m0, m1, m2, m3;
      s.pc = pc; s.ls = 0; s.redirect = 0; s.jalr = 0; s.halt = 0;
      case (op)
        7'b0110011, 7'b0010011: begin
          opb = (op == 7'b0110011) ? b : ii;
          w = 1;
          case (f3)
            3'd0: res = (op == 7'b0110011 && ins[30]) ? a - opb : a + opb;
            3'd1: res = a << opb[4:0];
            3'd2: res = ($signed(a) < $signed(opb)) ? 1 : 0;
            3'd3: res = (a < opb) ? 1 : 0;
            3'd4: res = a ^ opb;
            3'd5: res = ins[30] ? 32'($signed(a) >>> opb[4:0]) : a >> opb[4:0];
            3'd6: res = a | opb;
            default: res = a & opb;
          endcase
        end
        7'b0110111: begin w = 1; res = iu; end
        7'b0010111: begin w = 1; res = pc + iu; end
        7'b1101111: begin w = 1; res = pc + 4; npc = pc + ij; s.redirect = 1; end
        7'b1100111: begin w = 1; res = pc + 4; npc = (a + ii) & ~32'd1; s.jalr = 1; end
        7'b1100011: begin
          case (f3)
            3'd0: t = (a == b);
            3'd1: t = (a != b);
            3'd4: t = ($signed(a) < $signed(b));
            3'd5: t = ($signed(a) >= $signed(b));
            3'd6: t = (a < b);
            3'd7: t = (a >= b);
            default: t = 0;
          endcase
          if (t) begin npc = pc + ib; s.redirect = 1; end
        end
        7'b0000011: begin
          s.ls = 1; w = 1; ea = a + ii;
          m0 = rd8(ea); m1 = rd8(ea + 1); m2 = rd8(ea + 2); m3 = rd8(ea + 3);
          case (f3)
            3'd0: res = {{24{m0[7]}}, m0[7:0]};
            3'd1: res = {{16{m1[7]}}, m1[7:0], m0[7:0]};
            3'd4: res = {24'b0, m0[7:0]};
            3'd5: res = {16'b0, m1[7:0], m0[7:0]};
            default: res = {m3[7:0], m2[7:0], m1[7:0], m0[7:0]};
          endcase
        end
        7'b0100011: begin
          s.ls = 1; ea = a + is;
          wr8(ea, b[7:0]);
          if (f3 != 3'd0) wr8(ea + 1, b[15:8]);
          if (f3 == 3'd2) begin wr8(ea + 2, b[23:16]); wr8(ea + 3, b[31:24]); end
        end
        default: ;
      endcase
      s.wr  = w && (rd != 0);
      s.rd  = rd;
      s.val = res;
      if (s.wr) regs[rd] = res;
      s.halt = (npc == pc);
      pc = npc;
      return s;
    endfunction
  endclass

endpackage
