// fetch_decode: the first of the two instruction decoders.
//
// Works on the instruction held in the Decode pipeline register (the word the
// Fetch stage delivered). It extracts the register addresses, forms the
// immediates (I, S, U for the B operand; B and J offsets for the PC adder),
// chooses the B-operand source (bsel) and the PC-adder offset (btype), and
// detects the instructions the Decode stage must act on at once: conditional
// branches and JAL (early branch detection) and loads/stores (which need the
// shared memory in their first Execute cycle). bsel and the immediate bit
// fields follow the datapath drawing; the decode of the remaining RV32I
// opcodes is standard RV32I. Combinational.
module fetch_decode
  import rv3_pkg::*;
(
  input  word_t    instr,
  output reg_idx_t rs1,
  output reg_idx_t rs2,
  output logic [2:0] funct3,
  output word_t    imm_i,
  output word_t    imm_s,
  output word_t    imm_u,
  output word_t    off_b,
  output word_t    off_j,
  output bsel_e    bsel,
  output btype_e   btype,
  output logic     is_branch,
  output logic     is_jal,
  output logic     is_ls
);

  logic [6:0] opcode;

  always_comb begin
    opcode = instr[6:0];
    rs1    = instr[19:15];
    rs2    = instr[24:20];
    funct3 = instr[14:12];

    imm_i = {{20{instr[31]}}, instr[31:20]};
    imm_s = {{20{instr[31]}}, instr[31:25], instr[11:7]};
    imm_u = {instr[31:12], 12'b0};
    off_b = {{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
    off_j = {{11{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};

    is_branch = (opcode == OP_BRANCH);
    is_jal    = (opcode == OP_JAL);
    is_ls     = (opcode == OP_LOAD) || (opcode == OP_STORE);

    unique case (opcode)
      OP_REG, OP_BRANCH: bsel = BSEL_RS2;
      OP_STORE:          bsel = BSEL_IMM_S;
      OP_LUI, OP_AUIPC:  bsel = BSEL_IMM_U;
      default:           bsel = BSEL_IMM_I;
    endcase

    unique case (opcode)
      OP_JAL:   btype = BTYPE_J;
      OP_AUIPC: btype = BTYPE_U;
      default:  btype = BTYPE_B;
    endcase
  end

endmodule
