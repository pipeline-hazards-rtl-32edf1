// execute_decode: the second instruction decoder, for the Execute stage.
//
// Decodes the instruction held in the Execute pipeline register into the ALU
// control word, the register-file write enable (werf), the write-back select
// (asel), the memory write and data-request lines and the register-jump
// redirect (JALR, target BT from the ALU). Annulled slots (valid low) produce
// no write and no redirect, which is how an instruction behind a taken branch
// becomes a NOP. Loads and stores occupy Execute for two clocks: in the first
// (nostall low) the shared memory serves the data access, the load result or
// the store data is written, and nothing else happens; in the second the
// memory fetches again and the instruction retires with no further write.
// Every other instruction writes in its single Execute clock. fwd_en tells the
// bypass multiplexers that the value now being written may be forwarded;
// loads are excluded because their value is already in the register file when
// the instruction behind them is next evaluated. The signal names werf and
// asel follow the datapath drawing; the rest is this design's. Combinational.
module execute_decode
  import rv3_pkg::*;
(
  input  word_t     instr,
  input  logic      valid,
  input  logic      nostall,
  output alu_ctrl_t alu_ctrl,
  output logic      werf,
  output asel_e     asel,
  output logic      mem_we,
  output logic      data_req,
  output logic      jalr_taken,
  output logic      fwd_en,
  output logic      retire
);

  logic [6:0] opcode;
  logic [2:0] f3;
  logic       f7b5;
  logic       is_load, is_store, writes;

  always_comb begin
    opcode   = instr[6:0];
    f3       = instr[14:12];
    f7b5     = instr[30];
    is_load  = (opcode == OP_LOAD);
    is_store = (opcode == OP_STORE);

    alu_ctrl = ALU_ADD;
    if (opcode == OP_REG || opcode == OP_IMM) begin
      unique case (f3)
        3'b000: alu_ctrl.sub = (opcode == OP_REG) && f7b5;
        3'b001: begin alu_ctrl.fn = FN_SHIFT; alu_ctrl.shift = SH_SLL; end
        3'b010: begin alu_ctrl.fn = FN_SET; alu_ctrl.sub = 1'b1; end
        3'b011: begin alu_ctrl.fn = FN_SET; alu_ctrl.sub = 1'b1; alu_ctrl.set_u = 1'b1; end
        3'b100: begin alu_ctrl.fn = FN_BOOL; alu_ctrl.bfn = BOOL_XOR; end
        3'b101: begin alu_ctrl.fn = FN_SHIFT; alu_ctrl.shift = f7b5 ? SH_SRA : SH_SRL; end
        3'b110: begin alu_ctrl.fn = FN_BOOL; alu_ctrl.bfn = BOOL_OR; end
        default: begin alu_ctrl.fn = FN_BOOL; alu_ctrl.bfn = BOOL_AND; end
      endcase
    end else if (opcode == OP_LUI) begin
      alu_ctrl.fn  = FN_BOOL;
      alu_ctrl.bfn = BOOL_PASSB;
    end

    unique case (opcode)
      OP_LOAD:         asel = ASEL_MEM;
      OP_JAL, OP_JALR: asel = ASEL_LINK;
      OP_AUIPC:        asel = ASEL_PCREL;
      default:         asel = ASEL_ALU;
    endcase

    writes = (opcode == OP_REG) || (opcode == OP_IMM) || (opcode == OP_LUI) ||
             (opcode == OP_AUIPC) || (opcode == OP_JAL) || (opcode == OP_JALR) || is_load;

    data_req   = valid && (is_load || is_store) && !nostall;
    werf       = valid && writes && (is_load ? !nostall : nostall);
    mem_we     = data_req && is_store;
    jalr_taken = valid && nostall && (opcode == OP_JALR);
    fwd_en     = werf && !is_load;
    retire     = valid && nostall;
  end

endmodule
