// next_pc: program counter selection.
//
// A four-input multiplexer (btype) picks the branch offset (0), the jump
// offset (1), the ALU result BT for register jumps (2) or the upper immediate
// (3). Offsets 0, 1 and 3 are added to the PC of the instruction in Decode
// (pc_d); that sum is the branch/jump target and, for AUIPC, the value later
// written to rd. The +4 incrementer advances the fetch PC (pc_f). The taken
// multiplexer chooses target or PC+4, and the reset multiplexer forces zero.
// The multiplexers, their input numbering, the adder and the reset mux follow
// the datapath drawing. Using the Decode-stage PC as the adder base (so the
// offset is relative to the branch itself) and passing BT straight through,
// with bit 0 cleared, instead of adding it to the PC, are this design's
// choices. Combinational.
module next_pc
  import rv3_pkg::*;
(
  input  logic   rst,
  input  word_t  pc_f,
  input  word_t  pc_d,
  input  btype_e btype,
  input  word_t  off_b,
  input  word_t  off_j,
  input  word_t  bt,
  input  word_t  imm_u,
  input  logic   taken,
  output word_t  pc_next,
  output word_t  pc_rel
);

  word_t off;
  word_t target;

  always_comb begin
    unique case (btype)
      BTYPE_B:  off = off_b;
      BTYPE_J:  off = off_j;
      BTYPE_BT: off = '0;
      default:  off = imm_u;
    endcase
    pc_rel  = pc_d + off;
    target  = (btype == BTYPE_BT) ? {bt[31:1], 1'b0} : pc_rel;
    if (rst)        pc_next = '0;
    else if (taken) pc_next = target;
    else            pc_next = pc_f + 32'd4;
  end

endmodule
