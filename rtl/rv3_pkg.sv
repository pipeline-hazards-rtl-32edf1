// rv3_pkg: types and constants shared by the 3-stage RV32I pipeline.
//
// Holds the RV32I major opcodes, the control encodings of the datapath
// multiplexers (bsel, btype, asel) and the ALU control word. The multiplexer
// input numbering follows the datapath drawing of the pipeline:
//   bsel  0 = I immediate, 1 = rs2 (DB), 2 = S immediate, 3 = U immediate
//   btype 0 = B offset,    1 = J offset, 2 = BT (ALU result), 3 = U immediate
//   asel  0 = ALU result,  1 = memory data, 2 = PC+4 (link), 3 = PC-relative sum
// The meaning given to asel inputs 2 and 3 is this design's reading of the
// drawing. The ALU control word names its fields after the ALU control lines
// (sub, math, shift, boolean table b00..b11, set).
package rv3_pkg;

  localparam int unsigned XLEN = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;

  // RV32I major opcodes (instruction bits [6:0])
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;

  // Canonical NOP (addi x0, x0, 0)
  localparam word_t NOP_INSTR = 32'h0000_0013;

  typedef enum logic [1:0] {
    BSEL_IMM_I = 2'd0,
    BSEL_RS2   = 2'd1,
    BSEL_IMM_S = 2'd2,
    BSEL_IMM_U = 2'd3
  } bsel_e;

  typedef enum logic [1:0] {
    BTYPE_B  = 2'd0,
    BTYPE_J  = 2'd1,
    BTYPE_BT = 2'd2,
    BTYPE_U  = 2'd3
  } btype_e;

  typedef enum logic [1:0] {
    ASEL_ALU   = 2'd0,
    ASEL_MEM   = 2'd1,
    ASEL_LINK  = 2'd2,
    ASEL_PCREL = 2'd3
  } asel_e;

  // ALU result group
  typedef enum logic [1:0] {
    FN_MATH  = 2'd0,   // A + B or A - B
    FN_SHIFT = 2'd1,   // A shifted by B[4:0]
    FN_BOOL  = 2'd2,   // bitwise truth table over (A, B)
    FN_SET   = 2'd3    // 1 if A < B (signed or unsigned)
  } alu_fn_e;

  // Shift kinds
  typedef enum logic [1:0] {
    SH_SLL = 2'b00,
    SH_SRL = 2'b01,
    SH_SRA = 2'b11
  } shift_e;

  // Boolean truth tables, bit index {a,b}: b00 = bit0, b01 = bit1, b10 = bit2, b11 = bit3
  localparam logic [3:0] BOOL_AND   = 4'b1000;
  localparam logic [3:0] BOOL_OR    = 4'b1110;
  localparam logic [3:0] BOOL_XOR   = 4'b0110;
  localparam logic [3:0] BOOL_PASSB = 4'b1010;

  typedef struct packed {
    alu_fn_e    fn;
    logic       sub;       // subtract in the adder (also for SET)
    shift_e     shift;
    logic [3:0] bfn;       // b11 b10 b01 b00
    logic       set_u;     // unsigned compare for SET
  } alu_ctrl_t;

  localparam alu_ctrl_t ALU_ADD = '{fn: FN_MATH, sub: 1'b0, shift: SH_SLL, bfn: 4'b0000, set_u: 1'b0};

  // Byte-lane helpers for the shared memory (funct3 of loads and stores).
  function automatic logic [3:0] store_be(input logic [2:0] f3, input logic [1:0] a);
    unique case (f3[1:0])
      2'b00:   store_be = 4'b0001 << a;
      2'b01:   store_be = a[1] ? 4'b1100 : 4'b0011;
      default: store_be = 4'b1111;
    endcase
  endfunction

  function automatic word_t store_data(input logic [2:0] f3, input word_t d);
    unique case (f3[1:0])
      2'b00:   store_data = {4{d[7:0]}};
      2'b01:   store_data = {2{d[15:0]}};
      default: store_data = d;
    endcase
  endfunction

  function automatic word_t load_extend(input logic [2:0] f3, input logic [1:0] a, input word_t w);
    logic [7:0]  b;
    logic [15:0] h;
    b = w[8*a +: 8];
    h = a[1] ? w[31:16] : w[15:0];
    unique case (f3)
      3'b000:  load_extend = {{24{b[7]}}, b};
      3'b001:  load_extend = {{16{h[15]}}, h};
      3'b100:  load_extend = {24'b0, b};
      3'b101:  load_extend = {16'b0, h};
      default: load_extend = w;
    endcase
  endfunction

endpackage
