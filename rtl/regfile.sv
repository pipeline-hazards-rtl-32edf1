// regfile: 32 x 32-bit register file with two read ports and one write port.
//
// Read ports RA/RB are combinational, so the Decode stage sees DA/DB in the
// same cycle it presents the addresses. The write port is sampled on the
// rising clock edge: the Execute stage writes its result (Din at WA when WE)
// at the end of the Execute cycle, and an instruction in Decode in the next
// cycle reads the new value. Register x0 always reads zero and ignores writes,
// as RV32I requires. The port names follow the datapath drawing of the
// pipeline; the synchronous reset that clears all registers is this design's
// choice, made so that simulation starts from a known state.
module regfile
  import rv3_pkg::*;
#(
  parameter int unsigned NREGS = 32
) (
  input  logic     clk,
  input  logic     rst,
  input  reg_idx_t ra,
  input  reg_idx_t rb,
  output word_t    da,
  output word_t    db,
  input  logic     we,
  input  reg_idx_t wa,
  input  word_t    din
);

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= din;
    end
  end

  assign da = (ra == '0) ? '0 : regs[ra];
  assign db = (rb == '0) ? '0 : regs[rb];

endmodule
