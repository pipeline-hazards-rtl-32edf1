// branch_cmp: the Decode-stage branch decision.
//
// Compares the two source operands of a conditional branch (already passed
// through the bypass multiplexers, so a result still in Execute is seen) by
// forming A - B and its flags C, V, N, Z, and evaluates the branch condition
// of funct3: BEQ (Z), BNE (!Z), BLT (N^V), BGE (!(N^V)), BLTU (!C),
// BGEU (C). Deciding in Decode rather than Execute is what lets a taken branch
// cost one annulled slot instead of two; using the flag equations mirrors how
// the Execute-stage ALU reports conditions. Combinational; `taken` is only
// asserted when `is_branch` is high and funct3 is a defined condition.
module branch_cmp
  import rv3_pkg::*;
(
  input  logic       is_branch,
  input  logic [2:0] funct3,
  input  word_t      a,
  input  word_t      b,
  output logic       taken
);

  logic [32:0] diff;
  logic        c, v, n, z;

  always_comb begin
    diff = {1'b0, a} + {1'b0, ~b} + 33'd1;
    c    = diff[32];
    n    = diff[31];
    v    = (a[31] != b[31]) && (diff[31] != a[31]);
    z    = (diff[31:0] == '0);
    unique case (funct3)
      3'b000:  taken = z;
      3'b001:  taken = !z;
      3'b100:  taken = n ^ v;
      3'b101:  taken = !(n ^ v);
      3'b110:  taken = !c;
      3'b111:  taken = c;
      default: taken = 1'b0;
    endcase
    taken = taken && is_branch;
  end

endmodule
