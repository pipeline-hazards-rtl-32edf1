// alu: the Execute-stage arithmetic and logic unit.
//
// Four result groups are selected by ctrl.fn: MATH (A+B, or A-B when
// ctrl.sub), SHIFT (SLL/SRL/SRA of A by B[4:0]), BOOL (a bitwise truth table
// b11..b00 indexed by the bit pair {a,b}, which gives AND, OR, XOR and
// pass-B) and SET (1 when A < B, signed or unsigned). The adder also produces
// the condition flags C (carry out), V (signed overflow), N (sign of the sum)
// and Z (result zero). The control line names (sub, math, shift, b00..b11,
// set) and the C,V,N,Z outputs follow the pipeline's datapath drawing; the
// boolean truth-table encoding and the grouping are this design's choice.
// Purely combinational: the result R is ready within the Execute cycle and is
// also the register-jump target BT.
module alu
  import rv3_pkg::*;
(
  input  word_t     a,
  input  word_t     b,
  input  alu_ctrl_t ctrl,
  output word_t     r,
  output logic      c,
  output logic      v,
  output logic      n,
  output logic      z
);

  word_t      b_eff;
  logic [32:0] sum;
  word_t      shifted;
  word_t      boolr;
  logic       lt;

  always_comb begin
    b_eff = ctrl.sub ? ~b : b;
    sum   = {1'b0, a} + {1'b0, b_eff} + 33'(ctrl.sub);
    c     = sum[32];
    n     = sum[31];
    v     = (a[31] == b_eff[31]) && (sum[31] != a[31]);
    // signed less-than is N xor V, unsigned is "no carry" after A - B
    lt    = ctrl.set_u ? ~c : (n ^ v);

    unique case (ctrl.shift)
      SH_SRL:  shifted = a >> b[4:0];
      SH_SRA:  shifted = word_t'($signed(a) >>> b[4:0]);
      default: shifted = a << b[4:0];
    endcase

    for (int i = 0; i < 32; i++) boolr[i] = ctrl.bfn[{a[i], b[i]}];

    unique case (ctrl.fn)
      FN_MATH:  r = sum[31:0];
      FN_SHIFT: r = shifted;
      FN_BOOL:  r = boolr;
      default:  r = {31'b0, lt};
    endcase
    z = (r == '0);
  end

endmodule
