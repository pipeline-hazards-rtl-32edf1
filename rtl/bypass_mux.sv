// bypass_mux: forwards the Execute-stage result to one Decode-stage operand.
//
// When the source register read in Decode (rs) equals the destination of the
// instruction now in Execute (rd_e), and that instruction will write a result
// computed in this cycle (fwd_en), the operand is taken from the value being
// written (fwd_data) instead of the register file output, so the pipeline
// register and the register file are loaded with the same value at the same
// clock edge. The equality compare and the two-input multiplexer are the ones
// in the pipeline's bypass drawing (rs1Dec == rdExe, rs2Dec == rdExe);
// excluding x0 is this design's addition, needed because x0 never changes.
// Combinational; `hit` reports that the bypass path was selected.
module bypass_mux
  import rv3_pkg::*;
(
  input  reg_idx_t rs,
  input  word_t    rf_data,
  input  reg_idx_t rd_e,
  input  logic     fwd_en,
  input  word_t    fwd_data,
  output word_t    q,
  output logic     hit
);

  assign hit = fwd_en && (rd_e != '0) && (rs == rd_e);
  assign q   = hit ? fwd_data : rf_data;

endmodule
