// rv3_pipeline: a three-stage (Fetch, Decode, Execute) RV32I pipeline with
// hazard handling, over one memory shared by instructions and data.
//
// Fetch: the PC addresses the shared memory; the word read is captured in the
// Decode pipeline register at the end of the cycle together with its PC.
// Decode: fetch_decode decodes the word, the register file is read, both
// source operands pass through bypass multiplexers that substitute the result
// being produced in Execute, the B operand is selected (bsel), and the
// operands, the store data and the delayed PC values (PC+4 for links, the
// PC-relative sum for AUIPC) are loaded into the Execute pipeline register.
// Conditional branches and JAL are resolved here (branch_cmp, next_pc): when
// taken, the PC is redirected at once and the one instruction already fetched
// behind the branch is annulled, so a taken branch costs two clocks.
// Execute: execute_decode drives the ALU; the write-back multiplexer (asel)
// picks ALU result, load data, PC+4 or PC-relative sum, and the register file
// is written at the end of the cycle. JALR is redirected from here with the
// ALU result as target and annuls the two younger instructions (three clocks).
// Loads and stores: stall_fsm drops NoStall for one clock when one enters
// Execute; that clock the memory serves the data access and PC and pipeline
// registers hold, so loads and stores cost two clocks and no load-use hazard
// remains. Annulled slots carry valid = 0 and write nothing.
//
// The stage split, the two decoders, the Execute-stage bypass, the annul
// scheme, the shared memory and the NoStall enable all follow the design;
// resolving branches in Decode with a separate comparator, JALR handling,
// the order of the two load/store clocks and the debug outputs are choices
// of this design. Ports: clk, synchronous active-high rst (PC restarts at 0),
// and observation outputs: retirement (one pulse per completed instruction,
// with its PC), the register-file write port, and event pulses for stall,
// redirect/annul and bypass use.
module rv3_pipeline
  import rv3_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 4096
) (
  input  logic     clk,
  input  logic     rst,
  output word_t    pc_o,
  output logic     retire_o,
  output word_t    retire_pc_o,
  output logic     rf_we_o,
  output reg_idx_t rf_waddr_o,
  output word_t    rf_wdata_o,
  output logic     ev_stall_o,
  output logic     ev_annul_o,
  output logic     ev_bypass_o
);

  // ---------------- state ----------------
  word_t    pc_f;
  word_t    ir_d, pc_d;
  logic     valid_d;
  word_t    ir_e, pc_e, a_e, b_e, str_e, link_e, pcrel_e;
  logic     valid_e;
  logic     nostall;

  // ---------------- shared memory ----------------
  word_t      mem_addr, mem_rdata, mem_wdata;
  logic       mem_we;
  logic [3:0] mem_be;

  // ---------------- Decode stage ----------------
  reg_idx_t   rs1_d, rs2_d;
  logic [2:0] f3_d;
  word_t      imm_i, imm_s, imm_u, off_b, off_j;
  bsel_e      bsel;
  btype_e     btype_d, btype;
  logic       is_branch_d, is_jal_d, is_ls_d;
  word_t      rf_da, rf_db, opa_d, opb_d, b_d;
  logic       hit_a, hit_b;
  logic       br_taken, dec_redirect, taken, ls_d;
  word_t      pc_next, pc_rel;

  // ---------------- Execute stage ----------------
  alu_ctrl_t  alu_ctrl;
  logic       werf, data_req, ex_mem_we, jalr_taken, fwd_en, retire;
  asel_e      asel;
  word_t      alu_r, wb;
  // RV32I keeps no condition flags, so the ALU flags are not used here:
  // conditional branches are decided by branch_cmp in Decode.
  logic       fl_c, fl_v, fl_n, fl_z;

  fetch_decode u_fdec (
    .instr(ir_d), .rs1(rs1_d), .rs2(rs2_d), .funct3(f3_d),
    .imm_i(imm_i), .imm_s(imm_s), .imm_u(imm_u), .off_b(off_b), .off_j(off_j),
    .bsel(bsel), .btype(btype_d), .is_branch(is_branch_d), .is_jal(is_jal_d),
    .is_ls(is_ls_d)
  );

  regfile u_rf (
    .clk(clk), .rst(rst), .ra(rs1_d), .rb(rs2_d), .da(rf_da), .db(rf_db),
    .we(werf), .wa(ir_e[11:7]), .din(wb)
  );

  bypass_mux u_byp_a (
    .rs(rs1_d), .rf_data(rf_da), .rd_e(ir_e[11:7]), .fwd_en(fwd_en),
    .fwd_data(wb), .q(opa_d), .hit(hit_a)
  );

  bypass_mux u_byp_b (
    .rs(rs2_d), .rf_data(rf_db), .rd_e(ir_e[11:7]), .fwd_en(fwd_en),
    .fwd_data(wb), .q(opb_d), .hit(hit_b)
  );

  always_comb begin
    unique case (bsel)
      BSEL_IMM_I: b_d = imm_i;
      BSEL_RS2:   b_d = opb_d;
      BSEL_IMM_S: b_d = imm_s;
      default:    b_d = imm_u;
    endcase
  end

  branch_cmp u_bcmp (
    .is_branch(valid_d && is_branch_d), .funct3(f3_d), .a(opa_d), .b(opb_d),
    .taken(br_taken)
  );

  // A register jump in Execute overrides whatever Decode holds (it is annulled).
  assign dec_redirect = valid_d && (br_taken || is_jal_d) && !jalr_taken;
  assign taken        = dec_redirect || jalr_taken;
  assign btype        = jalr_taken ? BTYPE_BT : btype_d;
  assign ls_d         = valid_d && is_ls_d && !jalr_taken;

  next_pc u_npc (
    .rst(rst), .pc_f(pc_f), .pc_d(pc_d), .btype(btype), .off_b(off_b),
    .off_j(off_j), .bt(alu_r), .imm_u(imm_u), .taken(taken),
    .pc_next(pc_next), .pc_rel(pc_rel)
  );

  stall_fsm u_stall (.clk(clk), .rst(rst), .ls(ls_d), .nostall(nostall));

  // ---------------- Execute stage ----------------
  execute_decode u_edec (
    .instr(ir_e), .valid(valid_e), .nostall(nostall), .alu_ctrl(alu_ctrl),
    .werf(werf), .asel(asel), .mem_we(ex_mem_we), .data_req(data_req),
    .jalr_taken(jalr_taken), .fwd_en(fwd_en), .retire(retire)
  );

  alu u_alu (
    .a(a_e), .b(b_e), .ctrl(alu_ctrl), .r(alu_r),
    .c(fl_c), .v(fl_v), .n(fl_n), .z(fl_z)
  );

  always_comb begin
    unique case (asel)
      ASEL_ALU:  wb = alu_r;
      ASEL_MEM:  wb = load_extend(ir_e[14:12], alu_r[1:0], mem_rdata);
      ASEL_LINK: wb = link_e;
      default:   wb = pcrel_e;
    endcase
  end

  // ---------------- shared memory port ----------------
  assign mem_addr  = data_req ? alu_r : pc_f;
  assign mem_we    = ex_mem_we;
  assign mem_be    = store_be(ir_e[14:12], alu_r[1:0]);
  assign mem_wdata = store_data(ir_e[14:12], str_e);

  unified_mem #(.WORDS(MEM_WORDS)) u_mem (
    .clk(clk), .addr(mem_addr), .we(mem_we), .be(mem_be), .wdata(mem_wdata),
    .rdata(mem_rdata)
  );

  // ---------------- PC and pipeline registers (enable = NoStall) ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      pc_f    <= '0;
      ir_d    <= NOP_INSTR;
      pc_d    <= '0;
      valid_d <= 1'b0;
      ir_e    <= NOP_INSTR;
      pc_e    <= '0;
      a_e     <= '0;
      b_e     <= '0;
      str_e   <= '0;
      link_e  <= '0;
      pcrel_e <= '0;
      valid_e <= 1'b0;
    end else if (nostall) begin
      pc_f    <= pc_next;
      ir_d    <= mem_rdata;
      pc_d    <= pc_f;
      valid_d <= !taken;
      ir_e    <= ir_d;
      pc_e    <= pc_d;
      a_e     <= opa_d;
      b_e     <= b_d;
      str_e   <= opb_d;
      link_e  <= pc_d + 32'd4;
      pcrel_e <= pc_rel;
      valid_e <= valid_d && !jalr_taken;
    end
  end

  // A frozen clock always belongs to a valid load/store in Execute.
  a_stall_is_data: assert property (@(posedge clk) disable iff (rst) !nostall |-> data_req);
  // Decode and Execute are never redirected while frozen.
  a_no_redirect_frozen: assert property (@(posedge clk) disable iff (rst) !nostall |-> !jalr_taken);

  // ---------------- observation ----------------
  assign pc_o        = pc_f;
  assign retire_o    = retire;
  assign retire_pc_o = pc_e;
  assign rf_we_o     = werf && (ir_e[11:7] != '0);
  assign rf_waddr_o  = ir_e[11:7];
  assign rf_wdata_o  = wb;
  assign ev_stall_o  = !nostall;
  assign ev_annul_o  = nostall && taken;
  assign ev_bypass_o = nostall && valid_d && !jalr_taken && (hit_a || hit_b);

endmodule
