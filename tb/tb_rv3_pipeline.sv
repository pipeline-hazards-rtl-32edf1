// tb_rv3_pipeline: end-to-end test of the three-stage pipeline at its default
// parameters.
//
// Runs a set of programs on the pipeline and, in lock step, on the
// instruction-set model rv_iss: the instruction sequences used to explain the
// pipeline (a dependent ALU chain, a counted loop with a backward branch, a
// load/modify/store sequence), a call/return through JAL and JALR, and
// several random programs (ALU, LUI/AUIPC, byte/half/word loads and stores,
// forward branches, JAL and JALR). For every retired instruction it checks
// the PC, the register write (index and value) and the clock count since the
// previous retirement: 1, plus 1 for a load or store, plus 1 after a taken
// branch or JAL, plus 2 after a JALR. At the end of each program it compares
// the whole register file and the data region of memory. It counts the
// hazard mechanisms seen (load/store stall, branch annul, bypass use, JALR
// redirect) and fails if any never happened. Programs are loaded into the
// memory array directly while reset is held.
module tb_rv3_pipeline;
  import rv3_tb_pkg::*;

  localparam int WORDS     = 4096;      // default memory size of the pipeline
  localparam int DATA_BASE = 32'h2000;  // data region used by the programs
  localparam int DATA_WDS  = 128;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [31:0] pc_o, retire_pc_o, rf_wdata_o;
  logic        retire_o, rf_we_o, ev_stall_o, ev_annul_o, ev_bypass_o;
  logic [4:0]  rf_waddr_o;

  int checks = 0, failures = 0;
  int n_stall = 0, n_annul = 0, n_bypass = 0, n_jalr = 0, n_retired = 0;
  longint cycle = 0;

  rv3_pipeline dut (
    .clk, .rst, .pc_o, .retire_o, .retire_pc_o, .rf_we_o, .rf_waddr_o,
    .rf_wdata_o, .ev_stall_o, .ev_annul_o, .ev_bypass_o
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [$];
  rv_iss iss;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Load prog at address 0 and run it to its halt (a jump to itself).
  task automatic run_prog(input string name);
    step_t  s, prev;
    bit     first = 1;
    longint last_cycle = 0;
    int     exp_delta;
    int     n = 0;
    logic [4:0]  wq_rd  [$];
    logic [31:0] wq_val [$];

    rst = 1'b1;
    iss = new(WORDS);
    foreach (prog[i]) iss.mem[i] = prog[i];
    for (int i = 0; i < DATA_WDS; i++) iss.mem[DATA_BASE / 4 + i] = $urandom;
    repeat (2) @(posedge clk);
    for (int i = 0; i < WORDS; i++) dut.u_mem.mem[i] = iss.mem[i];
    @(negedge clk);
    rst = 1'b0;
    last_cycle = cycle;
    forever begin
      @(posedge clk);
      if (rf_we_o) begin
        wq_rd.push_back(rf_waddr_o);
        wq_val.push_back(rf_wdata_o);
      end
      if (ev_stall_o)  n_stall++;
      if (ev_annul_o)  n_annul++;
      if (ev_bypass_o) n_bypass++;
      if (retire_o) begin
        s = iss.step();
        n++;
        n_retired++;
        if (s.jalr) n_jalr++;
        check(retire_pc_o == s.pc,
              $sformatf("%s: retired pc %h, expected %h", name, retire_pc_o, s.pc));
        exp_delta = s.ls ? 2 : 1;
        if (first) exp_delta += 1;   // first instruction: fetch and decode clocks
        else if (prev.redirect) exp_delta += 1;
        else if (prev.jalr) exp_delta += 2;
        check(int'(cycle - last_cycle) == exp_delta,
              $sformatf("%s: pc %h retired %0d clocks after previous, expected %0d",
                        name, s.pc, cycle - last_cycle, exp_delta));
        if (s.wr) begin
          check(wq_rd.size() == 1, $sformatf("%s: pc %h: %0d register writes, expected 1",
                                             name, s.pc, wq_rd.size()));
          if (wq_rd.size() > 0) begin
            check(wq_rd[0] == s.rd && wq_val[0] == s.val,
                  $sformatf("%s: pc %h wrote x%0d=%h, expected x%0d=%h", name, s.pc,
                            wq_rd[0], wq_val[0], s.rd, s.val));
          end
        end else begin
          check(wq_rd.size() == 0, $sformatf("%s: pc %h: unexpected register write", name, s.pc));
        end
        wq_rd.delete();
        wq_val.delete();
        last_cycle = cycle;
        first = 0;
        prev = s;
        if (s.halt) break;
      end
    end
    for (int r = 1; r < 32; r++)
      check(dut.u_rf.regs[r] == iss.regs[r],
            $sformatf("%s: final x%0d=%h, expected %h", name, r, dut.u_rf.regs[r], iss.regs[r]));
    for (int i = 0; i < DATA_WDS; i++)
      check(dut.u_mem.mem[DATA_BASE / 4 + i] == iss.mem[DATA_BASE / 4 + i],
            $sformatf("%s: final mem[%h] mismatch", name, DATA_BASE + 4 * i));
    $display("%s: %0d instructions retired", name, n);
  endtask

  // register names used by the example sequences
  localparam int T0 = 5, T1 = 6, T2 = 7, SP = 2, RA = 1;

  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  // destination registers for random code: x1..x15 except x10 (data base)
  function automatic int rreg();
    int r;
    do r = rnd(1, 15); while (r == 10);
    return r;
  endfunction

  task automatic gen_random(input int len);
    int kind, f3, off;
    prog.delete();
    prog.push_back(i_lui(10, DATA_BASE >> 12));
    for (int r = 1; r < 16; r++) if (r != 10) prog.push_back(i_addi(r, 0, rnd(-2048, 2047)));
    while (prog.size() < len) begin
      kind = rnd(0, 15);
      case (kind)
        0, 1, 2: begin
          f3 = rnd(0, 7);
          prog.push_back(enc_r((f3 == 0 || f3 == 5) && rnd(0, 1) ? 7'h20 : 7'h00,
                               rnd(0, 15), rnd(0, 15), 3'(f3), rreg(), 7'b0110011));
        end
        3, 4, 5: begin
          f3 = rnd(0, 7);
          if (f3 == 1) prog.push_back(enc_i(rnd(0, 31), rnd(0, 15), 3'(f3), rreg(), 7'b0010011));
          else if (f3 == 5) prog.push_back(enc_i(rnd(0, 31) | (rnd(0, 1) << 10), rnd(0, 15), 3'(f3), rreg(), 7'b0010011));
          else prog.push_back(enc_i(rnd(-2048, 2047), rnd(0, 15), 3'(f3), rreg(), 7'b0010011));
        end
        6: prog.push_back(enc_u(rnd(0, 32'hfffff), rreg(), rnd(0, 1) ? 7'b0110111 : 7'b0010111));
        7, 8: begin  // load of random size from the data region
          f3 = rnd(0, 5); if (f3 == 3) f3 = 2;
          off = rnd(0, DATA_WDS * 4 - 4) & ~((f3 == 0 || f3 == 4) ? 0 : (f3 == 2 ? 3 : 1));
          prog.push_back(enc_i(off, 10, 3'(f3), rreg(), 7'b0000011));
        end
        9, 10: begin  // store of random size
          f3 = rnd(0, 2);
          off = rnd(0, DATA_WDS * 4 - 4) & ~(f3 == 0 ? 0 : (f3 == 2 ? 3 : 1));
          prog.push_back(enc_s(off, rnd(0, 15), 10, 3'(f3)));
        end
        11, 12: begin  // forward conditional branch
          f3 = rnd(0, 5); if (f3 >= 2) f3 += 2;
          prog.push_back(enc_b(4 * rnd(1, 4), rnd(0, 15), rnd(0, 15), 3'(f3)));
        end
        13: prog.push_back(i_jal(rnd(0, 1) ? 0 : rreg(), 4 * rnd(1, 3)));
        14: begin  // register jump over one instruction, absolute target
          prog.push_back(i_jalr(rnd(0, 1) ? 17 : 0, 0, 4 * (prog.size() + 2)));
          prog.push_back(i_addi(rreg(), 0, 99));           // skipped
        end
        default: begin  // dependent pair: produce and immediately consume
          off = rreg();
          prog.push_back(i_addi(off, rnd(0, 15), rnd(-50, 50)));
          prog.push_back(i_add(rreg(), off, off));
        end
      endcase
    end
    for (int i = 0; i < 5; i++) prog.push_back(i_addi(rreg(), 0, i));  // landing pad
    prog.push_back(i_halt());
  endtask

  initial begin
    // dependent ALU chain
    prog = '{i_addi(T0, 0, 7), i_addi(T1, 0, 5), i_addi(T2, 0, -3),
             i_sub(T1, T1, T2), i_addi(T2, T2, 2), i_andi(T0, T0, 1), i_slt(T2, T2, T0),
             i_halt()};
    run_prog("alu_chain");

    // counted loop: the backward branch is taken twice, then falls through
    prog = '{i_addi(T0, 0, 1), i_addi(T1, 0, 3),
             i_add(T0, T0, T0), i_addi(T1, T1, -1), i_blt(0, T1, -8),
             i_srai(T0, T0, 8), i_sub(T1, T0, T1), i_halt()};
    run_prog("branch_loop");

    // load / modify / store, then two more ALU instructions
    prog = '{i_lui(SP, DATA_BASE >> 12), i_lw(T0, 4, SP), i_addi(T0, T0, 4), i_sw(T0, 4, SP),
             i_addi(T0, T0, -4), i_andi(T2, T2, 7), i_lw(T1, 4, SP), i_halt()};
    run_prog("load_store");

    // call and return
    prog = '{i_addi(T0, 0, 10), i_jal(RA, 12), i_addi(T1, T0, 1), i_halt(),
             i_addi(T0, T0, 5), i_jalr(0, RA, 0)};
    run_prog("call_return");

    for (int k = 0; k < 6; k++) begin
      gen_random(300);
      run_prog($sformatf("random%0d", k));
    end

    $display("events: stalls=%0d annuls=%0d bypasses=%0d jalr=%0d retired=%0d",
             n_stall, n_annul, n_bypass, n_jalr, n_retired);
    check(n_stall > 0, "no load/store stall happened");
    check(n_annul > 0, "no branch annul happened");
    check(n_bypass > 0, "no bypass happened");
    check(n_jalr > 0, "no JALR redirect happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
