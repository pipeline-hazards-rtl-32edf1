// tb_rv3_mix: instruction-mix throughput workload for the pipeline.
//
// Builds a straight-line program of 100 instructions with the mix used to
// estimate real pipeline speed: 10 conditional branches of which 8 are taken
// (each to the following instruction, so the taken-branch penalty is paid
// without skipping code) and 2 are not, 15 loads/stores, and 75 ALU
// instructions, shuffled randomly. With one clock per instruction, two per
// load/store and two per taken branch, the 100 instructions must retire in
// 10*(0.8*2 + 0.2*1) + 15*2 + 75*1 = 123 clocks, measured from the
// retirement of a preceding setup instruction to that of the 100th. At a
// clock three times faster than an unpipelined single-cycle machine that
// needs 100 clocks, this is a speed-up of 300/123 = 2.44. Register results are
// also compared with the instruction-set model.
module tb_rv3_mix;
  import rv3_tb_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [31:0] pc_o, retire_pc_o, rf_wdata_o;
  logic        retire_o, rf_we_o, ev_stall_o, ev_annul_o, ev_bypass_o;
  logic [4:0]  rf_waddr_o;
  int          checks = 0, failures = 0;

  rv3_pipeline dut (
    .clk, .rst, .pc_o, .retire_o, .retire_pc_o, .rf_we_o, .rf_waddr_o,
    .rf_wdata_o, .ev_stall_o, .ev_annul_o, .ev_bypass_o
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] body [$];
    logic [31:0] prog [$];
    int          kinds [$];
    rv_iss       iss;
    step_t       s;
    longint      cyc = 0, t0 = 0, t100 = 0;
    int          retired = 0, stalls = 0, annuls = 0;
    int          r;

    for (int i = 0; i < 75; i++) kinds.push_back(0);
    for (int i = 0; i < 15; i++) kinds.push_back(1);
    for (int i = 0; i < 8; i++)  kinds.push_back(2);
    for (int i = 0; i < 2; i++)  kinds.push_back(3);
    kinds.shuffle();
    foreach (kinds[i]) begin
      r = 5 + int'($urandom % 5);
      case (kinds[i])
        0: body.push_back(($urandom % 2) ? i_addi(r, r - 1, int'($urandom % 100))
                                         : i_add(r, 5 + int'($urandom % 5), 5 + int'($urandom % 5)));
        1: body.push_back(($urandom % 2) ? i_lw(r, 4 * int'($urandom % 16), 10)
                                         : i_sw(r, 4 * int'($urandom % 16), 10));
        2: body.push_back(enc_b(4, 0, 0, 3'd0));   // beq x0, x0, next: always taken
        default: body.push_back(enc_b(4, 0, 0, 3'd1)); // bne x0, x0: never taken
      endcase
    end
    prog.push_back(i_lui(10, 2));       // setup, also the timing reference
    foreach (body[i]) prog.push_back(body[i]);
    prog.push_back(i_halt());

    iss = new(4096);
    foreach (prog[i]) iss.mem[i] = prog[i];
    for (int i = 0; i < 4096; i++) dut.u_mem.mem[i] = iss.mem[i];
    repeat (2) @(negedge clk);
    rst = 1'b0;
    while (retired < 101) begin
      @(posedge clk);
      cyc++;
      if (ev_stall_o) stalls++;
      if (ev_annul_o) annuls++;
      if (retire_o) begin
        s = iss.step();
        chk(retire_pc_o == s.pc, "retire order");
        if (retired == 0) t0 = cyc;
        retired++;
        if (retired == 101) t100 = cyc;
      end
    end
    @(negedge clk);
    for (int i = 1; i < 32; i++) chk(dut.u_rf.regs[i] == iss.regs[i], $sformatf("x%0d", i));
    $display("100 instructions (10 branches, 8 taken; 15 loads/stores; 75 ALU) in %0d clocks",
             t100 - t0);
    chk(t100 - t0 == 123, "mix must take 123 clocks");
    chk(stalls >= 15, "one stall clock per load/store");
    chk(annuls >= 8, "one annul per taken branch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
