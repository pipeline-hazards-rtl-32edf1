// tb_rv3_tables: clock-by-clock stage occupancy of the pipeline.
//
// Runs three short sequences and checks, every clock, which instruction the
// Fetch PC points to, which valid instruction sits in Decode and in Execute
// (or that the slot is empty/annulled), and whether the shared memory is
// serving a data access. The expected tables are written out by hand from
// the pipeline's timing rules:
//   * an independent ALU sequence flows one stage per clock;
//   * a taken branch in Decode redirects the Fetch PC at once and the
//     instruction behind it reaches Execute as an annulled slot;
//   * a load or store freezes the PC and both pipeline registers for its
//     first Execute clock, in which the memory serves the data access.
module tb_rv3_tables;
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
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int T0 = 5, T1 = 6, T2 = 7, SP = 2;

  // f/d/e: instruction index (word address) in Fetch, Decode, Execute; -1 = empty
  // m: 1 when the memory serves a data access in that clock
  task automatic run_table(input string name, input logic [31:0] prog [],
                           input int f [], input int d [], input int e [], input bit m []);
    rst = 1'b1;
    for (int i = 0; i < 4096; i++) dut.u_mem.mem[i] = (i < prog.size()) ? prog[i] : i_halt();
    repeat (2) @(negedge clk);
    rst = 1'b0;
    foreach (f[k]) begin
      #1;
      checks += 4;
      if (pc_o != 32'(4 * f[k])) begin
        failures++; $display("%s clock %0d: Fetch pc %h, expected %h", name, k, pc_o, 4 * f[k]);
      end
      if ((d[k] < 0) ? dut.valid_d : (!dut.valid_d || dut.pc_d != 32'(4 * d[k]))) begin
        failures++; $display("%s clock %0d: Decode valid=%b pc=%h, expected %0d", name, k, dut.valid_d, dut.pc_d, d[k]);
      end
      if ((e[k] < 0) ? dut.valid_e : (!dut.valid_e || dut.pc_e != 32'(4 * e[k]))) begin
        failures++; $display("%s clock %0d: Execute valid=%b pc=%h, expected %0d", name, k, dut.valid_e, dut.pc_e, e[k]);
      end
      if (ev_stall_o != m[k]) begin
        failures++; $display("%s clock %0d: data access %b, expected %b", name, k, ev_stall_o, m[k]);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    // sub t1,t1,t2 / addi t2,t2,2 / andi t0,t0,1 / slt t2,t2,t0
    run_table("alu_sequence",
      '{i_sub(T1, T1, T2), i_addi(T2, T2, 2), i_andi(T0, T0, 1), i_slt(T2, T2, T0), i_halt()},
      '{0, 1, 2, 3, 4}, '{-1, 0, 1, 2, 3}, '{-1, -1, 0, 1, 2}, '{0, 0, 0, 0, 0});

    // loop: add t0,t0,t0 / addi t1,t1,-1 / blt t1,x0,loop / srai t0,t0,8 / sub t1,t0,t1
    // t1 starts at 0, so the branch is taken on every pass
    run_table("taken_branch",
      '{i_add(T0, T0, T0), i_addi(T1, T1, -1), i_blt(T1, 0, -8), i_srai(T0, T0, 8),
        i_sub(T1, T0, T1)},
      '{0, 1, 2, 3, 0, 1, 2, 3, 0}, '{-1, 0, 1, 2, -1, 0, 1, 2, -1}, '{-1, -1, 0, 1, 2, -1, 0, 1, 2},
      '{0, 0, 0, 0, 0, 0, 0, 0, 0});

    // lui sp / lw t0,4(sp) / addi t0,t0,4 / sw t0,4(sp) / addi t0,t0,-4 / andi t2,t2,7
    run_table("load_store",
      '{i_lui(SP, 2), i_lw(T0, 4, SP), i_addi(T0, T0, 4), i_sw(T0, 4, SP), i_addi(T0, T0, -4),
        i_andi(T2, T2, 7), i_halt()},
      '{0, 1, 2, 3, 3, 4, 5, 5, 6, 7},
      '{-1, 0, 1, 2, 2, 3, 4, 4, 5, 6},
      '{-1, -1, 0, 1, 1, 2, 3, 3, 4, 5},
      '{0, 0, 0, 1, 0, 0, 1, 0, 0, 0});
    checks++;
    if (dut.u_mem.mem[(32'h2000 + 4) / 4] != dut.u_rf.regs[T0] + 4) begin
      failures++; $display("stored value wrong");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
