// tb_stall_fsm: self-checking test of the NoStall machine.
//
// Drives random load/store indications and compares NoStall each clock with
// a reference that applies the rule directly: NoStall drops for exactly one
// clock after a clock in which a load/store is seen with NoStall high, and
// is high after reset. Also checks back-to-back loads/stores: each one costs
// exactly one stall clock, so N consecutive memory instructions give N low
// clocks in 2N.
module tb_stall_fsm;

  logic clk = 1'b0, rst = 1'b1, ls = 1'b0, nostall;
  logic exp_ns;
  int   checks = 0, failures = 0, lows = 0;

  stall_fsm dut (.clk, .rst, .ls, .nostall);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    exp_ns = 1'b1;
    chk(nostall == 1'b1, "high after reset");
    for (int i = 0; i < 5000; i++) begin
      ls = $urandom;
      @(posedge clk);
      exp_ns = (ls && exp_ns) ? 1'b0 : 1'b1;
      @(negedge clk);
      chk(nostall == exp_ns, $sformatf("cycle %0d", i));
    end
    // a load/store held in place while the pipeline is frozen: 10 memory
    // instructions in a row, each presented until NoStall has gone low once
    ls = 1'b0; @(negedge clk); lows = 0;
    for (int k = 0; k < 20; k++) begin
      ls = 1'b1;
      @(negedge clk);
      if (!nostall) lows++;
    end
    chk(lows == 10, $sformatf("%0d stall clocks for 10 back-to-back memory ops", lows));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
