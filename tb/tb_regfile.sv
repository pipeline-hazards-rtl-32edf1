// tb_regfile: self-checking test of the register file.
//
// Performs random writes and reads against a reference array kept here,
// checks that x0 stays zero, that reset clears every register, that a write
// is visible on both read ports in the cycle after the write edge (the
// Decode stage reading what Execute wrote) and not before it.
module tb_regfile;
  import rv3_pkg::*;

  logic     clk = 1'b0, rst = 1'b1, we = 1'b0;
  reg_idx_t ra = '0, rb = '0, wa = '0;
  word_t    da, db, din = '0;
  word_t    ref_q [32];
  int       checks = 0, failures = 0;

  regfile dut (.clk, .rst, .ra, .rb, .da, .db, .we, .wa, .din);

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
    foreach (ref_q[i]) ref_q[i] = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); rb = 5'(31 - i); #1;
      chk(da == 0 && db == 0, "reset clears");
    end
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      we  = ($urandom % 4) != 0;
      wa  = 5'($urandom);
      din = $urandom;
      ra  = wa;
      rb  = 5'($urandom);
      #1;
      chk(da == ref_q[ra], "old value before write edge");
      @(posedge clk);
      if (we && wa != 0) ref_q[wa] = din;
      #1;
      chk(da == ref_q[ra] && db == ref_q[rb], $sformatf("read after write x%0d", wa));
      chk(ref_q[0] == 0 && (ra != 0 || da == 0), "x0 stays zero");
    end
    // reset in the middle clears everything
    @(negedge clk); rst = 1'b1; we = 1'b0; @(negedge clk); rst = 1'b0;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); #1; chk(da == 0, "second reset clears");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
