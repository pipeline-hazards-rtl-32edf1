// tb_unified_mem: self-checking test of the shared memory.
//
// Random word, halfword and byte writes with byte enables, interleaved with
// reads, against a reference array; checks that a read returns the word at
// the addressed word index in the same cycle, that only enabled bytes change
// and that a write becomes visible after its clock edge.
module tb_unified_mem;
  import rv3_pkg::*;

  localparam int WORDS = 256;

  logic       clk = 1'b0, we = 1'b0;
  word_t      addr = '0, wdata = '0, rdata;
  logic [3:0] be = '0;
  word_t      ref_q [WORDS];
  int         checks = 0, failures = 0;

  unified_mem #(.WORDS(WORDS)) dut (.clk, .addr, .we, .be, .wdata, .rdata);

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
    // fill every word through the write port
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      we = 1; be = 4'hf; addr = 32'(4 * i); wdata = $urandom; ref_q[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 4000; k++) begin
      int idx;
      @(negedge clk);
      idx   = $urandom % WORDS;
      addr  = 32'(4 * idx) | 32'($urandom % 4);
      we    = $urandom;
      be    = 4'($urandom);
      wdata = $urandom;
      #1;
      chk(rdata == ref_q[idx], $sformatf("read word %0d", idx));
      @(posedge clk);
      if (we)
        for (int b = 0; b < 4; b++) if (be[b]) ref_q[idx][8*b +: 8] = wdata[8*b +: 8];
      #1;
      chk(rdata == ref_q[idx], $sformatf("read after write word %0d", idx));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
