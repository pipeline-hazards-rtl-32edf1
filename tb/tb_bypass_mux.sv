// tb_bypass_mux: self-checking test of the bypass multiplexer.
//
// Random source/destination register pairs (biased toward equality) with the
// forward enable on and off; the expected operand is the forwarded value
// exactly when the registers match, the destination is not x0 and forwarding
// is enabled, and the register-file value otherwise.
module tb_bypass_mux;
  import rv3_pkg::*;

  logic     clk = 1'b0;
  reg_idx_t rs, rd_e;
  word_t    rf_data, fwd_data, q;
  logic     fwd_en, hit;
  int       checks = 0, failures = 0, hits = 0;

  bypass_mux dut (.rs, .rf_data, .rd_e, .fwd_en, .fwd_data, .q, .hit);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    for (int i = 0; i < 5000; i++) begin
      rs = 5'($urandom);
      rd_e = ($urandom % 2) ? rs : 5'($urandom);
      if (i % 50 == 0) begin rs = 0; rd_e = 0; end
      fwd_en = $urandom;
      rf_data = $urandom;
      fwd_data = ~rf_data;
      e = fwd_en && rs == rd_e && rd_e != 0;
      #1;
      checks++;
      if (q !== (e ? fwd_data : rf_data) || hit !== e) begin
        failures++;
        if (failures < 10) $display("FAIL rs=%0d rd=%0d en=%b q=%h", rs, rd_e, fwd_en, q);
      end
      if (e) hits++;
    end
    checks++;
    if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
