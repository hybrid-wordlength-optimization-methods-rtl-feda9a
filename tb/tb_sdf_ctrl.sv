// tb_sdf_ctrl: checks the stage control unit (CNT_W = 4, mode bit 3, as in a
// 16-point R2SDF stage): the counter advances only on enabled cycles and
// wraps at 16, mode2 is high for positions 8-15, and primed rises after the
// first enabled mode-2 position and stays high.
module tb_sdf_ctrl;
  logic clk = 1'b0, rst_n = 1'b0, en;
  always #5 clk = ~clk;
  logic [3:0] cnt;
  logic       mode2, primed;

  sdf_ctrl #(.CNT_W(4), .MODE_BIT(3)) dut (.clk, .rst_n, .en, .cnt, .mode2, .primed);

  int checks = 0, failures = 0;
  int n_en = 0;
  bit seen_mode2 = 1'b0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0d", what, n_en);
    end
  endtask

  initial begin
    en = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      chk(cnt == 4'(n_en % 16), "count");
      chk(mode2 == ((n_en % 16) >= 8), "mode");
      chk(primed == seen_mode2, "primed");
      en = ($urandom_range(2) != 0);
      if (en) begin
        if ((n_en % 16) >= 8) seen_mode2 = 1'b1;
        n_en++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
