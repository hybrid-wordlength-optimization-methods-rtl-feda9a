// tb_twiddle_rom: reads every entry of a 64-point ROM with 48 entries of
// 12 bits and of a 16-point ROM with 4 entries of 9 bits and compares them
// with cos(2*pi*e/L) and -sin(2*pi*e/L) rounded to nearest (ties away from
// zero) and clipped at 1 - 2^-(W-1). Data appear one clock after the address;
// with en low the output holds.
module tb_twiddle_rom;
  logic clk = 1'b0, en;
  always #5 clk = ~clk;
  logic [5:0]         a1;
  logic [1:0]         a2;
  logic signed [11:0] r1, i1;
  logic signed [8:0]  r2, i2;

  twiddle_rom #(.L(64), .DEPTH(48), .W(12)) u1 (.clk, .en, .addr(a1), .w_re(r1), .w_im(i1));
  twiddle_rom #(.L(16), .DEPTH(4),  .W(9))  u2 (.clk, .en, .addr(a2), .w_re(r2), .w_im(i2));

  int checks = 0, failures = 0;

  function automatic longint ref_q(real v, int w);
    real s = v * (2.0 ** (w - 1));
    longint r = (s >= 0.0) ? longint'($floor(s + 0.5)) : -longint'($floor(-s + 0.5));
    if (r > (64'sd1 <<< (w - 1)) - 1) r = (64'sd1 <<< (w - 1)) - 1;
    return r;
  endfunction

  task automatic chk(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    real pi = 3.14159265358979323846;
    en = 1'b1;
    for (int e = 0; e < 48; e++) begin
      @(negedge clk);
      a1 = 6'(e);
      a2 = 2'(e % 4);
      @(negedge clk);
      chk(r1, ref_q($cos(2.0 * pi * e / 64.0), 12), $sformatf("re[%0d]", e));
      chk(i1, ref_q(-$sin(2.0 * pi * e / 64.0), 12), $sformatf("im[%0d]", e));
      chk(r2, ref_q($cos(2.0 * pi * (e % 4) / 16.0), 9), "re16");
      chk(i2, ref_q(-$sin(2.0 * pi * (e % 4) / 16.0), 9), "im16");
    end
    // hold with en low
    @(negedge clk); a1 = 6'd8; en = 1'b1;
    @(negedge clk); en = 1'b0; a1 = 6'd16;
    @(negedge clk);
    chk(r1, ref_q($cos(2.0 * pi * 8 / 64.0), 12), "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
