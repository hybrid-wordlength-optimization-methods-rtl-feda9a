// tb_cmult: checks the twiddle multiplier (W = 12) with random data and
// coefficients against real arithmetic, each of the four products rounded
// down to 11 fraction bits before the sums; trivial rotations by +1, -j, -1
// and +j; saturation of out-of-range sums; and its one-clock latency.
module tb_cmult;
  import fft_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               in_valid, triv, q_valid, q_sat;
  rot_e               rot;
  logic signed [11:0] d_re, d_im, w_re, w_im, q_re, q_im;

  cmult #(.W(12)) dut (.*);

  int checks = 0, failures = 0, n_sat = 0, n_triv = 0, n_mul = 0;

  function automatic real fl(real v);
    return $floor(v);
  endfunction

  function automatic longint clip(real c, output bit s);
    s = 1'b0;
    if (c > 2047.0)  begin c = 2047.0;  s = 1'b1; end
    if (c < -2048.0) begin c = -2048.0; s = 1'b1; end
    return longint'(c);
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    longint er, ei;
    bit     sr, si;
    real    a, b, c, d;
    in_valid = 1'b0; triv = 1'b0; rot = ROT_P1;
    d_re = '0; d_im = '0; w_re = '0; w_im = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      d_re = 12'($urandom); d_im = 12'($urandom);
      w_re = 12'($urandom); w_im = 12'($urandom);
      triv = ($urandom_range(3) == 0);
      rot  = rot_e'($urandom_range(3));
      if (i % 50 == 0) begin d_re = -12'sd2048; d_im = -12'sd2048; triv = 1'b1; rot = ROT_M1; end
      a = real'(d_re); b = real'(d_im); c = real'(w_re); d = real'(w_im);
      if (triv) begin
        case (rot)
          ROT_P1:  begin er = clip( a, sr); ei = clip( b, si); end
          ROT_MJ:  begin er = clip( b, sr); ei = clip(-a, si); end
          ROT_M1:  begin er = clip(-a, sr); ei = clip(-b, si); end
          default: begin er = clip(-b, sr); ei = clip( a, si); end
        endcase
        n_triv++;
      end else begin
        er = clip(fl(a * c / 2048.0) - fl(b * d / 2048.0), sr);
        ei = clip(fl(a * d / 2048.0) + fl(b * c / 2048.0), si);
        n_mul++;
      end
      @(negedge clk);
      in_valid = 1'b0;
      chk(q_valid, "q_valid one clock after in_valid");
      chk(longint'(q_re) == er && longint'(q_im) == ei,
          $sformatf("value %0d: got (%0d,%0d) expected (%0d,%0d)", i, q_re, q_im, er, ei));
      chk(q_sat == (sr | si), "saturation flag");
      if (sr | si) n_sat++;
      @(negedge clk);
      chk(!q_valid, "q_valid drops");
    end
    checks++;
    if (n_sat == 0 || n_triv == 0 || n_mul == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
