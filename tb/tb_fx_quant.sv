// tb_fx_quant: checks the requantizer in three configurations against values
// computed with real arithmetic: truncation of 8 fraction bits (19 -> 11
// bits, the first-stage case of the optimized sets), zero extension (12 -> 16
// bits) and saturation of values with integer bits (20 bits with 11 fraction
// bits -> 12 bits).
module tb_fx_quant;
  logic signed [18:0] d1; logic signed [10:0] q1; logic s1;
  logic signed [11:0] d2; logic signed [15:0] q2; logic s2;
  logic signed [19:0] d3; logic signed [11:0] q3; logic s3;

  fx_quant #(.WI(19), .FI(18), .WO(11)) u1 (.d(d1), .q(q1), .sat(s1));
  fx_quant #(.WI(12), .FI(11), .WO(16)) u2 (.d(d2), .q(q2), .sat(s2));
  fx_quant #(.WI(20), .FI(11), .WO(12)) u3 (.d(d3), .q(q3), .sat(s3));

  int checks = 0, failures = 0;
  int n_sat = 0;

  // expected code: floor(v * 2^(wo-1)), clipped; v = d / 2^fi
  function automatic longint expect_q(longint d, int fi, int wo, output bit sat);
    real    v = real'(d) / (2.0 ** fi);
    real    c = $floor(v * (2.0 ** (wo - 1)));
    real    mx = (2.0 ** (wo - 1)) - 1.0;
    real    mn = -(2.0 ** (wo - 1));
    sat = 1'b0;
    if (c > mx) begin c = mx; sat = 1'b1; end
    if (c < mn) begin c = mn; sat = 1'b1; end
    return longint'(c);
  endfunction

  task automatic chk(longint got, bit gsat, longint exp, bit esat, string what);
    checks++;
    if (got != exp || gsat != esat) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d/%b expected %0d/%b", what, got, gsat, exp, esat);
    end
  endtask

  initial begin
    bit es;
    longint e;
    for (int i = 0; i < 2000; i++) begin
      d1 = 19'($urandom);
      d2 = 12'($urandom);
      d3 = 20'($urandom);
      if (i == 0) begin d1 = 19'sh40000; d3 = 20'sh7ffff; end   // most negative / most positive
      #1;
      e = expect_q(longint'(d1), 18, 11, es); chk(longint'(q1), s1, e, es, "truncate");
      e = expect_q(longint'(d2), 11, 16, es); chk(longint'(q2), s2, e, es, "extend");
      e = expect_q(longint'(d3), 11, 12, es); chk(longint'(q3), s3, e, es, "saturate");
      if (s3) n_sat++;
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
