// tb_bf2: checks the scaled radix-2 butterfly against real arithmetic:
// s = floor((a+b)/2 * 2^(WO-1)), d = floor((a-b)/2 * 2^(WO-1)), for an
// 18 -> 11 bit stage (wordlength reduction) and a 12 -> 14 bit stage
// (wordlength growth, exact), plus a 13-bit input with one integer bit as in
// BF2II after -j, where +1 must saturate.
module tb_bf2;
  logic signed [17:0] a1r, a1i, b1r, b1i; logic signed [10:0] s1r, s1i, d1r, d1i; logic t1;
  logic signed [11:0] a2r, a2i, b2r, b2i; logic signed [13:0] s2r, s2i, d2r, d2i; logic t2;
  logic signed [12:0] a3r, a3i, b3r, b3i; logic signed [11:0] s3r, s3i, d3r, d3i; logic t3;

  bf2 #(.WI(18), .FI(17), .WO(11)) u1 (.a_re(a1r), .a_im(a1i), .b_re(b1r), .b_im(b1i),
    .s_re(s1r), .s_im(s1i), .d_re(d1r), .d_im(d1i), .sat(t1));
  bf2 #(.WI(12), .FI(11), .WO(14)) u2 (.a_re(a2r), .a_im(a2i), .b_re(b2r), .b_im(b2i),
    .s_re(s2r), .s_im(s2i), .d_re(d2r), .d_im(d2i), .sat(t2));
  bf2 #(.WI(13), .FI(11), .WO(12)) u3 (.a_re(a3r), .a_im(a3i), .b_re(b3r), .b_im(b3i),
    .s_re(s3r), .s_im(s3i), .d_re(d3r), .d_im(d3i), .sat(t3));

  int checks = 0, failures = 0, n_sat = 0;

  function automatic longint ex(longint a, longint b, bit sub, int fi, int wo);
    real v = (sub ? real'(a - b) : real'(a + b)) / 2.0 / (2.0 ** fi);
    real c = $floor(v * (2.0 ** (wo - 1)));
    if (c > (2.0 ** (wo - 1)) - 1.0) c = (2.0 ** (wo - 1)) - 1.0;
    if (c < -(2.0 ** (wo - 1)))      c = -(2.0 ** (wo - 1));
    return longint'(c);
  endfunction

  task automatic chk(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      {a1r, a1i, b1r, b1i} = {$urandom, $urandom, $urandom};
      {a2r, a2i, b2r, b2i} = {$urandom, $urandom};
      a3r = 13'($signed(12'($urandom))); a3i = 13'($signed(12'($urandom)));
      b3r = 13'($signed(12'($urandom))); b3i = 13'($signed(12'($urandom)));
      if (i % 7 == 0) begin a3r = 13'sd2048; b3r = 13'sd2048; end   // +1 + +1
      #1;
      chk(s1r, ex(a1r, b1r, 0, 17, 11), "s1r"); chk(s1i, ex(a1i, b1i, 0, 17, 11), "s1i");
      chk(d1r, ex(a1r, b1r, 1, 17, 11), "d1r"); chk(d1i, ex(a1i, b1i, 1, 17, 11), "d1i");
      chk(s2r, ex(a2r, b2r, 0, 11, 14), "s2r"); chk(s2i, ex(a2i, b2i, 0, 11, 14), "s2i");
      chk(d2r, ex(a2r, b2r, 1, 11, 14), "d2r"); chk(d2i, ex(a2i, b2i, 1, 11, 14), "d2i");
      chk(s3r, ex(a3r, b3r, 0, 11, 12), "s3r"); chk(s3i, ex(a3i, b3i, 0, 11, 12), "s3i");
      chk(d3r, ex(a3r, b3r, 1, 11, 12), "d3r"); chk(d3i, ex(a3i, b3i, 1, 11, 12), "d3i");
      checks++;
      if (t1 || t2) failures++;   // in-range inputs never saturate
      if (t3) n_sat++;
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
