// tb_r2sdf_pe: checks one R2SDF stage (L = 16, 14-bit input, 12-bit stage
// wordlength) and one BF2I-style stage without twiddles (L = 8, 12 -> 13
// bits). Random frames are streamed with random input gaps; each stage's
// output stream must be, per block of L inputs, the L/2 scaled sums followed
// by the L/2 scaled differences times W_L^n (fixed-point model of
// fft_ref_pkg). Also checked: no output for the first L/2 inputs, and a
// two-clock latency from the first mode-2 input to the first output, and
// no saturation for inputs inside the unit circle.
module tb_r2sdf_pe;
  import fft_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               in_valid;
  logic signed [13:0] in_re, in_im;
  logic               v1, v2, s1, s2;
  logic signed [11:0] o1_re, o1_im;
  logic signed [12:0] o2_re, o2_im;

  r2sdf_pe #(.L(16), .WI(14), .WO(12), .TW(1'b1)) u1 (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(v1), .out_re(o1_re), .out_im(o1_im), .out_sat(s1));
  r2sdf_pe #(.L(8), .WI(12), .WO(13), .TW(1'b0)) u2 (
    .clk, .rst_n, .in_valid(v1), .in_re(o1_re), .in_im(o1_im),
    .out_valid(v2), .out_re(o2_re), .out_im(o2_im), .out_sat(s2));

  localparam int NB = 12;   // blocks of 16
  longint xr [NB*16], xi [NB*16];
  longint e1r [$], e1i [$], e2r [$], e2i [$];
  int checks = 0, failures = 0, n1 = 0, n2 = 0, n_in = 0;
  longint cyc = 0, cyc_first_m2 = -1, cyc_first_out = -1;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // expected stage output for one block
  task automatic stage_model(input longint br[], input longint bi[], input int L, input int fi,
                             input int wo, input bit tw, ref longint qr[$], ref longint qi[$]);
    longint r[], i[];
    int ns = 0;
    r = br; i = bi;
    for (int m = 0; m < L / 2; m++) begin
      bfly(r, i, m, m + L / 2, fi, wo, ns);
      if (tw) twmul(r[m + L / 2], i[m + L / 2], m, L, wo, ns);
    end
    for (int m = 0; m < L; m++) begin qr.push_back(r[m]); qi.push_back(i[m]); end
  endtask

  initial begin
    longint br[], bi[];
    for (int k = 0; k < NB * 16; k++) begin
      xr[k] = longint'($urandom_range(11584)) - 5792;   // |x| < 1/sqrt2
      xi[k] = longint'($urandom_range(11584)) - 5792;
    end
    for (int b = 0; b < NB; b++) begin
      br = new[16]; bi = new[16];
      for (int k = 0; k < 16; k++) begin br[k] = xr[b*16+k]; bi[k] = xi[b*16+k]; end
      stage_model(br, bi, 16, 13, 12, 1'b1, e1r, e1i);
    end
    for (int b = 0; b < e1r.size() / 8; b++) begin
      br = new[8]; bi = new[8];
      for (int k = 0; k < 8; k++) begin br[k] = e1r[b*8+k]; bi[k] = e1i[b*8+k]; end
      stage_model(br, bi, 8, 11, 13, 1'b0, e2r, e2i);
    end
  end

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    in_valid = 1'b0; in_re = '0; in_im = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int k = 0; k < NB * 16; k++) begin
      while (k > 40 && $urandom_range(3) == 0) begin in_valid <= 1'b0; @(posedge clk); end
      in_valid <= 1'b1;
      in_re <= 14'(xr[k]);
      in_im <= 14'(xi[k]);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    chk(n1 == NB * 16 - 8, $sformatf("stage 1 output count %0d", n1));
    chk(n2 == NB * 16 - 8 - 4, $sformatf("stage 2 output count %0d", n2));
    chk(cyc_first_out - cyc_first_m2 == 2, $sformatf("latency %0d", cyc_first_out - cyc_first_m2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin  // outputs are meaningless until reset is released
    if (in_valid && u1.mode2 && cyc_first_m2 < 0) cyc_first_m2 = cyc;
    if (v1) begin
      if (cyc_first_out < 0) cyc_first_out = cyc;
      chk(longint'(o1_re) == e1r[n1] && longint'(o1_im) == e1i[n1],
          $sformatf("stage 1 out %0d: got (%0d,%0d) expected (%0d,%0d)", n1, o1_re, o1_im, e1r[n1], e1i[n1]));
      n1++;
    end
    if (v2) begin
      chk(longint'(o2_re) == e2r[n2] && longint'(o2_im) == e2i[n2],
          $sformatf("stage 2 out %0d", n2));
      n2++;
    end
    chk(!s1 && !s2, "no saturation for in-range data");
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
