// tb_r22_bf2ii_pe: checks the BF2II stage with its twiddle multiplier at
// L = 16 (feedback memory 4, 12-bit input, 13-bit stage wordlength) and at
// L = 4 (no non-trivial twiddles). Random frames are streamed with input
// gaps. Per block of L inputs x (the BF2I output: L/2 sums, L/2 differences)
// the expected output is, for h = 0, 1 and n < L/4, with a = x[h*L/2+n],
// b = x[h*L/2+L/4+n] and b multiplied by -j when h = 1:
//   block (h, sum)  : (a+b)/2 * W_L^(n*h)
//   block (h, diff) : (a-b)/2 * W_L^(n*(h+2))
// in the order (0,sum) (0,diff) (1,sum) (1,diff). The -j rotation count and
// the first-output position are checked too.
module tb_r22_bf2ii_pe;
  import fft_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               in_valid;
  logic signed [11:0] in_re, in_im;
  logic               v1, v2, s1, s2;
  logic signed [12:0] o1_re, o1_im;
  logic signed [12:0] o2_re, o2_im;

  r22_bf2ii_pe #(.L(16), .WI(12), .WO(13)) u1 (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(v1), .out_re(o1_re), .out_im(o1_im), .out_sat(s1));
  r22_bf2ii_pe #(.L(4), .WI(12), .WO(13)) u2 (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(v2), .out_re(o2_re), .out_im(o2_im), .out_sat(s2));

  localparam int NB = 10;   // blocks of 16
  longint xr [NB*16], xi [NB*16];
  longint e1r [$], e1i [$], e2r [$], e2i [$];
  int checks = 0, failures = 0, n1 = 0, n2 = 0, n_rot = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic pair_model(input longint br[], input longint bi[], input int L,
                            ref longint qr[$], ref longint qi[$]);
    longint r[], i[];
    int ns = 0;
    r = br; i = bi;
    for (int h = 0; h < 2; h++)
      for (int m = 0; m < L / 4; m++) begin
        int i0 = h * L / 2 + m;
        int i1 = i0 + L / 4;
        if (h == 1) begin
          longint t = r[i1];
          r[i1] = i[i1];
          i[i1] = -t;
        end
        bfly(r, i, i0, i1, 11, 13, ns);
        twmul(r[i0], i[i0], m * h, L, 13, ns);
        twmul(r[i1], i[i1], m * (h + 2), L, 13, ns);
      end
    for (int m = 0; m < L; m++) begin qr.push_back(r[m]); qi.push_back(i[m]); end
  endtask

  initial begin
    longint br[], bi[];
    for (int k = 0; k < NB * 16; k++) begin
      xr[k] = longint'($urandom_range(2896)) - 1448;   // |x| < 1/sqrt2
      xi[k] = longint'($urandom_range(2896)) - 1448;
    end
    for (int b = 0; b < NB; b++) begin
      br = new[16]; bi = new[16];
      for (int k = 0; k < 16; k++) begin br[k] = xr[b*16+k]; bi[k] = xi[b*16+k]; end
      pair_model(br, bi, 16, e1r, e1i);
    end
    for (int b = 0; b < NB * 4; b++) begin
      br = new[4]; bi = new[4];
      for (int k = 0; k < 4; k++) begin br[k] = xr[b*4+k]; bi[k] = xi[b*4+k]; end
      pair_model(br, bi, 4, e2r, e2i);
    end
  end

  initial begin
    in_valid = 1'b0; in_re = '0; in_im = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int k = 0; k < NB * 16; k++) begin
      while ($urandom_range(4) == 0) begin in_valid <= 1'b0; @(posedge clk); end
      in_valid <= 1'b1;
      in_re <= 12'(xr[k]);
      in_im <= 12'(xi[k]);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    chk(n1 == NB * 16 - 4, $sformatf("L=16 output count %0d", n1));
    chk(n2 == NB * 16 - 1, $sformatf("L=4 output count %0d", n2));
    chk(n_rot == NB * 4, $sformatf("-j rotations %0d", n_rot));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin  // outputs are meaningless until reset is released
    if (in_valid && u1.rotj) n_rot++;
    if (v1) begin
      chk(longint'(o1_re) == e1r[n1] && longint'(o1_im) == e1i[n1],
          $sformatf("L=16 out %0d: got (%0d,%0d) expected (%0d,%0d)", n1, o1_re, o1_im, e1r[n1], e1i[n1]));
      n1++;
    end
    if (v2) begin
      chk(longint'(o2_re) == e2r[n2] && longint'(o2_im) == e2i[n2],
          $sformatf("L=4 out %0d: got (%0d,%0d) expected (%0d,%0d)", n2, o2_re, o2_im, e2r[n2], e2i[n2]));
      n2++;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
