// tb_fft_top: end-to-end test of fft_top at its default sizes.
//
// Runs the 8192-point R2SDF processor and the 4096-point R2^2SDF processor
// concurrently through five frames each (see fft_stream_drv): bit-exact
// comparison with the fixed-point models, SQNR of random frames against a
// floating-point FFT (the 45 dB target of the optimized wordlength sets, less
// 0.1 dB of allowed simulation error), latency, rate, input stalls and
// saturation. It also counts how often the first stages use each mechanism:
// storing (mode 1), butterflies (mode 2), trivial twiddles applied exactly,
// ROM twiddle products and the -j rotation of BF2II; each must occur.
module tb_fft_top;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               r2_in_valid, r2_out_valid, r2_ovf;
  logic signed [17:0] r2_in_re, r2_in_im, r2_out_re, r2_out_im;
  logic [12:0]        r2_out_bin;
  logic               r22_in_valid, r22_out_valid, r22_ovf;
  logic signed [17:0] r22_in_re, r22_in_im, r22_out_re, r22_out_im;
  logic [11:0]        r22_out_bin;

  fft_top dut (.*);

  logic d2, d22;
  int   c2, f2, s2, m2, c22, f22, s22, m22;

  fft_stream_drv #(.LOGN(13), .W_IN(18), .W_OUT(18), .R22(1'b0),
                   .WL('{11, 12, 13, 13, 14, 15, 15, 16, 17, 17, 18, 18, 19}),
                   .SQNR_MIN(44.9)) u_drv2 (
    .clk, .rst_n, .in_valid(r2_in_valid), .in_re(r2_in_re), .in_im(r2_in_im),
    .out_valid(r2_out_valid), .out_re(r2_out_re), .out_im(r2_out_im),
    .out_bin(r2_out_bin), .ovf(r2_ovf),
    .done(d2), .checks(c2), .failures(f2), .stalls(s2), .model_sats(m2));

  fft_stream_drv #(.LOGN(12), .W_IN(18), .W_OUT(18), .R22(1'b1),
                   .WL('{11, 12, 12, 13, 14, 14, 15, 16, 17, 18, 18, 18, 0}),
                   .SQNR_MIN(44.9)) u_drv22 (
    .clk, .rst_n, .in_valid(r22_in_valid), .in_re(r22_in_re), .in_im(r22_in_im),
    .out_valid(r22_out_valid), .out_re(r22_out_re), .out_im(r22_out_im),
    .out_bin(r22_out_bin), .ovf(r22_ovf),
    .done(d22), .checks(c22), .failures(f22), .stalls(s22), .model_sats(m22));

  // mechanism counters (first stage of each processor)
  int n_mode1, n_mode2, n_triv, n_rom, n_rotj;
  always @(posedge clk) if (rst_n) begin  // outputs are meaningless until reset is released
    if (dut.u_r2sdf.g_st[0].u_pe.in_valid) begin
      if (dut.u_r2sdf.g_st[0].u_pe.mode2) n_mode2++;
      else                                n_mode1++;
    end
    if (dut.u_r2sdf.g_st[0].u_pe.r_valid) begin
      if (dut.u_r2sdf.g_st[0].u_pe.r_triv) n_triv++;
      else                                 n_rom++;
    end
    if (dut.u_r22sdf.g_pair[0].u_bf2ii.in_valid && dut.u_r22sdf.g_pair[0].u_bf2ii.rotj)
      n_rotj++;
  end

  int checks, failures;
  initial begin
    n_mode1 = 0; n_mode2 = 0; n_triv = 0; n_rom = 0; n_rotj = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d2 && d22);
    checks   = c2 + c22;
    failures = f2 + f22;
    $display("mechanisms: mode1=%0d mode2=%0d trivial-twiddle=%0d rom-twiddle=%0d minus-j=%0d stalls=%0d/%0d saturations(model)=%0d/%0d",
             n_mode1, n_mode2, n_triv, n_rom, n_rotj, s2, s22, m2, m22);
    checks += 5;
    if (n_mode1 == 0) failures++;
    if (n_mode2 == 0) failures++;
    if (n_triv == 0)  failures++;
    if (n_rom == 0)   failures++;
    if (n_rotj == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c22, f2 + f22 + 1);
    $finish;
  end
endmodule
