// tb_r2sdf_fft: checks the R2SDF processor at reduced size (N = 64, stage
// wordlengths {11 12 13 13 13 14}, 18-bit I/O, the optimized 64-point set of the
// radix-2 processor for a 45 dB target) with fft_stream_drv:
// bit-exact output against the fixed-point model, bin order, SQNR against a
// floating-point FFT, latency N + 2*log2(N), rate, stalls and saturation.
// The floating-point reference itself is checked against a direct DFT.
module tb_r2sdf_fft;
  import fft_ref_pkg::*;
  localparam int LOGN = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               in_valid, out_valid, ovf;
  logic signed [17:0] in_re, in_im, out_re, out_im;
  logic [LOGN-1:0]    out_bin;

  r2sdf_fft #(.LOGN(LOGN), .W_IN(18), .W_OUT(18),
              .WL('{11, 12, 13, 13, 13, 14, 0, 0, 0, 0, 0, 0, 0})) dut (.*);

  logic done;
  int   c, f, s, m;
  fft_stream_drv #(.LOGN(LOGN), .W_IN(18), .W_OUT(18), .R22(1'b0),
                   .WL('{11, 12, 13, 13, 13, 14, 0, 0, 0, 0, 0, 0, 0}),
                   .SQNR_MIN(40.0)) u_drv (
    .clk, .rst_n, .in_valid, .in_re, .in_im, .out_valid, .out_re, .out_im,
    .out_bin, .ovf, .done, .checks(c), .failures(f), .stalls(s), .model_sats(m));

  int checks, failures;
  initial begin
    real xr[], xi[], yr[], yi[], dr, di;
    checks = 0;
    failures = 0;
    // the floating-point reference against a direct DFT
    xr = new[1 << LOGN]; xi = new[1 << LOGN];
    for (int i = 0; i < (1 << LOGN); i++) begin
      xr[i] = real'($urandom_range(2000)) / 1000.0 - 1.0;
      xi[i] = real'($urandom_range(2000)) / 1000.0 - 1.0;
    end
    yr = xr; yi = xi;
    fl_fft(yr, yi, LOGN);
    for (int i = 0; i < (1 << LOGN); i++) begin
      dft_bin(xr, xi, LOGN, int'(bitrev(i, LOGN)), dr, di);
      checks++;
      if ((dr - yr[i]) ** 2 + (di - yi[i]) ** 2 > 1e-20) begin
        failures++;
        $display("FAIL reference FFT position %0d", i);
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    checks += c;
    failures += f;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + c, failures + f + 1);
    $finish;
  end
endmodule
