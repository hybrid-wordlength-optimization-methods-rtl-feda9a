// tb_workloads: runs the processors at the other sizes and I/O widths for
// which optimized stage wordlengths exist, each with its own set, all side by
// side (fft_wl_case). The full-size defaults (8192-point R2SDF, 4096-point
// R2^2SDF) are run by tb_fft_top; the 64-point sets by tb_r2sdf_fft and
// tb_r22sdf_fft. Configurations:
//   18-bit I/O, R2SDF   : N = 8, 256, 1024, 4096
//   18-bit I/O, R2^2SDF : N = 16, 256, 1024
//   18-bit I/O, R2SDF, sets from the faster statistical search: N = 1024, 2048
//   14-bit I/O, R2SDF   : N = 512, 1024;  R2^2SDF : N = 1024
// Each must be bit-exact with the fixed-point model and reach the SQNR floor:
// 44.9 dB for 18-bit I/O (45 dB target). With 14-bit I/O at 1024 points the
// output word alone limits the SQNR to about 45 dB, so those cases use a
// 44.0 dB floor; the measured value is printed.
module tb_workloads;
  localparam int NC = 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NC-1:0] done;
  int            c [NC];
  int            f [NC];

  fft_wl_case #(.LOGN(3),  .W_IO(18), .R22(1'b0), .WL('{11, 11, 12, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0}))
    u_r2_8    (.clk, .rst_n, .done(done[0]),  .checks(c[0]),  .failures(f[0]));
  fft_wl_case #(.LOGN(8),  .W_IO(18), .R22(1'b0), .WL('{11, 12, 13, 13, 14, 14, 15, 15, 0, 0, 0, 0, 0}))
    u_r2_256  (.clk, .rst_n, .done(done[1]),  .checks(c[1]),  .failures(f[1]));
  fft_wl_case #(.LOGN(10), .W_IO(18), .R22(1'b0), .WL('{11, 12, 13, 13, 14, 14, 15, 16, 17, 17, 0, 0, 0}))
    u_r2_1024 (.clk, .rst_n, .done(done[2]),  .checks(c[2]),  .failures(f[2]));
  fft_wl_case #(.LOGN(12), .W_IO(18), .R22(1'b0), .WL('{11, 12, 13, 13, 14, 15, 15, 16, 17, 17, 17, 18, 0}))
    u_r2_4096 (.clk, .rst_n, .done(done[3]),  .checks(c[3]),  .failures(f[3]));
  fft_wl_case #(.LOGN(4),  .W_IO(18), .R22(1'b1), .WL('{11, 11, 12, 13, 0, 0, 0, 0, 0, 0, 0, 0, 0}))
    u_r22_16  (.clk, .rst_n, .done(done[4]),  .checks(c[4]),  .failures(f[4]));
  fft_wl_case #(.LOGN(8),  .W_IO(18), .R22(1'b1), .WL('{11, 12, 12, 13, 13, 14, 15, 16, 0, 0, 0, 0, 0}))
    u_r22_256 (.clk, .rst_n, .done(done[5]),  .checks(c[5]),  .failures(f[5]));
  fft_wl_case #(.LOGN(10), .W_IO(18), .R22(1'b1), .WL('{11, 12, 13, 13, 14, 14, 15, 15, 16, 17, 0, 0, 0}))
    u_r22_1024 (.clk, .rst_n, .done(done[6]), .checks(c[6]),  .failures(f[6]));
  fft_wl_case #(.LOGN(10), .W_IO(18), .R22(1'b0), .WL('{11, 12, 13, 14, 14, 14, 15, 15, 16, 17, 0, 0, 0}))
    u_st_1024 (.clk, .rst_n, .done(done[7]),  .checks(c[7]),  .failures(f[7]));
  fft_wl_case #(.LOGN(11), .W_IO(18), .R22(1'b0), .WL('{11, 12, 13, 13, 14, 15, 15, 15, 16, 17, 18, 0, 0}))
    u_st_2048 (.clk, .rst_n, .done(done[8]),  .checks(c[8]),  .failures(f[8]));
  fft_wl_case #(.LOGN(9),  .W_IO(14), .R22(1'b0), .WL('{12, 12, 13, 14, 14, 15, 15, 16, 17, 0, 0, 0, 0}))
    u_io14_r2_512 (.clk, .rst_n, .done(done[9]),  .checks(c[9]),  .failures(f[9]));
  fft_wl_case #(.LOGN(10), .W_IO(14), .R22(1'b0), .WL('{14, 15, 15, 15, 16, 17, 17, 17, 18, 19, 0, 0, 0}),
                .SQNR_MIN(44.0))
    u_io14_r2_1024 (.clk, .rst_n, .done(done[10]), .checks(c[10]), .failures(f[10]));
  fft_wl_case #(.LOGN(10), .W_IO(14), .R22(1'b1), .WL('{13, 14, 15, 15, 16, 17, 17, 18, 19, 19, 0, 0, 0}),
                .SQNR_MIN(44.0))
    u_io14_r22_1024 (.clk, .rst_n, .done(done[11]), .checks(c[11]), .failures(f[11]));

  function automatic int sum(input int a [NC]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", sum(c), sum(f));
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired, done = %b", done);
    $display("TB_RESULT checks=%0d failures=%0d", sum(c), sum(f) + 1);
    $finish;
  end
endmodule
