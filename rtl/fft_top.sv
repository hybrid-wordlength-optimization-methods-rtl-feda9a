// fft_top: the two wordlength-optimized pipelined FFT processors side by side.
//
// r2_*  : 8192-point R2SDF processor, stage wordlengths
//         {11 12 13 13 14 15 15 16 17 17 18 18 19}, 18-bit I/O.
// r22_* : 4096-point R2^2SDF processor, stage wordlengths
//         {11 12 12 13 14 14 15 16 17 18 18 18}, 18-bit I/O.
// Both share clock and reset and are otherwise independent. Each takes one
// complex sample per cycle in natural order while its in_valid is high and
// returns one per cycle in bit-reversed order, with the frequency index on
// out_bin and a sticky saturation flag on ovf; see r2sdf_fft and r22sdf_fft.
module fft_top (
  input  logic               clk,
  input  logic               rst_n,
  // R2SDF, N = 8192
  input  logic               r2_in_valid,
  input  logic signed [17:0] r2_in_re,
  input  logic signed [17:0] r2_in_im,
  output logic               r2_out_valid,
  output logic signed [17:0] r2_out_re,
  output logic signed [17:0] r2_out_im,
  output logic [12:0]        r2_out_bin,
  output logic               r2_ovf,
  // R2^2SDF, N = 4096
  input  logic               r22_in_valid,
  input  logic signed [17:0] r22_in_re,
  input  logic signed [17:0] r22_in_im,
  output logic               r22_out_valid,
  output logic signed [17:0] r22_out_re,
  output logic signed [17:0] r22_out_im,
  output logic [11:0]        r22_out_bin,
  output logic               r22_ovf
);
  r2sdf_fft u_r2sdf (
    .clk, .rst_n,
    .in_valid(r2_in_valid), .in_re(r2_in_re), .in_im(r2_in_im),
    .out_valid(r2_out_valid), .out_re(r2_out_re), .out_im(r2_out_im),
    .out_bin(r2_out_bin), .ovf(r2_ovf));

  r22sdf_fft u_r22sdf (
    .clk, .rst_n,
    .in_valid(r22_in_valid), .in_re(r22_in_re), .in_im(r22_in_im),
    .out_valid(r22_out_valid), .out_re(r22_out_re), .out_im(r22_out_im),
    .out_bin(r22_out_bin), .ovf(r22_ovf));
endmodule
