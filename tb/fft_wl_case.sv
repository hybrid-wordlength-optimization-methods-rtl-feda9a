// fft_wl_case: one processor configuration under test, for running a list of
// configurations side by side. It builds an R2SDF (R22 = 0) or R2^2SDF
// (R22 = 1) processor with the given size, I/O width and stage wordlengths,
// and drives and checks it with fft_stream_drv (bit-exact output, bin order,
// latency, rate, stalls, saturation flag and an SQNR floor of SQNR_MIN dB).
// `done` rises when the configuration has been checked; `checks` and
// `failures` are the harness counts.
module fft_wl_case
  import fft_pkg::*;
#(
  parameter int unsigned LOGN  = 6,
  parameter int unsigned W_IO  = 18,
  parameter bit          R22   = 1'b0,
  parameter int unsigned WL [MAX_LOGN] = '{11, 12, 13, 13, 13, 14, 0, 0, 0, 0, 0, 0, 0},
  parameter real         SQNR_MIN = 44.9
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  logic                 in_valid, out_valid, ovf;
  logic signed [W_IO-1:0] in_re, in_im, out_re, out_im;
  logic [LOGN-1:0]      out_bin;
  int                   stalls, model_sats;

  if (R22) begin : g_r22
    r22sdf_fft #(.LOGN(LOGN), .W_IN(W_IO), .W_OUT(W_IO), .WL(WL)) dut (.*);
  end else begin : g_r2
    r2sdf_fft #(.LOGN(LOGN), .W_IN(W_IO), .W_OUT(W_IO), .WL(WL)) dut (.*);
  end

  fft_stream_drv #(.LOGN(LOGN), .W_IN(W_IO), .W_OUT(W_IO), .R22(R22), .WL(WL),
                   .SQNR_MIN(SQNR_MIN)) u_drv (
    .clk, .rst_n, .in_valid, .in_re, .in_im, .out_valid, .out_re, .out_im,
    .out_bin, .ovf, .done, .checks, .failures, .stalls, .model_sats);
endmodule
