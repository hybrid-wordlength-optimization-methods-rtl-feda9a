// r2sdf_fft: pipelined radix-2 single-path delay-feedback (R2SDF) FFT
// processor with an individual wordlength for every PE stage.
//
// N = 2^LOGN points, decimation in frequency, LOGN r2sdf_pe stages of local
// lengths N, N/2, ..., 2 in a row. Every butterfly scales by 1/2, so the
// outputs are X(k)/N for inputs inside the unit circle. Stage k works at
// WL[k] bits: it truncates the butterfly results and the twiddle products to
// WL[k] bits, holds WL[k]-bit twiddle factors and a feedback memory of
// N/2^(k+1) words. The default is the 8192-point processor with the
// optimized set {11 12 13 13 14 15 15 16 17 17 18 18 19} and 18-bit input
// and output (45 dB SQNR target); a uniform wordlength (e.g. all 17) gives
// the conventional design.
// Interface: one complex input sample per cycle with in_valid high (gaps
// stall the pipeline; samples are taken in natural order, frame after frame).
// Outputs come in bit-reversed order, one per valid cycle, with out_bin the
// frequency index of the sample. The final WL[LOGN-1] -> W_OUT requantizer
// truncates. `ovf` is a sticky flag, cleared by reset, set when any stage
// saturated a result.
// Timing: with a gapless input the first output of a frame appears
// N - 1 + 2*LOGN + 1 cycles after its first input sample; the last samples of
// a frame leave when the next frame (or any N/2 further samples) is fed in.
module r2sdf_fft
  import fft_pkg::*;
#(
  parameter int unsigned LOGN  = 13,   // log2(N), at most MAX_LOGN
  parameter int unsigned W_IN  = 18,
  parameter int unsigned W_OUT = 18,
  parameter int unsigned WL [MAX_LOGN] = '{11, 12, 13, 13, 14, 15, 15, 16, 17, 17, 18, 18, 19}
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [W_IN-1:0]  in_re,
  input  logic signed [W_IN-1:0]  in_im,
  output logic                    out_valid,
  output logic signed [W_OUT-1:0] out_re,
  output logic signed [W_OUT-1:0] out_im,
  output logic [LOGN-1:0]         out_bin,
  output logic                    ovf
);
  localparam int unsigned N = 1 << LOGN;

  logic signed [MAX_W-1:0] c_re [LOGN+1];
  logic signed [MAX_W-1:0] c_im [LOGN+1];
  logic [LOGN:0]           c_v;
  logic [LOGN-1:0]         st_sat;

  assign c_v[0]  = in_valid;
  assign c_re[0] = MAX_W'(in_re);
  assign c_im[0] = MAX_W'(in_im);

  for (genvar k = 0; k < LOGN; k++) begin : g_st
    localparam int unsigned WI = (k == 0) ? W_IN : WL[k-1];
    localparam int unsigned WO = WL[k];
    logic signed [WO-1:0] o_re, o_im;
    r2sdf_pe #(.L(N >> k), .WI(WI), .WO(WO), .TW(1'b1)) u_pe (
      .clk, .rst_n, .in_valid(c_v[k]),
      .in_re(c_re[k][WI-1:0]), .in_im(c_im[k][WI-1:0]),
      .out_valid(c_v[k+1]), .out_re(o_re), .out_im(o_im), .out_sat(st_sat[k]));
    assign c_re[k+1] = MAX_W'(o_re);
    assign c_im[k+1] = MAX_W'(o_im);
  end

  // ---------------- output requantizer and bin index ----------------
  localparam int unsigned WLAST = WL[LOGN-1];
  logic signed [W_OUT-1:0] q_re, q_im;
  logic                    q_sat_re, q_sat_im;
  logic [LOGN-1:0]         ocnt;

  fx_quant #(.WI(WLAST), .FI(WLAST - 1), .WO(W_OUT)) u_oqr (
    .d(c_re[LOGN][WLAST-1:0]), .q(q_re), .sat(q_sat_re));
  fx_quant #(.WI(WLAST), .FI(WLAST - 1), .WO(W_OUT)) u_oqi (
    .d(c_im[LOGN][WLAST-1:0]), .q(q_im), .sat(q_sat_im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      out_bin   <= '0;
      ocnt      <= '0;
      ovf       <= 1'b0;
    end else begin
      out_valid <= c_v[LOGN];
      if (c_v[LOGN]) begin
        out_re <= q_re;
        out_im <= q_im;
        for (int b = 0; b < LOGN; b++) out_bin[b] <= ocnt[LOGN-1-b];
        ocnt <= ocnt + 1'b1;
      end
      if (|st_sat || (c_v[LOGN] && (q_sat_re || q_sat_im))) ovf <= 1'b1;
    end
  end
endmodule
