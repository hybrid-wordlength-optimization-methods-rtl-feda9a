// r22sdf_fft: pipelined radix-2^2 single-path delay-feedback (R2^2SDF) FFT
// processor with an individual wordlength for every PE stage.
//
// N = 2^LOGN points (LOGN even), decimation in frequency. The pipeline is
// LOGN/2 pairs of butterfly stages: a BF2I stage (r2sdf_pe without twiddles,
// feedback memory L/2) and a BF2II stage (r22_bf2ii_pe, feedback memory L/4,
// exact -j rotation, followed by the twiddle multiplier), for local lengths
// L = N, N/4, ..., 4. Each of the LOGN butterfly stages is one PE stage with
// its own wordlength WL[k] and scales by 1/2, so outputs are X(k)/N. Only one
// real multiplier group per pair is needed, against one per stage in R2SDF.
// The default is the 4096-point processor with the optimized set
// {11 12 12 13 14 14 15 16 17 18 18 18} and 18-bit input and output.
// Interface and timing are those of r2sdf_fft: natural-order input, one
// sample per valid cycle, bit-reversed output with its bin index on out_bin,
// first output N - 1 + 2*LOGN + 1 cycles after the first input of a frame,
// sticky `ovf` saturation flag.
module r22sdf_fft
  import fft_pkg::*;
#(
  parameter int unsigned LOGN  = 12,   // log2(N), even, at most MAX_LOGN
  parameter int unsigned W_IN  = 18,
  parameter int unsigned W_OUT = 18,
  parameter int unsigned WL [MAX_LOGN] = '{11, 12, 12, 13, 14, 14, 15, 16, 17, 18, 18, 18, 0}
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

  if (LOGN % 2 != 0) begin : g_bad_logn
    $error("r22sdf_fft: LOGN must be even");
  end

  logic signed [MAX_W-1:0] c_re [LOGN+1];
  logic signed [MAX_W-1:0] c_im [LOGN+1];
  logic [LOGN:0]           c_v;
  logic [LOGN-1:0]         st_sat;

  assign c_v[0]  = in_valid;
  assign c_re[0] = MAX_W'(in_re);
  assign c_im[0] = MAX_W'(in_im);

  for (genvar j = 0; j < LOGN / 2; j++) begin : g_pair
    localparam int unsigned LP  = N >> (2 * j);
    localparam int unsigned K1  = 2 * j;        // BF2I stage index
    localparam int unsigned K2  = 2 * j + 1;    // BF2II stage index
    localparam int unsigned WI1 = (j == 0) ? W_IN : WL[K1 > 0 ? K1 - 1 : 0];
    localparam int unsigned WO1 = WL[K1];
    localparam int unsigned WO2 = WL[K2];
    logic signed [WO1-1:0] o1_re, o1_im;
    logic signed [WO2-1:0] o2_re, o2_im;

    r2sdf_pe #(.L(LP), .WI(WI1), .WO(WO1), .TW(1'b0)) u_bf2i (
      .clk, .rst_n, .in_valid(c_v[K1]),
      .in_re(c_re[K1][WI1-1:0]), .in_im(c_im[K1][WI1-1:0]),
      .out_valid(c_v[K1+1]), .out_re(o1_re), .out_im(o1_im), .out_sat(st_sat[K1]));
    assign c_re[K1+1] = MAX_W'(o1_re);
    assign c_im[K1+1] = MAX_W'(o1_im);

    r22_bf2ii_pe #(.L(LP), .WI(WO1), .WO(WO2)) u_bf2ii (
      .clk, .rst_n, .in_valid(c_v[K2]),
      .in_re(o1_re), .in_im(o1_im),
      .out_valid(c_v[K2+1]), .out_re(o2_re), .out_im(o2_im), .out_sat(st_sat[K2]));
    assign c_re[K2+1] = MAX_W'(o2_re);
    assign c_im[K2+1] = MAX_W'(o2_im);
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
