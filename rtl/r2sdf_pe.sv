// r2sdf_pe: one process element (PE stage) of a radix-2 single-path
// delay-feedback (R2SDF) FFT pipeline; with TW = 0 it is the BF2I stage of a
// radix-2^2 pipeline.
//
// The stage performs one decimation-in-frequency radix-2 step of local length
// L on a stream of one complex sample per valid cycle, using a feedback
// memory of D = L/2 words:
//   mode 1 (first half of each L-sample block): the incoming sample is stored;
//           the difference stored during the previous block leaves the memory,
//           is multiplied by W_L^n (n = position in the half block) and sent on.
//   mode 2 (second half): the butterfly combines the stored sample x(n) with
//           the incoming x(n+D); (x(n)+x(n+D))/2 is sent on at once and
//           (x(n)-x(n+D))/2 goes into the memory.
// The output stream of a block is thus the D sums followed by the D twiddled
// differences, the input order of the next stage of half the length.
// Data: input WI bits, output WO bits (the stage wordlength), both signed
// fractions; the butterfly truncates to WO. The memory is max(WI, WO) bits
// wide so it holds both the incoming samples and the differences exactly.
// Timing: an output follows its butterfly input by two clocks (a result
// register with the twiddle ROM read, then the multiplier register). The
// first D inputs after reset produce no output; afterwards each valid input
// produces exactly one valid output. Gaps in in_valid stall the stage.
// Twiddles +1 and -j are applied without the multiplier's rounding.
module r2sdf_pe
  import fft_pkg::*;
#(
  parameter int unsigned L  = 8192,  // local transform length (power of 2, >= 2)
  parameter int unsigned WI = 18,    // input wordlength
  parameter int unsigned WO = 11,    // stage wordlength
  parameter bit          TW = 1'b1   // 1: multiply by W_L^n, 0: no twiddles (BF2I)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [WI-1:0] in_re,
  input  logic signed [WI-1:0] in_im,
  output logic                 out_valid,
  output logic signed [WO-1:0] out_re,
  output logic signed [WO-1:0] out_im,
  output logic                 out_sat
);
  localparam int unsigned D    = L / 2;
  localparam int unsigned LOGL = $clog2(L);
  localparam int unsigned EW   = (D > 1) ? $clog2(D) : 1;
  localparam int unsigned WB   = imax(WI, WO);
  localparam bit          MULT = TW && (L >= 8);   // any non-trivial twiddle
  localparam int unsigned RD   = MULT ? D : 1;     // ROM depth
  localparam int unsigned RAW  = (RD > 1) ? $clog2(RD) : 1;
  localparam int unsigned Q    = (L >= 4) ? L / 4 : 1;

  // ---------------- control ----------------
  logic [LOGL-1:0] cnt;
  logic            mode2, primed;
  sdf_ctrl #(.CNT_W(LOGL), .MODE_BIT(LOGL - 1)) u_ctrl (
    .clk, .rst_n, .en(in_valid), .cnt, .mode2, .primed);

  // ---------------- feedback memory and butterfly ----------------
  logic signed [WB-1:0] fb_re, fb_im, b_re, b_im, dd_re, dd_im;
  logic signed [WO-1:0] s_re, s_im, d_re, d_im, f_re, f_im;
  logic                 bf_sat, fq_sat_re, fq_sat_im;
  logic [2*WB-1:0]      mem_din, mem_dout;

  assign b_re = WB'(in_re) <<< (WB - WI);
  assign b_im = WB'(in_im) <<< (WB - WI);
  assign {fb_re, fb_im} = mem_dout;

  bf2 #(.WI(WB), .FI(WB - 1), .WO(WO)) u_bf (
    .a_re(fb_re), .a_im(fb_im), .b_re(b_re), .b_im(b_im),
    .s_re, .s_im, .d_re, .d_im, .sat(bf_sat));

  assign dd_re   = WB'(d_re) <<< (WB - WO);
  assign dd_im   = WB'(d_im) <<< (WB - WO);
  assign mem_din = mode2 ? {dd_re, dd_im} : {b_re, b_im};

  sdf_buffer #(.DEPTH(D), .W(2 * WB)) u_mem (
    .clk, .rst_n, .en(in_valid), .din(mem_din), .dout(mem_dout));

  // stored differences hold WO significant bits: this requantization is exact
  fx_quant #(.WI(WB), .FI(WB - 1), .WO(WO)) u_fqr (.d(fb_re), .q(f_re), .sat(fq_sat_re));
  fx_quant #(.WI(WB), .FI(WB - 1), .WO(WO)) u_fqi (.d(fb_im), .q(f_im), .sat(fq_sat_im));

  // ---------------- twiddle selection ----------------
  logic [EW-1:0] e;        // exponent of W_L
  logic          triv;
  rot_e          rot;
  logic          v1;

  always_comb begin
    e    = '0;
    triv = 1'b1;
    rot  = ROT_P1;
    if (TW && L >= 4 && !mode2) begin
      e    = cnt[EW-1:0];
      triv = ((32'(e) % Q) == 0);                     // e = 0 or e = L/4
      rot  = (e >= EW'(Q)) ? ROT_MJ : ROT_P1;     // W_L^(L/4) = -j
    end
  end

  assign v1 = in_valid && (mode2 || primed);

  // ---------------- result register + ROM read ----------------
  logic                 r_valid, r_triv, r_sat;
  rot_e                 r_rot;
  logic signed [WO-1:0] r_re, r_im, w_re, w_im;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_valid <= 1'b0;
      r_triv  <= 1'b1;
      r_rot   <= ROT_P1;
      r_re    <= '0;
      r_im    <= '0;
      r_sat   <= 1'b0;
    end else begin
      r_valid <= v1;
      if (v1) begin
        r_triv <= triv;
        r_rot  <= rot;
        r_re   <= mode2 ? s_re : f_re;
        r_im   <= mode2 ? s_im : f_im;
        r_sat  <= mode2 ? bf_sat : (fq_sat_re | fq_sat_im);
      end
    end
  end

  if (MULT) begin : g_rom
    twiddle_rom #(.L(L), .DEPTH(RD), .W(WO)) u_rom (
      .clk, .en(v1), .addr(RAW'(e)), .w_re, .w_im);
  end else begin : g_norom
    assign w_re = '0;
    assign w_im = '0;
  end

  logic m_sat, m_sat_d;
  cmult #(.W(WO)) u_mul (
    .clk, .rst_n, .in_valid(r_valid), .d_re(r_re), .d_im(r_im),
    .triv(r_triv), .rot(r_rot), .w_re, .w_im,
    .q_valid(out_valid), .q_re(out_re), .q_im(out_im), .q_sat(m_sat));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       m_sat_d <= 1'b0;
    else if (r_valid) m_sat_d <= r_sat;
  end
  assign out_sat = m_sat | m_sat_d;
endmodule
