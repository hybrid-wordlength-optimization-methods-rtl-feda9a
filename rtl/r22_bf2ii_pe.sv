// r22_bf2ii_pe: second butterfly stage (BF2II) of a radix-2^2 single-path
// delay-feedback (R2^2SDF) FFT pipeline, with the twiddle multiplier that
// follows each BF2I/BF2II pair.
//
// L is the local length of the pair (a power of 4); this stage sees the BF2I
// output stream, which per L-sample block is the L/2 sums (k1 = 0) followed
// by the L/2 differences (k1 = 1). It applies a radix-2 step of length L/2
// with a feedback memory of D = L/4 words, in the same two modes as an R2SDF
// stage. In the last quarter of a block (second half of the k1 = 1 part) the
// incoming sample is first multiplied by -j, exactly, by swapping and
// negating its parts: the trivial multiplication that turns the two radix-2
// steps into one radix-4 step. The four output blocks of length D carry the
// frequency groups k1 + 2*k2 = 0, 2, 1, 3 and are multiplied by
// W_L^(n*(k1+2*k2)), n = position in the block; factors that are multiples of
// W_L^(L/4) are applied as exact rotations, the rest through the twiddle ROM
// and the four-multiplier complex product. With L = 4 all factors are 1.
// Data: input WI bits, output WO bits (the stage wordlength); the multiplier
// and its coefficients use WO bits. Timing as r2sdf_pe: the first D inputs
// give no output, then one output per valid input, two clocks later.
module r22_bf2ii_pe
  import fft_pkg::*;
#(
  parameter int unsigned L  = 4096,  // local length of the BF2I/BF2II pair (power of 4, >= 4)
  parameter int unsigned WI = 11,    // input wordlength
  parameter int unsigned WO = 12     // stage wordlength
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
  localparam int unsigned D    = L / 4;
  localparam int unsigned LOGL = $clog2(L);
  localparam int unsigned NW   = (D > 1) ? $clog2(D) : 1;  // width of n
  localparam int unsigned EW   = NW + 2;                   // width of e = n*k0 < 3D
  localparam int unsigned WB   = imax(WI, WO);
  localparam bit          MULT = (L >= 16);
  localparam int unsigned RD   = MULT ? 3 * D - 2 : 1;     // e = 0 .. 3(D-1)
  localparam int unsigned RAW  = (RD > 1) ? $clog2(RD) : 1;

  // ---------------- control ----------------
  logic [LOGL-1:0] cnt;
  logic            mode2, primed, hi;
  sdf_ctrl #(.CNT_W(LOGL), .MODE_BIT(LOGL - 2)) u_ctrl (
    .clk, .rst_n, .en(in_valid), .cnt, .mode2, .primed);
  assign hi = cnt[LOGL-1];

  // ---------------- feedback memory, -j and butterfly ----------------
  logic signed [WB-1:0] fb_re, fb_im, x_re, x_im, dd_re, dd_im;
  logic signed [WB:0]   a_re, a_im, b_re, b_im;   // WB-1 fraction bits, +1 may occur
  logic signed [WO-1:0] s_re, s_im, d_re, d_im, f_re, f_im;
  logic                 bf_sat, fq_sat_re, fq_sat_im, rotj;
  logic [2*WB-1:0]      mem_din, mem_dout;

  assign x_re = WB'(in_re) <<< (WB - WI);
  assign x_im = WB'(in_im) <<< (WB - WI);
  assign {fb_re, fb_im} = mem_dout;
  assign rotj = mode2 && hi;

  always_comb begin
    a_re = (WB+1)'(fb_re);
    a_im = (WB+1)'(fb_im);
    if (rotj) begin                      // x * -j = x_im - j*x_re
      b_re =  (WB+1)'(x_im);
      b_im = -(WB+1)'(x_re);
    end else begin
      b_re = (WB+1)'(x_re);
      b_im = (WB+1)'(x_im);
    end
  end

  bf2 #(.WI(WB + 1), .FI(WB - 1), .WO(WO)) u_bf (
    .a_re, .a_im, .b_re, .b_im, .s_re, .s_im, .d_re, .d_im, .sat(bf_sat));

  assign dd_re   = WB'(d_re) <<< (WB - WO);
  assign dd_im   = WB'(d_im) <<< (WB - WO);
  assign mem_din = mode2 ? {dd_re, dd_im} : {x_re, x_im};

  sdf_buffer #(.DEPTH(D), .W(2 * WB)) u_mem (
    .clk, .rst_n, .en(in_valid), .din(mem_din), .dout(mem_dout));

  fx_quant #(.WI(WB), .FI(WB - 1), .WO(WO)) u_fqr (.d(fb_re), .q(f_re), .sat(fq_sat_re));
  fx_quant #(.WI(WB), .FI(WB - 1), .WO(WO)) u_fqi (.d(fb_im), .q(f_im), .sat(fq_sat_im));

  // ---------------- twiddle selection ----------------
  // output group: mode 2 sends sums of the current half (k1 = hi, k2 = 0),
  // mode 1 sends differences of the previous half (k1 = !hi, k2 = 1)
  logic          k1, k2;
  logic [NW-1:0] n;
  logic [EW-1:0] e;
  logic          triv;
  rot_e          rot;
  logic          v1;

  always_comb begin
    k1   = mode2 ? hi : !hi;
    k2   = !mode2;
    n    = (D > 1) ? cnt[NW-1:0] : '0;
    e    = EW'(n) * EW'({k2, k1});
    triv = ((32'(e) % D) == 0);
    rot  = rot_e'(32'(e) / D);
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
