// cmult: twiddle factor multiplier of one pipeline stage (one register).
//
// Multiplies the complex sample d by a twiddle factor. A non-trivial factor
// comes from the twiddle ROM (w_re, w_im, both W-bit signed fractions) and is
// applied with four real multiplications, each product truncated separately
// to W-1 fraction bits before the real and imaginary sums are formed:
//   q_re = T(d_re*w_re) - T(d_im*w_im),  q_im = T(d_re*w_im) + T(d_im*w_re).
// A trivial factor (+1, -j, -1, +j, selected by `triv` and `rot`) is applied
// exactly by swapping and negating parts, so it adds no noise. Results are
// saturated to W bits; `q_sat` flags a clipped result. The output register
// loads on `in_valid`, so q_* is valid one clock after the input and
// `q_valid` follows `in_valid` by one clock. w_re/w_im must be valid in the
// same cycle as d (the ROM is read one cycle ahead by the stage).
module cmult
  import fft_pkg::*;
#(
  parameter int unsigned W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] d_re,
  input  logic signed [W-1:0] d_im,
  input  logic                triv,
  input  rot_e                rot,
  input  logic signed [W-1:0] w_re,
  input  logic signed [W-1:0] w_im,
  output logic                q_valid,
  output logic signed [W-1:0] q_re,
  output logic signed [W-1:0] q_im,
  output logic                q_sat
);
  localparam int unsigned WP = 2 * W;   // full product, 2W-2 fraction bits
  localparam int unsigned WT = W + 2;   // truncated products and their sum

  logic signed [WP-1:0] p_rr, p_ii, p_ri, p_ir;
  logic signed [WT-1:0] t_rr, t_ii, t_ri, t_ir;
  logic signed [WT-1:0] x_re, x_im;     // value before saturation, W-1 fraction bits
  logic signed [W-1:0]  s_re, s_im;
  logic                 sat_re, sat_im;

  always_comb begin
    p_rr = WP'(d_re) * WP'(w_re);
    p_ii = WP'(d_im) * WP'(w_im);
    p_ri = WP'(d_re) * WP'(w_im);
    p_ir = WP'(d_im) * WP'(w_re);
    t_rr = WT'(p_rr >>> (W - 1));
    t_ii = WT'(p_ii >>> (W - 1));
    t_ri = WT'(p_ri >>> (W - 1));
    t_ir = WT'(p_ir >>> (W - 1));
    if (triv) begin
      unique case (rot)
        ROT_P1:  begin x_re =  WT'(d_re); x_im =  WT'(d_im); end
        ROT_MJ:  begin x_re =  WT'(d_im); x_im = -WT'(d_re); end
        ROT_M1:  begin x_re = -WT'(d_re); x_im = -WT'(d_im); end
        default: begin x_re = -WT'(d_im); x_im =  WT'(d_re); end
      endcase
    end else begin
      x_re = t_rr - t_ii;
      x_im = t_ri + t_ir;
    end
  end

  fx_quant #(.WI(WT), .FI(W - 1), .WO(W)) u_qre (.d(x_re), .q(s_re), .sat(sat_re));
  fx_quant #(.WI(WT), .FI(W - 1), .WO(W)) u_qim (.d(x_im), .q(s_im), .sat(sat_im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_valid <= 1'b0;
      q_re    <= '0;
      q_im    <= '0;
      q_sat   <= 1'b0;
    end else begin
      q_valid <= in_valid;
      if (in_valid) begin
        q_re  <= s_re;
        q_im  <= s_im;
        q_sat <= sat_re | sat_im;
      end
    end
  end
endmodule
