// bf2: radix-2 butterfly with stage-by-stage scaling (combinational).
//
// Computes s = (a + b) / 2 and d = (a - b) / 2 for complex a and b, the
// butterfly of the decimation-in-frequency radix-2 step. Dividing every
// butterfly output by two keeps |x| < 1 from stage to stage, so no overflow
// can build up. The sum is formed exactly on WI+1 bits, the halving moves the
// binary point one place, and the result is truncated (or zero-extended) to the
// stage wordlength WO in one step: the combined scaling and wordlength
// reduction error of the stage's error model. Inputs have FI fraction bits;
// outputs are WO-bit signed fractions. `sat` flags a clipped output, which
// can only occur when an input lies outside [-1, 1) (the -j rotated input of
// a BF2II stage may reach +1).
module bf2 #(
  parameter int unsigned WI = 18,
  parameter int unsigned FI = 17,
  parameter int unsigned WO = 18
) (
  input  logic signed [WI-1:0] a_re, a_im, b_re, b_im,
  output logic signed [WO-1:0] s_re, s_im, d_re, d_im,
  output logic                 sat
);
  logic signed [WI:0] sum_re, sum_im, dif_re, dif_im;
  logic [3:0] st;

  always_comb begin
    sum_re = (WI+1)'(a_re) + (WI+1)'(b_re);
    sum_im = (WI+1)'(a_im) + (WI+1)'(b_im);
    dif_re = (WI+1)'(a_re) - (WI+1)'(b_re);
    dif_im = (WI+1)'(a_im) - (WI+1)'(b_im);
  end

  // FI+1 fraction bits: the /2 of the scaling
  fx_quant #(.WI(WI+1), .FI(FI+1), .WO(WO)) u_qsr (.d(sum_re), .q(s_re), .sat(st[0]));
  fx_quant #(.WI(WI+1), .FI(FI+1), .WO(WO)) u_qsi (.d(sum_im), .q(s_im), .sat(st[1]));
  fx_quant #(.WI(WI+1), .FI(FI+1), .WO(WO)) u_qdr (.d(dif_re), .q(d_re), .sat(st[2]));
  fx_quant #(.WI(WI+1), .FI(FI+1), .WO(WO)) u_qdi (.d(dif_im), .q(d_im), .sat(st[3]));

  assign sat = |st;
endmodule
