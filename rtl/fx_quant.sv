// fx_quant: fixed-point requantizer (combinational).
//
// Takes a signed value of WI bits whose FI least significant bits are the
// fraction and returns it as a signed fraction of WO bits (WO-1 fraction
// bits). Fraction bits that do not fit are dropped (truncation toward minus
// infinity, i.e. the arithmetic right shift that a 1-bit scaling and a
// wordlength reduction both amount to); missing fraction bits are filled with
// zeros. A value outside [-1, 1 - 2^-(WO-1)] is clipped to the nearest end
// and flagged on `sat`. Truncation and saturation are the quantization and
// overflow modes the design flow models; the module itself is this design's
// packaging of them.
module fx_quant #(
  parameter int unsigned WI = 19,  // input width
  parameter int unsigned FI = 18,  // input fraction bits
  parameter int unsigned WO = 18   // output width (WO-1 fraction bits)
) (
  input  logic signed [WI-1:0] d,
  output logic signed [WO-1:0] q,
  output logic                 sat
);
  localparam int unsigned FO = WO - 1;
  localparam int unsigned SR = (FI > FO) ? FI - FO : 0;  // bits to drop
  localparam int unsigned SL = (FO > FI) ? FO - FI : 0;  // zero bits to add
  localparam int unsigned WT = WI + SL + 1;
  localparam longint MAXV = (64'sd1 <<< (WO - 1)) - 64'sd1;
  localparam longint MINV = -(64'sd1 <<< (WO - 1));

  logic signed [WT-1:0] ext, al;
  longint alv;

  always_comb begin
    ext = WT'(d);                 // sign extension (d is signed)
    al  = (ext >>> SR) <<< SL;
    alv = longint'(al);
    sat = 1'b0;
    if (alv > MAXV) begin
      q   = WO'(MAXV);
      sat = 1'b1;
    end else if (alv < MINV) begin
      q   = WO'(MINV);
      sat = 1'b1;
    end else begin
      q = al[WO-1:0];
    end
  end
endmodule
