// twiddle_rom: twiddle factor ROM of one stage (synchronous read).
//
// Entry e holds W_L^e = cos(2*pi*e/L) - j*sin(2*pi*e/L) for e = 0..DEPTH-1,
// each part rounded to the nearest W-bit signed fraction (+1.0, which does
// not fit, becomes the largest positive code). The table is computed while
// the design elaborates, so there is no data file. The coefficient width is
// the stage wordlength; rounding to nearest is this design's choice. On a
// clock edge with `en` high the entry at `addr` appears on `w_re`/`w_im`.
module twiddle_rom #(
  parameter int unsigned L     = 8192,  // transform length the twiddles belong to
  parameter int unsigned DEPTH = 4096,  // number of entries
  parameter int unsigned W     = 11,    // coefficient width
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                      clk,
  input  logic                      en,
  input  logic [AW-1:0]             addr,
  output logic signed [W-1:0]       w_re,
  output logic signed [W-1:0]       w_im
);
  localparam real PI = 3.14159265358979323846;

  function automatic logic signed [W-1:0] coef(real v);
    real    s;
    longint r;
    s = v * (2.0 ** (W - 1));
    r = longint'($floor(s + 0.5));
    if (r > (64'sd1 <<< (W - 1)) - 1) r = (64'sd1 <<< (W - 1)) - 1;
    if (r < -(64'sd1 <<< (W - 1)))    r = -(64'sd1 <<< (W - 1));
    return W'(r);
  endfunction

  logic signed [W-1:0] rom_re [DEPTH];
  logic signed [W-1:0] rom_im [DEPTH];

  for (genvar e = 0; e < DEPTH; e++) begin : g_ent
    localparam logic signed [W-1:0] CRE = coef($cos(2.0 * PI * e / L));
    localparam logic signed [W-1:0] CIM = coef(-$sin(2.0 * PI * e / L));
    assign rom_re[e] = CRE;
    assign rom_im[e] = CIM;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      w_re <= rom_re[addr];
      w_im <= rom_im[addr];
    end
  end
endmodule
