// sdf_buffer: delay-feedback memory of one single-path delay-feedback stage.
//
// A first-in first-out delay of DEPTH words: `dout` is the word that was
// written DEPTH enabled cycles before, and on every cycle with `en` high the
// word on `din` is written in its place. Functionally this is the stage's
// shift register of DEPTH words; it is built as a circular memory with one
// pointer so that only one word moves per cycle. Read is combinational from
// the memory, write is synchronous. The pointer is reset; the memory is not
// (its first DEPTH words are never used as valid data).
module sdf_buffer #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned W     = 36
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (en) ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end
endmodule
