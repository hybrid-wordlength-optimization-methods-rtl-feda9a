// sdf_ctrl: control unit of one delay-feedback stage.
//
// A CNT_W-bit counter that advances once per valid input sample and wraps at
// 2^CNT_W, the stage's local transform length. Bit MODE_BIT selects the
// operating mode: 0 is mode 1 (incoming samples are stored in the feedback
// memory while the previous differences leave it), 1 is mode 2 (butterflies
// on the stored and incoming samples). `primed` rises after the first mode 2
// sample; from then on every input produces a valid output. Counter and flag
// reset to 0 (asynchronous, active low).
module sdf_ctrl #(
  parameter int unsigned CNT_W    = 13,
  parameter int unsigned MODE_BIT = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [CNT_W-1:0] cnt,
  output logic             mode2,
  output logic             primed
);
  assign mode2 = cnt[MODE_BIT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      primed <= 1'b0;
    end else if (en) begin
      cnt <= cnt + 1'b1;
      if (mode2) primed <= 1'b1;
    end
  end
endmodule
