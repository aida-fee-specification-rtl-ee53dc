// le_disc: leading-edge discriminator on one flash-ADC channel.
//
// The baseline is subtracted from each sample; trig pulses in the cycle of
// the first sample at or above threshold after the signal was below it
// (a rising crossing), combinationally with that sample so that it lines up
// with the sample in the other per-channel blocks. The discriminator re-arms
// once the signal has fallen below threshold - hysteresis.
// The specification names the block; threshold, baseline and the re-arm
// hysteresis are this design's choice. The outputs act only on cycles with
// s_en high.
module le_disc #(
  parameter int unsigned BITS = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                s_en,
  input  logic [BITS-1:0]     sample,
  input  logic [BITS-1:0]     baseline,
  input  logic signed [BITS:0] threshold,   // above baseline
  input  logic [BITS-1:0]     hysteresis,
  output logic                trig,
  output logic                above
);
  logic armed;
  logic signed [BITS+1:0] xs;

  assign xs    = $signed({2'b00, sample}) - $signed({2'b00, baseline});
  assign above = xs >= (BITS+2)'(threshold);
  assign trig  = s_en && armed && above;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) armed <= 1'b1;
    else if (s_en) begin
      if (trig) armed <= 1'b0;
      else if (xs < (BITS+2)'(threshold) - $signed({2'b00, hysteresis})) armed <= 1'b1;
    end
  end
endmodule
