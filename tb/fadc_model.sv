// fadc_model: behavioural model of the serial output of one eight-channel
// flash ADC as seen after the FPGA's double-data-rate input cells, for
// simulation only. On every clock with pair_en it presents one bit pair per
// lane (earlier bit on d_rise) and the matching frame pair. A 14-bit word
// goes out MSB first in seven pairs; the frame line is high for the first
// seven bit times. The word sent is the value of `value` when its first
// pair goes out; word_start marks that cycle.
module fadc_model #(
  parameter int unsigned LANES = 8
) (
  input  logic        clk,
  input  logic        pair_en,
  input  logic [13:0] value [LANES],
  output logic [LANES-1:0] d_rise,
  output logic [LANES-1:0] d_fall,
  output logic        fco_rise,
  output logic        fco_fall,
  output logic        word_start
);
  int          p = 0;
  logic [13:0] w [LANES];
  logic [13:0] frame = 14'b11111110000000;

  always_comb begin
    word_start = pair_en && (p == 0);
    for (int l = 0; l < LANES; l++) begin
      d_rise[l] = (p == 0) ? value[l][13] : w[l][13 - 2*p];
      d_fall[l] = (p == 0) ? value[l][12] : w[l][12 - 2*p];
    end
    fco_rise = frame[13 - 2*p];
    fco_fall = frame[12 - 2*p];
  end

  always @(posedge clk) begin
    if (pair_en) begin
      if (p == 0) for (int l = 0; l < LANES; l++) w[l] <= value[l];
      p <= (p == 6) ? 0 : p + 1;
    end
  end
endmodule
