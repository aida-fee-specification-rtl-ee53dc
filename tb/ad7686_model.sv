// ad7686_model: behavioural model of the 16-bit serial ADC used by the
// analogue readout, for simulation only (not synthesizable logic).
// Three-wire mode without busy indicator: the rising edge of CNV samples
// `value`; when CNV falls the MSB appears on SDO and each falling SCK edge
// shifts out the next bit. SDI is expected high. cnv_high_ok reports whether
// the last CNV high time reached min_conv_ns.
module ad7686_model #(
  parameter real MIN_CONV_NS = 1000.0
) (
  input  logic        cnv,
  input  logic        sck,
  input  logic        sdi,
  output logic        sdo,
  input  logic [15:0] value,
  output logic        cnv_high_ok,
  output int          conversions
);
  logic [15:0] sh = '0;
  realtime t_rise = 0;
  initial begin
    sdo = 1'b0;
    cnv_high_ok = 1'b1;
    conversions = 0;
  end
  always @(posedge cnv) begin
    sh     = value;
    t_rise = $realtime;
  end
  always @(negedge cnv) begin
    cnv_high_ok = (($realtime - t_rise) >= MIN_CONV_NS) && sdi;
    conversions = conversions + 1;
    sdo = sh[15];
    sh  = {sh[14:0], 1'b0};
  end
  always @(negedge sck) begin
    if (!cnv) begin
      sdo = sh[15];
      sh  = {sh[14:0], 1'b0};
    end
  end
endmodule
