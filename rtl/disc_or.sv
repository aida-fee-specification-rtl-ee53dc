// disc_or: the fast "discriminator OR" trigger sent to the rest of the
// experiment over the clock cable.
//
// Each ASIC supplies an OR of its 16 channel discriminators (an LVDS signal
// timed to about 1 ns). This block ORs those of all ASICs on the board and,
// for the FPGA's own use, keeps a count of rising edges of the combined
// signal. The OR path is purely combinational so it adds no clock-quantised
// delay to the trigger; only the counter is clocked. The count is this
// design's addition for monitoring.
module disc_or #(
  parameter int unsigned N_IN = 4,
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_IN-1:0]  asic_or,   // per-ASIC discriminator OR
  output logic             trig_out,  // board discriminator OR
  output logic [CNT_W-1:0] edge_count // rising edges of trig_out seen on clk
);
  logic trig_s, trig_d;

  assign trig_out = |asic_or;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_s     <= 1'b0;
      trig_d     <= 1'b0;
      edge_count <= '0;
    end else begin
      trig_s <= trig_out;
      trig_d <= trig_s;
      if (trig_s && !trig_d) edge_count <= edge_count + 1'b1;
    end
  end
endmodule
