// fadc_deser: turns the serial output of one eight-channel flash ADC into
// parallel samples.
//
// Each converter of the flash ADC sends its 14-bit samples MSB first on its
// own double-data-rate LVDS pair; a frame signal (FCO) marks the word
// boundary, and a bit clock (DCO) at 7 x the sample rate clocks the pairs.
// The input cells of the FPGA capture each pair on both DCO edges and present
// the two bits here as d_rise (earlier bit) and d_fall (later bit), with the
// frame line captured the same way, one bit pair per cycle with pair_en high.
// A rising edge of the frame line (low in the previous fall sample, high in
// the current rise sample) marks the pair that holds bits 13 and 12. After
// seven pairs all lanes present a sample on sample[] with sample_valid high
// for one cycle; a frame edge at any other place re-aligns the word counter
// and is counted in realign_count.
//
// The converter count, resolution, DDR links and frame signal follow the
// specification. Capturing the DDR bits and moving them from the ADC's bit
// clock into the logic clock are outside this module; here everything runs
// on clk with the pair_en strobe. In the board top, clk is the ADC bit clock
// and the samples go on through an asynchronous FIFO.
module fadc_deser #(
  parameter int unsigned LANES = 8,
  parameter int unsigned BITS  = 14,   // must be even: two bits per pair
  localparam int unsigned PAIRS = BITS / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pair_en,
  input  logic [LANES-1:0]     d_rise,
  input  logic [LANES-1:0]     d_fall,
  input  logic                 fco_rise,
  input  logic                 fco_fall,
  output logic [BITS-1:0]      sample [LANES],
  output logic                 sample_valid,
  output logic [15:0]          realign_count
);
  logic [BITS-1:0]           sr [LANES];
  logic [$clog2(PAIRS)-1:0]  idx;       // index of the next pair within the word
  logic                      fco_fall_d;
  logic                      aligned;

  wire frame_start = fco_rise && !fco_fall_d;
  wire [$clog2(PAIRS)-1:0] cur_idx = frame_start ? '0 : idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx           <= '0;
      fco_fall_d    <= 1'b0;
      aligned       <= 1'b0;
      sample_valid  <= 1'b0;
      realign_count <= '0;
      for (int l = 0; l < LANES; l++) begin
        sr[l]     <= '0;
        sample[l] <= '0;
      end
    end else begin
      sample_valid <= 1'b0;
      if (pair_en) begin
        fco_fall_d <= fco_fall;
        for (int l = 0; l < LANES; l++) sr[l] <= {sr[l][BITS-3:0], d_rise[l], d_fall[l]};
        if (frame_start) begin
          aligned <= 1'b1;
          if (aligned && idx != '0) realign_count <= realign_count + 1'b1;
        end
        if (cur_idx == ($clog2(PAIRS))'(PAIRS - 1)) begin
          idx <= '0;
          if (aligned || frame_start) begin
            sample_valid <= 1'b1;
            for (int l = 0; l < LANES; l++) sample[l] <= {sr[l][BITS-3:0], d_rise[l], d_fall[l]};
          end
        end else begin
          idx <= cur_idx + 1'b1;
        end
      end
    end
  end
endmodule
