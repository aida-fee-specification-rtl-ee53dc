// asic_readout: the complete analogue readout of one ASIC ("one of 4").
//
// The ASIC's 16 discriminator outputs are synchronised to clk (two flip-flops)
// and their rising edges, with the SYNC / pause / resume flags, are queued
// with the current timestamp in a timestamp queue. The readout state machine
// (asic_readout_sm) takes each entry, reads the held channels out of the
// ASIC's multiplexed analogue output through the 16-bit serial ADC
// (ad7686_if) and writes two-word events into the flip-flop event RAM
// (flipflop_ram), from which the data-transfer engine collects full or
// flushed banks.
// Timing: discriminator edge to queue entry takes three clocks; each channel
// then costs one ADC conversion (about 2 us with the defaults) plus the ASIC
// handshake. The grouping follows the specification's block diagram; the
// synchroniser and edge detection are this design's.
module asic_readout
  import aida_pkg::*;
#(
  parameter int unsigned TSQ_DEPTH   = 64,
  parameter int unsigned RAM_WORDS   = 1024,
  parameter int unsigned CONV_CYCLES = 160,
  parameter int unsigned SCK_HALF    = 2,
  parameter int unsigned TIMEOUT     = 4096,
  localparam int unsigned RAW        = $clog2(RAM_WORDS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [5:0]      module_id,
  input  logic [1:0]      asic_id,
  input  logic [TS_W-1:0] ts,
  input  ts_flags_t       flags,
  // ASIC
  input  logic [ASIC_CH-1:0] disc,
  input  logic [3:0]      ro_chan,
  input  logic            ro_valid,
  input  logic            ro_last,
  input  logic            ro_hold,
  output logic            ro_start,
  output logic            ro_next,
  output logic            ro_clr,
  output logic            ro_reset,
  // serial ADC
  output logic            adc_cnv,
  output logic            adc_sck,
  output logic            adc_sdi,
  input  logic            adc_sdo,
  // event RAM read side
  input  logic            flush,
  output logic            rd_avail,
  output logic [RAW:0]    rd_count,
  input  logic [RAW-1:0]  rd_addr,
  output logic [31:0]     rd_data,
  input  logic            rd_done,
  // status
  output logic [31:0]     event_count,
  output logic [15:0]     timeout_count,
  output logic [15:0]     tsq_drop_count,
  output logic [15:0]     swap_count
);
  localparam int unsigned EW = TS_W + ASIC_CH + 3;

  logic [ASIC_CH-1:0] disc_s1, disc_s2, disc_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      disc_s1 <= '0; disc_s2 <= '0; disc_d <= '0;
    end else begin
      disc_s1 <= disc;
      disc_s2 <= disc_s1;
      disc_d  <= disc_s2;
    end
  end
  wire [ASIC_CH-1:0] disc_rise = disc_s2 & ~disc_d;

  logic          tsq_empty, tsq_full, tsq_rd;
  logic [EW-1:0] tsq_data;
  logic [$clog2(TSQ_DEPTH+1)-1:0] tsq_count;

  timestamp_queue #(.N_HIT(ASIC_CH), .DEPTH(TSQ_DEPTH)) u_tsq (
    .clk, .rst_n, .ts, .hit(disc_rise), .flags,
    .rd_en(tsq_rd), .rd_data(tsq_data), .empty(tsq_empty), .full(tsq_full),
    .count(tsq_count), .drop_count(tsq_drop_count)
  );

  logic        adc_start, adc_busy, adc_done;
  logic [15:0] adc_data;
  logic        ev_wr, ev_full;
  logic [31:0] ev_data;

  asic_readout_sm #(.TIMEOUT(TIMEOUT), .N_DISC(ASIC_CH)) u_sm (
    .clk, .rst_n, .module_id, .asic_id,
    .tsq_empty, .tsq_data, .tsq_rd,
    .ro_chan, .ro_valid, .ro_last, .ro_hold,
    .ro_start, .ro_next, .ro_clr, .ro_reset,
    .adc_start, .adc_done, .adc_data,
    .ev_wr, .ev_data, .ev_full,
    .event_count, .timeout_count
  );

  ad7686_if #(.CONV_CYCLES(CONV_CYCLES), .SCK_HALF(SCK_HALF)) u_adc (
    .clk, .rst_n, .start(adc_start), .busy(adc_busy), .done(adc_done), .data(adc_data),
    .cnv(adc_cnv), .sck(adc_sck), .sdi(adc_sdi), .sdo(adc_sdo)
  );

  flipflop_ram #(.WORDS(RAM_WORDS), .W(32), .GRAIN(2)) u_ram (
    .clk, .rst_n, .wr_en(ev_wr), .wr_data(ev_data), .wr_full(ev_full),
    .flush, .rd_avail, .rd_count, .rd_addr, .rd_data, .rd_done, .swap_count
  );
endmodule
