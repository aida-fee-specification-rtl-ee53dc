// aida_pkg: types and constants shared by the AFE64 readout FPGA logic.
//
// The AFE64 board serves four 16-channel ASICs (64 detector strips). Each strip
// preamplifier output is digitised by an eight-channel 14-bit flash ADC and
// processed in the FPGA (the "digital readout"); the ASICs' own multiplexed
// analogue output is digitised by one 16-bit serial ADC per ASIC (the
// "analogue readout"). All event data carry a 48-bit timestamp.
//
// Numbers that come from the specification: 4 ASICs of 16 channels, 14-bit
// FADC samples, 48-bit timestamp with 64-bit hit mask and 3 flag bits in the
// digital timestamp queue, 1024-sample circulating buffer, 3072 x 16 waveform
// FIFO, 10 x 36 energy queue, two 1024 x 32 banks per shared event RAM, two
// 32-bit words per analogue event. Field layouts inside the words are this
// design's own choice and are documented next to each type.
package aida_pkg;

  localparam int unsigned TS_W       = 48;  // timestamp width
  localparam int unsigned N_ASIC     = 4;   // ASICs per AFE64
  localparam int unsigned ASIC_CH    = 16;  // channels per ASIC
  localparam int unsigned N_DCH      = N_ASIC * ASIC_CH; // digital channels (64)
  localparam int unsigned FADC_BITS  = 14;  // flash ADC resolution
  localparam int unsigned FADC_LANES = 8;   // converters per flash ADC device
  localparam int unsigned SADC_BITS  = 16;  // serial ADC resolution
  localparam int unsigned ENERGY_W   = 32;  // energy word in the channel queue
  localparam int unsigned QUAL_W     = 4;   // quality bits in the channel queue (32 + 4 = 36)

  // Flags queued with each timestamp: "Sync/Pse/Res" of the block diagram,
  // read here as SYNC, pause and resume.
  typedef struct packed {
    logic sync;
    logic pause;
    logic resume;
  } ts_flags_t;

  // Quality bits stored with every energy in a channel queue.
  typedef struct packed {
    logic       reserved;
    logic       energy_ovf;  // filter output saturated
    logic       wave_ok;     // a waveform for this event was written to the FIFO
    logic       pileup;      // a second leading edge fell inside the filter window
  } quality_t;

  typedef struct packed {
    quality_t            qual;
    logic [ENERGY_W-1:0] energy;
  } energy_entry_t;

  // Analogue-readout event words (two 32-bit words per event).
  localparam logic [1:0] EVT_ADC  = 2'b11;
  localparam logic [1:0] EVT_INFO = 2'b10;

  // Info codes written in the INFO word.
  localparam logic [3:0] INFO_SYNC   = 4'd1;
  localparam logic [3:0] INFO_PAUSE  = 4'd2;
  localparam logic [3:0] INFO_RESUME = 4'd3;
  localparam logic [3:0] INFO_TSMSB  = 4'd4;

  // Word 0 of an ADC event: {type, 2'b0, module id, channel, adc value}
  function automatic logic [31:0] adc_word0(logic [5:0] module_id, logic [5:0] chan,
                                            logic [15:0] adc);
    return {EVT_ADC, 2'b00, module_id, chan, adc};
  endfunction

  // Word 0 of an INFO event: {type, module id, code, timestamp[47:28]}
  function automatic logic [31:0] info_word0(logic [5:0] module_id, logic [3:0] code,
                                             logic [TS_W-1:0] ts);
    return {EVT_INFO, module_id, code, ts[47:28]};
  endfunction

  // Word 1 of every analogue-readout event: the 28 low timestamp bits.
  function automatic logic [31:0] ts_word1(logic [TS_W-1:0] ts);
    return {4'b0000, ts[27:0]};
  endfunction

  // Digital-readout event header markers (first 16-bit word, top nibble).
  localparam logic [3:0] DIG_EVT_MARK  = 4'hD;
  localparam logic [3:0] DIG_INFO_MARK = 4'hE;
  // Block header written by the DMA engine ahead of each shared-RAM bank.
  localparam logic [3:0] DMA_BLK_MARK  = 4'hA;

endpackage
