// afe64_top: FPGA logic of one AFE64 board (64 detector strips, four ASICs).
//
// Two readout paths produce time-ordered events for the acquisition:
//   digital readout - eight flash-ADC deserialisers deliver 64 sample streams;
//     each strip has a digital_channel (circulating waveform buffer, leading
//     edge discriminator, MWD energy filter, energy queue, waveform FIFO).
//     Accepted hits are time-stamped in one 1024 x (48 + 64 + 3) timestamp
//     queue and digital_readout_sm turns each entry into 16-bit event records.
//   analogue readout - per ASIC an asic_readout time-stamps the 16
//     discriminators, reads the ASIC's multiplexed analogue output through a
//     16-bit serial ADC and stores two-word events in a flip-flop event RAM.
// dma_engine moves the event RAM banks and the digital stream into a ring
// buffer in processor memory (one 32-bit word per cycle). timestamp_counter
// keeps the 48-bit time aligned to the system SYNC; disc_or forms the fast
// discriminator OR output from the ASICs' own OR signals; i2c_master is the
// two-wire register path to the ASICs and the ID EEPROM, commanded by the
// processor.
// The soft processor, its memory controller, Ethernet, flash, the ASICs and
// the ADC chips are outside: their connections are ports. Configuration
// (thresholds, filter constant, waveform length, ring location) arrives as
// plain inputs, as written by the processor, and is shared by all channels.
// The logic runs on clk (100 MHz intended). The flash-ADC deserialisers run
// on fadc_clk, the ADC bit clock (350 MHz at the full 50 MSPS; one DDR bit
// pair per cycle with fadc_pair_en, seven pairs per sample), and hand whole
// samples to clk through one small asynchronous FIFO per ADC device. clk must
// be at least the sample rate: each strip takes one sample per clk cycle.
// fadc_clk may also be clk itself.
module afe64_top
  import aida_pkg::*;
#(
  parameter int unsigned NA          = 4,     // ASICs on the board
  parameter int unsigned RING        = 1024,  // circulating buffer samples
  parameter int unsigned WF_DEPTH    = 3072,  // waveform FIFO words per channel
  parameter int unsigned EQ_DEPTH    = 10,    // energy queue entries per channel
  parameter int unsigned DTSQ_DEPTH  = 1024,  // digital timestamp queue entries
  parameter int unsigned ATSQ_DEPTH  = 64,    // analogue timestamp queue entries
  parameter int unsigned RAM_WORDS   = 1024,  // words per event RAM bank
  parameter int unsigned MWD_M       = 128,
  parameter int unsigned MWD_L       = 64,
  parameter int unsigned CONV_CYCLES = 160,
  parameter int unsigned SCK_HALF    = 2,
  parameter int unsigned RO_TIMEOUT  = 4096,
  parameter int unsigned I2C_QUARTER = 250,   // 100 kHz I2C from 100 MHz
  localparam int unsigned NCH        = NA * ASIC_CH,
  localparam int unsigned NF         = NCH / FADC_LANES,
  localparam int unsigned RBW        = $clog2(RING),
  localparam int unsigned MAW        = $clog2(RAM_WORDS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // clock system
  input  logic                 sync_in,
  input  logic [TS_W-1:0]      sync_value,
  input  logic                 pause_in,      // run control: pause marker request
  input  logic                 resume_in,     // run control: resume marker request
  output logic [TS_W-1:0]      timestamp,
  output logic                 disc_or_out,
  // flash ADCs (bits captured on both edges of the ADC bit clock)
  input  logic                 fadc_clk,
  input  logic                 fadc_pair_en,
  input  logic [NCH-1:0]       fadc_d_rise,
  input  logic [NCH-1:0]       fadc_d_fall,
  input  logic [NF-1:0]        fadc_fco_rise,
  input  logic [NF-1:0]        fadc_fco_fall,
  // ASICs
  input  logic [NA-1:0][ASIC_CH-1:0] asic_disc,
  input  logic [NA-1:0]        asic_disc_or,
  input  logic [NA-1:0][3:0]   ro_chan,
  input  logic [NA-1:0]        ro_valid,
  input  logic [NA-1:0]        ro_last,
  input  logic [NA-1:0]        ro_hold,
  output logic [NA-1:0]        ro_start,
  output logic [NA-1:0]        ro_next,
  output logic [NA-1:0]        ro_clr,
  output logic [NA-1:0]        ro_reset,
  output logic [NA-1:0]        adc_cnv,
  output logic [NA-1:0]        adc_sck,
  output logic [NA-1:0]        adc_sdi,
  input  logic [NA-1:0]        adc_sdo,
  // configuration
  input  logic [5:0]           module_id,
  input  logic [FADC_BITS-1:0] baseline,
  input  logic signed [FADC_BITS:0] le_thresh,
  input  logic [FADC_BITS-1:0] le_hyst,
  input  logic [15:0]          inv_tau,
  input  logic [31:0]          e_thresh,
  input  logic [RBW:0]         ws_len,
  input  logic [RBW-1:0]       pre_len,
  input  logic                 flush_tick,    // processor tick: hand over partly filled banks
  // processor memory
  output logic                 m_we,
  output logic [31:0]          m_addr,
  output logic [31:0]          m_wdata,
  input  logic                 m_ready,
  input  logic [31:0]          ring_base,
  input  logic [23:0]          ring_size,
  input  logic [23:0]          sw_rd_ptr,
  output logic [23:0]          wr_ptr,
  // I2C register path (ASICs, ID EEPROM): processor commands and bus pins
  input  logic                 i2c_cmd_valid,
  output logic                 i2c_cmd_ready,
  input  logic [1:0]           i2c_cmd_op,
  input  logic [7:0]           i2c_cmd_data,
  input  logic                 i2c_cmd_nack,
  output logic                 i2c_rsp_valid,
  output logic [7:0]           i2c_rsp_data,
  output logic                 i2c_rsp_nack,
  output logic                 i2c_scl_oe,
  output logic                 i2c_sda_oe,
  input  logic                 i2c_scl_i,
  input  logic                 i2c_sda_i,
  // status
  output logic [31:0]          dig_event_count,
  output logic [NA-1:0][31:0]  asic_event_count,
  output logic [NA-1:0][15:0]  asic_timeout_count,
  output logic [15:0]          dtsq_drop_count,
  output logic [31:0]          disc_or_count,
  output logic [31:0]          dma_word_count
);
  // ---------------- time ----------------
  logic sync_seen, pause_d, resume_d;
  ts_flags_t flags;

  timestamp_counter #(.TS_W(TS_W)) u_ts (
    .clk, .rst_n, .tick_en(1'b1), .sync_in, .sync_value, .ts(timestamp), .sync_seen
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pause_d <= 1'b0; resume_d <= 1'b0;
    end else begin
      pause_d <= pause_in; resume_d <= resume_in;
    end
  end
  assign flags = '{sync: sync_seen, pause: pause_in && !pause_d, resume: resume_in && !resume_d};

  disc_or #(.N_IN(NA)) u_or (
    .clk, .rst_n, .asic_or(asic_disc_or), .trig_out(disc_or_out), .edge_count(disc_or_count)
  );

  // ---------------- I2C register path ----------------
  i2c_master #(.QUARTER(I2C_QUARTER)) u_i2c (
    .clk, .rst_n,
    .cmd_valid(i2c_cmd_valid), .cmd_ready(i2c_cmd_ready), .cmd_op(i2c_cmd_op),
    .cmd_data(i2c_cmd_data), .cmd_nack(i2c_cmd_nack), .rsp_valid(i2c_rsp_valid),
    .rsp_data(i2c_rsp_data), .rsp_nack(i2c_rsp_nack), .scl_oe(i2c_scl_oe),
    .sda_oe(i2c_sda_oe), .scl_i(i2c_scl_i), .sda_i(i2c_sda_i)
  );

  // ---------------- digital readout ----------------
  logic [FADC_BITS-1:0] fsample [NF][FADC_LANES];
  logic [NF-1:0]        fvalid;
  logic [15:0]          frealign [NF];

  for (genvar f = 0; f < NF; f++) begin : g_fadc
    logic [FADC_BITS-1:0] dsample [FADC_LANES];
    logic                 dvalid, xempty, xfull;
    logic [FADC_LANES*FADC_BITS-1:0] xin, xout;

    fadc_deser #(.LANES(FADC_LANES), .BITS(FADC_BITS)) u_deser (
      .clk(fadc_clk), .rst_n, .pair_en(fadc_pair_en),
      .d_rise(fadc_d_rise[f*FADC_LANES +: FADC_LANES]),
      .d_fall(fadc_d_fall[f*FADC_LANES +: FADC_LANES]),
      .fco_rise(fadc_fco_rise[f]), .fco_fall(fadc_fco_fall[f]),
      .sample(dsample), .sample_valid(dvalid), .realign_count(frealign[f])
    );
    for (genvar l = 0; l < FADC_LANES; l++) begin : g_lane
      assign xin[l*FADC_BITS +: FADC_BITS] = dsample[l];
      assign fsample[f][l] = xout[l*FADC_BITS +: FADC_BITS];
    end
    // clk is at least the sample rate, so the FIFO is emptied faster than it
    // fills and xfull never rises
    cdc_fifo #(.WIDTH(FADC_LANES*FADC_BITS), .DEPTH(8)) u_cdc (
      .rst_n, .wclk(fadc_clk), .wr_en(dvalid), .wdata(xin), .full(xfull),
      .rclk(clk), .rd_en(!xempty), .rdata(xout), .empty(xempty)
    );
    assign fvalid[f] = !xempty;
    a_no_sample_lost: assert property (@(posedge fadc_clk) disable iff (!rst_n) !(dvalid && xfull));
  end

  localparam int unsigned DEW = TS_W + NCH + 3;
  logic               dtsq_empty, dtsq_full, dtsq_rd;
  logic [DEW-1:0]     dtsq_data;
  logic [NCH-1:0]     hit, eq_empty, eq_rd, wf_empty, wf_rd;
  energy_entry_t      eq_data [NCH];
  logic [15:0]        wf_data [NCH];
  logic [15:0]        ch_drop [NCH];

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    digital_channel #(
      .BITS(FADC_BITS), .RING(RING), .WF_DEPTH(WF_DEPTH), .EQ_DEPTH(EQ_DEPTH),
      .MWD_M(MWD_M), .MWD_L(MWD_L)
    ) u_ch (
      .clk, .rst_n,
      .s_en(fvalid[c / FADC_LANES]), .sample(fsample[c / FADC_LANES][c % FADC_LANES]),
      .baseline, .le_thresh, .le_hyst, .inv_tau, .e_thresh, .ws_len, .pre_len,
      .accept_ok(!dtsq_full),
      .hit(hit[c]),
      .eq_rd(eq_rd[c]), .eq_data(eq_data[c]), .eq_empty(eq_empty[c]),
      .wf_rd(wf_rd[c]), .wf_data(wf_data[c]), .wf_empty(wf_empty[c]),
      .drop_count(ch_drop[c])
    );
  end

  logic [$clog2(DTSQ_DEPTH+1)-1:0] dtsq_count;
  timestamp_queue #(.N_HIT(NCH), .DEPTH(DTSQ_DEPTH)) u_dtsq (
    .clk, .rst_n, .ts(timestamp), .hit, .flags,
    .rd_en(dtsq_rd), .rd_data(dtsq_data), .empty(dtsq_empty), .full(dtsq_full),
    .count(dtsq_count), .drop_count(dtsq_drop_count)
  );

  logic [15:0] s_data;
  logic        s_valid, s_last, s_ready;

  digital_readout_sm #(.N_CH(NCH), .LEN_W(RBW + 1)) u_dsm (
    .clk, .rst_n, .ws_len,
    .tsq_empty(dtsq_empty), .tsq_data(dtsq_data), .tsq_rd(dtsq_rd),
    .eq_empty, .eq_data, .eq_rd, .wf_empty, .wf_data, .wf_rd,
    .out_data(s_data), .out_valid(s_valid), .out_last(s_last), .out_ready(s_ready),
    .event_count(dig_event_count)
  );

  // ---------------- analogue readout ----------------
  logic [NA-1:0]     rd_avail, rd_done;
  logic [MAW:0]      rd_count [NA];
  logic [31:0]       rd_data [NA];
  logic [MAW-1:0]    rd_addr;
  logic [15:0]       a_tsq_drop [NA];
  logic [15:0]       a_swap [NA];

  for (genvar a = 0; a < NA; a++) begin : g_asic
    asic_readout #(
      .TSQ_DEPTH(ATSQ_DEPTH), .RAM_WORDS(RAM_WORDS), .CONV_CYCLES(CONV_CYCLES),
      .SCK_HALF(SCK_HALF), .TIMEOUT(RO_TIMEOUT)
    ) u_ro (
      .clk, .rst_n, .module_id, .asic_id(2'(a)), .ts(timestamp), .flags,
      .disc(asic_disc[a]),
      .ro_chan(ro_chan[a]), .ro_valid(ro_valid[a]), .ro_last(ro_last[a]), .ro_hold(ro_hold[a]),
      .ro_start(ro_start[a]), .ro_next(ro_next[a]), .ro_clr(ro_clr[a]), .ro_reset(ro_reset[a]),
      .adc_cnv(adc_cnv[a]), .adc_sck(adc_sck[a]), .adc_sdi(adc_sdi[a]), .adc_sdo(adc_sdo[a]),
      .flush(flush_tick),
      .rd_avail(rd_avail[a]), .rd_count(rd_count[a]), .rd_addr, .rd_data(rd_data[a]),
      .rd_done(rd_done[a]),
      .event_count(asic_event_count[a]), .timeout_count(asic_timeout_count[a]),
      .tsq_drop_count(a_tsq_drop[a]), .swap_count(a_swap[a])
    );
  end

  // ---------------- data transfer ----------------
  dma_engine #(.N_RAM(NA), .RAW(MAW), .PW(24)) u_dma (
    .clk, .rst_n,
    .rd_avail, .rd_count, .rd_addr, .rd_data, .rd_done,
    .s_data, .s_valid, .s_last, .s_ready,
    .m_we, .m_addr, .m_wdata, .m_ready,
    .ring_base, .ring_size, .sw_rd_ptr, .wr_ptr, .word_count(dma_word_count)
  );
endmodule
