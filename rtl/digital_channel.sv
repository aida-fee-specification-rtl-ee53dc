// digital_channel: processing of one detector strip digitised by the flash
// ADC ("one of 64" in the digital readout).
//
// Samples (s_en strobe) feed three blocks in parallel: the circulating
// waveform buffer, the leading-edge discriminator and the MWD energy filter.
// When the discriminator fires, the ring address of that sample is latched
// and the filter opens its window. When the filter reports, the channel
// accepts the event only if the energy reaches e_thresh (discriminator and
// filter agree), the shared timestamp queue has room (accept_ok) and the
// channel's energy queue is not full. An accepted event
//   - raises hit for one cycle (the timestamp queue records the time),
//   - pushes {quality, energy} into the 10 x 36 energy queue, and
//   - asks the circulating buffer to copy the waveform into the 3072 x 16
//     waveform FIFO; if the buffer is busy or the FIFO lacks room the event
//     goes without a waveform and quality.wave_ok is 0.
// Refused events are counted in drop_count. The readout state machine pops
// the queues through the eq_* and wf_* ports (first-word fall-through).
// Queue sizes are the specification's; the acceptance rule is this design's
// reading of "when LE discriminator and MWD logic agree".
module digital_channel
  import aida_pkg::*;
#(
  parameter int unsigned BITS     = FADC_BITS,
  parameter int unsigned RING     = 1024,
  parameter int unsigned WF_DEPTH = 3072,
  parameter int unsigned EQ_DEPTH = 10,
  parameter int unsigned MWD_M    = 128,
  parameter int unsigned MWD_L    = 64,
  localparam int unsigned RAW     = $clog2(RING),
  localparam int unsigned WCW     = $clog2(WF_DEPTH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 s_en,
  input  logic [BITS-1:0]      sample,
  // configuration
  input  logic [BITS-1:0]      baseline,
  input  logic signed [BITS:0] le_thresh,
  input  logic [BITS-1:0]      le_hyst,
  input  logic [15:0]          inv_tau,
  input  logic [31:0]          e_thresh,
  input  logic [RAW:0]         ws_len,
  input  logic [RAW-1:0]       pre_len,
  input  logic                 accept_ok,
  // events
  output logic                 hit,
  input  logic                 eq_rd,
  output energy_entry_t        eq_data,
  output logic                 eq_empty,
  input  logic                 wf_rd,
  output logic [15:0]          wf_data,
  output logic                 wf_empty,
  output logic [15:0]          drop_count
);
  logic            le_trig, le_above;
  logic            mwd_done, mwd_pileup, mwd_ovf;
  logic [31:0]     mwd_energy_v;
  logic signed [47:0] trap;
  logic [RAW-1:0]  wr_pos, trig_pos;
  logic            pending;
  logic            cap_accept, cap_busy, wf_wr;
  logic [15:0]     wf_wdata;
  logic            eq_full;
  logic [WCW-1:0]  wf_count;
  logic [$clog2(EQ_DEPTH+1)-1:0] eq_count;

  le_disc #(.BITS(BITS)) u_le (
    .clk, .rst_n, .s_en, .sample, .baseline,
    .threshold(le_thresh), .hysteresis(le_hyst),
    .trig(le_trig), .above(le_above)
  );

  mwd_energy #(.BITS(BITS), .M(MWD_M), .L(MWD_L)) u_mwd (
    .clk, .rst_n, .s_en, .sample, .baseline, .inv_tau,
    .trig(le_trig), .done(mwd_done), .energy(mwd_energy_v),
    .pileup(mwd_pileup), .energy_ovf(mwd_ovf), .trap
  );

  wire accept = mwd_done && (mwd_energy_v >= e_thresh) && accept_ok && !eq_full;

  circ_buffer #(.BITS(BITS), .DEPTH(RING), .FW(16), .FCW(WCW)) u_ring (
    .clk, .rst_n, .s_en, .sample, .wr_pos,
    .cap_start(accept), .cap_pos(trig_pos), .ws_len, .pre_len,
    .fifo_free(WCW'(WF_DEPTH) - wf_count),
    .cap_accept, .busy(cap_busy),
    .fifo_wr(wf_wr), .fifo_data(wf_wdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending    <= 1'b0;
      trig_pos   <= '0;
      drop_count <= '0;
    end else begin
      if (mwd_done) pending <= 1'b0;
      else if (le_trig && !pending) begin
        pending  <= 1'b1;
        trig_pos <= wr_pos;
      end
      if (mwd_done && (mwd_energy_v >= e_thresh) && !accept && drop_count != '1)
        drop_count <= drop_count + 1'b1;
    end
  end

  assign hit = accept;

  energy_entry_t eq_in;
  always_comb begin
    eq_in.energy          = mwd_energy_v;
    eq_in.qual.reserved   = 1'b0;
    eq_in.qual.energy_ovf = mwd_ovf;
    eq_in.qual.wave_ok    = cap_accept;
    eq_in.qual.pileup     = mwd_pileup;
  end

  sync_fifo #(.WIDTH($bits(energy_entry_t)), .DEPTH(EQ_DEPTH)) u_eq (
    .clk, .rst_n, .wr_en(accept), .wr_data(eq_in),
    .rd_en(eq_rd), .rd_data(eq_data), .full(eq_full), .empty(eq_empty), .count(eq_count)
  );

  sync_fifo #(.WIDTH(16), .DEPTH(WF_DEPTH)) u_wf (
    .clk, .rst_n, .wr_en(wf_wr), .wr_data(wf_wdata),
    .rd_en(wf_rd), .rd_data(wf_data), .full(), .empty(wf_empty), .count(wf_count)
  );
endmodule
