// asic_readout_sm: analogue readout of one 16-channel ASIC ("one of 4").
//
// The ASIC's discriminators are time-stamped by a timestamp queue; this state
// machine pops one queue entry at a time and turns it into two-word events in
// the flip-flop event RAM:
//   1. If bits 47..28 of the entry's time differ from those last written, an
//      INFO event with code TSMSB carries them (the time word holds only bits
//      27..0).
//   2. For each of SYNC, pause, resume set in the entry, an INFO event.
//   3. If any discriminator bit is set, the ASIC's multiplexed analogue
//      output is read: once the ASIC signals held channels (ro_hold),
//      ro_start is raised; for every channel the ASIC
//      presents (ro_valid with its number on ro_chan) the serial ADC converts
//      the level and an ADC event {channel = ASIC * 16 + ro_chan, value} is
//      written with the entry's time. Unless ro_last marked that channel as
//      the last one, ro_next is raised until ro_valid falls (four-phase
//      handshake) and the next channel is awaited. After the last channel
//      ro_start falls and ro_clr is pulsed for one cycle to release the
//      ASIC's held channels.
// If the ASIC does not answer within TIMEOUT cycles, ro_reset is pulsed,
// timeout_count increments and the readout is abandoned. Writes wait while the
// event RAM is full.
// Event words (see aida_pkg): ADC {2'b11, 2'b00, module, channel, value},
// INFO {2'b10, module, code, ts[47:28]}; second word {4'b0, ts[27:0]}.
// The seven readout-information and four readout-control signals, their
// count and purpose, and the two-word event follow the specification; the
// handshake, the field layout and the timeout are this design's.
module asic_readout_sm
  import aida_pkg::*;
#(
  parameter int unsigned TIMEOUT = 4096,
  parameter int unsigned N_DISC  = ASIC_CH,
  localparam int unsigned EW     = TS_W + N_DISC + 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [5:0]   module_id,
  input  logic [1:0]   asic_id,
  // timestamp queue
  input  logic         tsq_empty,
  input  logic [EW-1:0] tsq_data,
  output logic         tsq_rd,
  // ASIC readout information (7 signals)
  input  logic [3:0]   ro_chan,
  input  logic         ro_valid,
  input  logic         ro_last,
  input  logic         ro_hold,     // ASIC holds channels waiting for readout
  // ASIC readout control (4 signals)
  output logic         ro_start,
  output logic         ro_next,
  output logic         ro_clr,
  output logic         ro_reset,
  // serial ADC
  output logic         adc_start,
  input  logic         adc_done,
  input  logic [15:0]  adc_data,
  // event RAM
  output logic         ev_wr,
  output logic [31:0]  ev_data,
  input  logic         ev_full,
  // status
  output logic [31:0]  event_count,
  output logic [15:0]  timeout_count
);
  typedef enum logic [3:0] {
    S_IDLE, S_MSB, S_FLAGS, S_START, S_WAITV, S_CONV, S_NEXT, S_CLR, S_W0, S_W1
  } state_t;
  state_t state, ret;

  logic [TS_W-1:0] ts;
  logic [N_DISC-1:0] hits;
  ts_flags_t       flags;
  logic [19:0]     last_msb;
  logic            msb_known;
  logic [31:0]     w0;
  logic [$clog2(TIMEOUT+1)-1:0] tmo;
  logic            last_chan;

  wire timed_out = (tmo == $bits(tmo)'(TIMEOUT));

  always_comb begin
    tsq_rd  = (state == S_IDLE) && !tsq_empty;
    ev_wr   = ((state == S_W0) || (state == S_W1)) && !ev_full;
    ev_data = (state == S_W0) ? w0 : ts_word1(ts);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ret <= S_IDLE;
      ts <= '0; hits <= '0; flags <= '0; last_msb <= '0; msb_known <= 1'b0;
      w0 <= '0; tmo <= '0; last_chan <= 1'b0;
      ro_start <= 1'b0; ro_next <= 1'b0; ro_clr <= 1'b0; ro_reset <= 1'b0;
      adc_start <= 1'b0; event_count <= '0; timeout_count <= '0;
    end else begin
      adc_start <= 1'b0;
      ro_clr    <= 1'b0;
      ro_reset  <= 1'b0;
      unique case (state)
        S_IDLE: if (!tsq_empty) begin
          {ts, hits, flags} <= tsq_data;
          state <= S_MSB;
        end
        S_MSB: begin
          if (!msb_known || last_msb != ts[47:28]) begin
            msb_known <= 1'b1;
            last_msb  <= ts[47:28];
            w0        <= info_word0(module_id, INFO_TSMSB, ts);
            ret       <= S_FLAGS;
            state     <= S_W0;
          end else state <= S_FLAGS;
        end
        S_FLAGS: begin
          ret   <= S_FLAGS;
          tmo   <= '0;
          state <= S_W0;
          if (flags.sync) begin
            flags.sync <= 1'b0;
            w0 <= info_word0(module_id, INFO_SYNC, ts);
          end else if (flags.pause) begin
            flags.pause <= 1'b0;
            w0 <= info_word0(module_id, INFO_PAUSE, ts);
          end else if (flags.resume) begin
            flags.resume <= 1'b0;
            w0 <= info_word0(module_id, INFO_RESUME, ts);
          end else begin
            state <= (hits != '0) ? S_START : S_IDLE;
          end
        end
        S_START: begin
          if (ro_hold) begin
            ro_start <= 1'b1;
            tmo      <= '0;
            state    <= S_WAITV;
          end else if (timed_out) begin
            ro_reset      <= 1'b1;
            timeout_count <= timeout_count + 1'b1;
            state         <= S_IDLE;
          end else tmo <= tmo + 1'b1;
        end
        S_WAITV: begin
          if (ro_valid && !ro_next) begin
            adc_start <= 1'b1;
            last_chan <= ro_last;
            w0        <= adc_word0(module_id, {asic_id, ro_chan}, 16'h0);
            state     <= S_CONV;
          end else if (ro_next && !ro_valid) begin
            ro_next <= 1'b0;
            tmo     <= '0;
          end else if (timed_out) begin
            ro_start      <= 1'b0;
            ro_next       <= 1'b0;
            ro_reset      <= 1'b1;
            timeout_count <= timeout_count + 1'b1;
            state         <= S_IDLE;
          end else tmo <= tmo + 1'b1;
        end
        S_CONV: if (adc_done) begin
          w0[15:0] <= adc_data;
          ret      <= last_chan ? S_CLR : S_NEXT;
          event_count <= event_count + 1'b1;
          state    <= S_W0;
        end
        S_NEXT: begin
          ro_next <= 1'b1;
          tmo     <= '0;
          state   <= S_WAITV;
        end
        S_CLR: begin
          ro_start <= 1'b0;
          ro_clr   <= 1'b1;
          state    <= S_IDLE;
        end
        S_W0: if (!ev_full) state <= S_W1;
        S_W1: if (!ev_full) state <= ret;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
