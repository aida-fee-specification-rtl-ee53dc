// digital_readout_sm: builds digital-readout events and sends them as a
// 16-bit word stream towards processor memory.
//
// It pops one entry {timestamp, hit mask, flags} from the timestamp queue.
// If a flag (SYNC, pause, resume) is set it first emits a 4-word INFO record:
//   {4'hE, 9'b0, sync, pause, resume}, ts[47:32], ts[31:16], ts[15:0].
// Then, for every channel whose bit is set in the hit mask (lowest first),
// it pops the channel's energy queue and emits an event of 8 header words
// (four 32-bit words) followed by the waveform:
//   h0 {4'hD, 2'b00, channel[5:0], quality[3:0]}
//   h1..h3 timestamp, most significant word first
//   h4, h5 energy, most significant word first
//   h6 number of waveform words that follow (ws_len, or 0 if quality.wave_ok is 0)
//   h7 number of channels hit in this timestamp entry
// Waveform words come from the channel's waveform FIFO, waiting while it is
// still being filled. out_last marks the final word of each record; the stream
// moves on out_valid && out_ready (valid/ready handshake, data held while
// stalled). Event content (energy, time, ident, quality, waveform) and the
// 16-bit path follow the specification; the word layout is this design's.
module digital_readout_sm
  import aida_pkg::*;
#(
  parameter int unsigned N_CH  = 64,
  parameter int unsigned LEN_W = 11,
  localparam int unsigned CHW  = $clog2(N_CH),
  localparam int unsigned EW   = TS_W + N_CH + 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LEN_W-1:0] ws_len,
  // timestamp queue
  input  logic             tsq_empty,
  input  logic [EW-1:0]    tsq_data,
  output logic             tsq_rd,
  // channel queues
  input  logic [N_CH-1:0]  eq_empty,
  input  energy_entry_t    eq_data [N_CH],
  output logic [N_CH-1:0]  eq_rd,
  input  logic [N_CH-1:0]  wf_empty,
  input  logic [15:0]      wf_data [N_CH],
  output logic [N_CH-1:0]  wf_rd,
  // event stream
  output logic [15:0]      out_data,
  output logic             out_valid,
  output logic             out_last,
  input  logic             out_ready,
  output logic [31:0]      event_count
);
  typedef enum logic [2:0] {S_IDLE, S_INFO, S_NEXT, S_HDR, S_WAVE} state_t;
  state_t state;

  logic [TS_W-1:0] ts;
  logic [N_CH-1:0] mask;
  ts_flags_t       flags;
  logic [CHW-1:0]  ch;
  energy_entry_t   ent;
  logic [2:0]      widx;       // header / info word index
  logic [LEN_W-1:0] wleft;     // waveform words still to send
  logic [CHW:0]    mult;

  function automatic logic [CHW-1:0] first_set(logic [N_CH-1:0] m);
    first_set = '0;
    for (int i = N_CH - 1; i >= 0; i--) if (m[i]) first_set = CHW'(i);
  endfunction

  function automatic logic [CHW:0] popcount(logic [N_CH-1:0] m);
    popcount = '0;
    for (int i = 0; i < N_CH; i++) popcount = popcount + (CHW+1)'(m[i]);
  endfunction

  wire [LEN_W-1:0] wave_len = ent.qual.wave_ok ? ws_len : '0;
  wire             fire     = out_valid && out_ready;

  // output word
  always_comb begin
    out_data  = '0;
    out_valid = 1'b0;
    out_last  = 1'b0;
    unique case (state)
      S_INFO: begin
        out_valid = 1'b1;
        unique case (widx[1:0])
          2'd0: out_data = {DIG_INFO_MARK, 9'b0, flags};
          2'd1: out_data = ts[47:32];
          2'd2: out_data = ts[31:16];
          default: out_data = ts[15:0];
        endcase
        out_last = (widx[1:0] == 2'd3);
      end
      S_HDR: begin
        out_valid = 1'b1;
        unique case (widx)
          3'd0: out_data = {DIG_EVT_MARK, 2'b00, 6'(ch), ent.qual};
          3'd1: out_data = ts[47:32];
          3'd2: out_data = ts[31:16];
          3'd3: out_data = ts[15:0];
          3'd4: out_data = ent.energy[31:16];
          3'd5: out_data = ent.energy[15:0];
          3'd6: out_data = 16'(wave_len);
          default: out_data = 16'(mult);
        endcase
        out_last = (widx == 3'd7) && (wave_len == '0);
      end
      S_WAVE: begin
        out_valid = !wf_empty[ch];
        out_data  = wf_data[ch];
        out_last  = (wleft == LEN_W'(1));
      end
      default: ;
    endcase
  end

  always_comb begin
    tsq_rd = (state == S_IDLE) && !tsq_empty;
    eq_rd  = '0;
    wf_rd  = '0;
    if (state == S_NEXT && mask != '0 && !eq_empty[first_set(mask)]) eq_rd[first_set(mask)] = 1'b1;
    if (state == S_WAVE && fire) wf_rd[ch] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ts <= '0; mask <= '0; flags <= '0; ch <= '0; ent <= '0;
      widx <= '0; wleft <= '0; mult <= '0; event_count <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (!tsq_empty) begin
          {ts, mask, flags} <= tsq_data;
          mult <= popcount(tsq_data[N_CH+2:3]);
          widx <= '0;
          state <= (|tsq_data[2:0]) ? S_INFO : S_NEXT;
        end
        S_INFO: if (fire) begin
          widx <= widx + 1'b1;
          if (widx[1:0] == 2'd3) begin
            widx  <= '0;
            state <= S_NEXT;
          end
        end
        S_NEXT: begin
          if (mask == '0) state <= S_IDLE;
          else if (!eq_empty[first_set(mask)]) begin
            ch    <= first_set(mask);
            ent   <= eq_data[first_set(mask)];
            mask[first_set(mask)] <= 1'b0;
            widx  <= '0;
            state <= S_HDR;
          end
        end
        S_HDR: if (fire) begin
          widx <= widx + 1'b1;
          if (widx == 3'd7) begin
            event_count <= event_count + 1'b1;
            wleft <= wave_len;
            state <= (wave_len == '0) ? S_NEXT : S_WAVE;
          end
        end
        S_WAVE: if (fire) begin
          wleft <= wleft - 1'b1;
          if (wleft == LEN_W'(1)) state <= S_NEXT;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_stream_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));
endmodule
