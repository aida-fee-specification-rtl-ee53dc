// circ_buffer: the "slow in, fast out" circulating waveform buffer of one
// flash-ADC channel.
//
// Every sample (s_en) is written into a DEPTH-entry ring (1024 samples, about
// 20 us at the ADC rate). wr_pos is the ring address being written in the
// current cycle; the channel latches it when its discriminator fires.
// A capture request (cap_start with cap_pos = latched trigger address) copies
// ws_len samples starting pre_len samples before cap_pos into the waveform
// FIFO, one sample per clock (faster than samples arrive), waiting for
// samples that have not been written yet. The request is accepted
// (cap_accept, same cycle) only if no capture is running, ws_len is not zero
// and the FIFO has room (fifo_free >= ws_len); otherwise the waveform is
// skipped and the event is marked as having none.
// FIFO words are {2'b00, sample}. The ring is read one cycle after its
// address is issued (block-RAM style). pre_len plus the time between trigger
// and request must stay below DEPTH - ws_len or the oldest samples are lost.
// Ring length and FIFO width follow the specification; the pre-trigger
// offset and the accept rule are this design's.
module circ_buffer #(
  parameter int unsigned BITS  = 14,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned FW    = 16,     // waveform FIFO word width
  parameter int unsigned FCW   = 12,     // width of fifo_free
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            s_en,
  input  logic [BITS-1:0] sample,
  output logic [AW-1:0]   wr_pos,
  input  logic            cap_start,
  input  logic [AW-1:0]   cap_pos,
  input  logic [AW:0]     ws_len,
  input  logic [AW-1:0]   pre_len,
  input  logic [FCW-1:0]  fifo_free,
  output logic            cap_accept,
  output logic            busy,
  output logic            fifo_wr,
  output logic [FW-1:0]   fifo_data
);
  logic [BITS-1:0] ring [DEPTH];
  logic [AW-1:0]   rd_pos;
  logic [AW:0]     remaining;
  logic [BITS-1:0] rd_q;
  logic            rd_v;

  assign cap_accept = cap_start && !busy && (ws_len != '0) &&
                      (32'(fifo_free) >= 32'(ws_len));

  wire can_read = busy && (remaining != '0) && (rd_pos != wr_pos);

  always_ff @(posedge clk) begin
    if (s_en) ring[wr_pos] <= sample;
    if (can_read) rd_q <= ring[rd_pos];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pos    <= '0;
      rd_pos    <= '0;
      remaining <= '0;
      busy      <= 1'b0;
      rd_v      <= 1'b0;
    end else begin
      if (s_en) wr_pos <= wr_pos + 1'b1;
      rd_v <= can_read;
      if (cap_accept) begin
        busy      <= 1'b1;
        rd_pos    <= cap_pos - pre_len;
        remaining <= ws_len;
      end else if (busy) begin
        if (can_read) begin
          rd_pos    <= rd_pos + 1'b1;
          remaining <= remaining - 1'b1;
        end
        if (remaining == '0 && !rd_v) busy <= 1'b0;
      end
    end
  end

  assign fifo_wr   = rd_v;
  assign fifo_data = FW'(rd_q);
endmodule
