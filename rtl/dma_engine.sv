// dma_engine: internal data transfer from the event stores into processor
// memory.
//
// Sources: N_RAM flip-flop event RAMs of the analogue readouts and the 16-bit
// event stream of the digital readout. Destination: a ring buffer of
// ring_size 32-bit words starting at word address ring_base in processor
// memory, written through a simple port (m_we, m_addr, m_wdata, stalled by
// !m_ready). Software reports how far it has read with sw_rd_ptr (an offset
// into the ring); wr_ptr is the offset of the next word to be written. One
// ring word stays empty so that wr_ptr == sw_rd_ptr always means "empty".
//
// A round-robin arbiter serves whole units: a full bank of a flip-flop RAM, or
// one complete event of the stream (up to out_last).
//   bank:   header {4'hA, source[3:0], 8'h00, word count[15:0]}, then the words,
//           one per cycle while memory accepts; the bank is then returned
//           (rd_done). A bank is only started when the ring has room for it.
//   stream: 16-bit words are packed two per 32-bit word, first in the upper
//           half; an event of odd length is padded with 16'h0000.
// At one word per 100 MHz cycle a full bank of 1024 words moves in about
// 10 us, the rate the specification plans for. The ring format, headers and
// arbitration are this design's.
module dma_engine #(
  parameter int unsigned N_RAM = 4,
  parameter int unsigned RAW   = 10,          // bank address width
  parameter int unsigned PW    = 24           // ring offset width
) (
  input  logic              clk,
  input  logic              rst_n,
  // flip-flop RAM read sides
  input  logic [N_RAM-1:0]  rd_avail,
  input  logic [RAW:0]      rd_count [N_RAM],
  output logic [RAW-1:0]    rd_addr,
  input  logic [31:0]       rd_data  [N_RAM],
  output logic [N_RAM-1:0]  rd_done,
  // digital readout stream
  input  logic [15:0]       s_data,
  input  logic              s_valid,
  input  logic              s_last,
  output logic              s_ready,
  // processor memory
  output logic              m_we,
  output logic [31:0]       m_addr,
  output logic [31:0]       m_wdata,
  input  logic              m_ready,
  // ring control
  input  logic [31:0]       ring_base,
  input  logic [PW-1:0]     ring_size,
  input  logic [PW-1:0]     sw_rd_ptr,
  output logic [PW-1:0]     wr_ptr,
  output logic [31:0]       word_count
);
  localparam int unsigned NS = N_RAM + 1;   // source N_RAM is the stream
  localparam int unsigned SW = $clog2(NS);

  typedef enum logic [2:0] {S_ARB, S_HDR, S_BLK, S_DONE, S_STR} state_t;
  state_t state;

  localparam int unsigned BW = (N_RAM > 1) ? $clog2(N_RAM) : 1;

  logic [SW-1:0]   cur, rr;
  logic [BW-1:0]   bank;       // cur as a bank index (cur < N_RAM in the bank states)
  logic [BW-1:0]   pick_bank;
  logic [RAW-1:0]  a;
  logic [RAW:0]    left;
  logic [15:0]     hi;
  logic            have_hi;

  // ring space
  logic [PW-1:0] used, free;
  always_comb begin
    used = (wr_ptr >= sw_rd_ptr) ? wr_ptr - sw_rd_ptr : ring_size - sw_rd_ptr + wr_ptr;
    free = ring_size - used - 1'b1;
  end
  wire can_write = m_ready && (free != '0);

  // requests
  logic [NS-1:0] req;
  always_comb begin
    for (int i = 0; i < N_RAM; i++)
      req[i] = rd_avail[i] && (32'(free) > 32'(rd_count[i]));
    req[N_RAM] = s_valid;
  end

  logic [SW-1:0] pick;
  logic          any;
  always_comb begin
    pick = '0;
    any  = 1'b0;
    for (int k = NS; k >= 1; k--) begin
      int unsigned idx;
      idx = (32'(rr) + 32'(k)) % NS;
      if (req[idx]) begin
        pick = SW'(idx);
        any  = 1'b1;
      end
    end
  end

  assign bank      = BW'(cur);
  assign pick_bank = BW'(pick);

  // memory write and stream acceptance
  always_comb begin
    m_we    = 1'b0;
    m_wdata = '0;
    s_ready = 1'b0;
    rd_addr = a;
    rd_done = '0;
    unique case (state)
      S_HDR: begin
        m_we    = free != '0;
        m_wdata = {aida_pkg::DMA_BLK_MARK, 4'(cur), 8'h00, 16'(rd_count[bank])};
      end
      S_BLK: begin
        m_we    = free != '0;
        m_wdata = rd_data[bank];
        if (m_we && m_ready) rd_addr = a + 1'b1;
      end
      S_STR: begin
        if (!have_hi) begin
          s_ready = s_last ? can_write : 1'b1;
          m_we    = s_valid && s_last && (free != '0);
          m_wdata = {s_data, 16'h0000};
        end else begin
          s_ready = can_write;
          m_we    = s_valid && (free != '0);
          m_wdata = {hi, s_data};
        end
      end
      S_DONE: rd_done[bank] = 1'b1;
      default: ;
    endcase
  end

  assign m_addr = ring_base + 32'(wr_ptr);
  wire   wfire  = m_we && m_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_ARB; cur <= '0; rr <= SW'(NS - 1); a <= '0; left <= '0;
      hi <= '0; have_hi <= 1'b0; wr_ptr <= '0; word_count <= '0;
    end else begin
      if (wfire) begin
        wr_ptr     <= (32'(wr_ptr) + 1 == 32'(ring_size)) ? '0 : wr_ptr + 1'b1;
        word_count <= word_count + 1'b1;
      end
      unique case (state)
        S_ARB: if (any) begin
          cur <= pick;
          rr  <= pick;
          a   <= '0;
          if (32'(pick) == N_RAM) begin
            have_hi <= 1'b0;
            state   <= S_STR;
          end else begin
            left  <= rd_count[pick_bank];
            state <= S_HDR;
          end
        end
        S_HDR: if (wfire) state <= (left == '0) ? S_DONE : S_BLK;
        S_BLK: if (wfire) begin
          a    <= a + 1'b1;
          left <= left - 1'b1;
          if (left == (RAW+1)'(1)) state <= S_DONE;
        end
        S_DONE: state <= S_ARB;
        S_STR: if (s_valid && s_ready) begin
          if (!have_hi) begin
            if (s_last) state <= S_ARB;
            else begin
              hi      <= s_data;
              have_hi <= 1'b1;
            end
          end else begin
            have_hi <= 1'b0;
            if (s_last) state <= S_ARB;
          end
        end
        default: state <= S_ARB;
      endcase
    end
  end
endmodule
