// flipflop_ram: the "flip-flop" (ping-pong) event store of one ASIC's
// analogue readout: two banks of WORDS x 32 (four 18 kbit block RAMs for the
// default 2 x 1024 x 32).
//
// The readout state machine writes words into the filling bank (wr_en, one
// word per cycle, held off by wr_full). The other bank, once handed over,
// is read by the data-transfer engine: rd_avail says a bank is waiting,
// rd_count how many words it holds, rd_data is the word at rd_addr one cycle
// after the address (block-RAM timing), and rd_done gives the bank back.
// Hand-over happens when the filling bank is full, or after a flush request
// (the processor's periodic tick) once it holds data, in both cases only when
// the reading side is free, no word is being written in that cycle and the
// fill level is a multiple of GRAIN, so that the two words of an event never
// land in different banks. flush is remembered until it is served.
// Bank sizes are the specification's; the hand-over rules are this design's.
module flipflop_ram #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned W     = 32,
  parameter int unsigned GRAIN = 2,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // write side
  input  logic          wr_en,
  input  logic [W-1:0]  wr_data,
  output logic          wr_full,
  // read side
  input  logic          flush,
  output logic          rd_avail,
  output logic [AW:0]   rd_count,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  input  logic          rd_done,
  output logic [15:0]   swap_count
);
  logic [W-1:0] mem [2*WORDS];
  logic         wbank;
  logic [AW:0]  wcount;
  logic         flush_req;

  assign wr_full = (wcount == (AW+1)'(WORDS));

  wire aligned = (32'(wcount) % GRAIN) == 0;
  wire swap    = !rd_avail && !wr_en && wcount != '0 && aligned &&
                 (wr_full || flush_req || flush);

  always_ff @(posedge clk) begin
    if (wr_en && !wr_full) mem[{wbank, wcount[AW-1:0]}] <= wr_data;
    rd_data <= mem[{~wbank, rd_addr}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank      <= 1'b0;
      wcount     <= '0;
      flush_req  <= 1'b0;
      rd_avail   <= 1'b0;
      rd_count   <= '0;
      swap_count <= '0;
    end else begin
      if (flush) flush_req <= 1'b1;
      if (wr_en && !wr_full) wcount <= wcount + 1'b1;
      if (rd_done) rd_avail <= 1'b0;
      if (swap) begin
        wbank      <= ~wbank;
        wcount     <= '0;
        rd_avail   <= 1'b1;
        rd_count   <= wcount;
        flush_req  <= 1'b0;
        swap_count <= swap_count + 1'b1;
      end
    end
  end

  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && wr_full));
endmodule
