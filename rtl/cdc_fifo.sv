// cdc_fifo: small asynchronous FIFO that carries flash-ADC samples from the
// ADC bit-clock domain into the system clock domain.
//
// Write and read pointers count in Gray code; each side sees the other's
// pointer through a two-flop synchroniser, so only one bit changes per step
// and a pointer is never read half-updated. full is computed on the write
// side and empty on the read side from the synchronised pointers, both
// conservatively (a slot freed or filled on the other side shows up two or
// three clocks later). Data are held in a small register array written on
// wclk and read combinationally on rclk at the read pointer (first-word fall
// through: rdata is valid whenever empty is low; rd_en pops it).
// DEPTH must be a power of two. rst_n resets both sides asynchronously and
// must be released synchronously to each clock.
// The specification only says that the FPGA converts the ADC's serial data to
// parallel form with the ADC's 350 MHz clock and frame; moving the samples
// into the logic clock through this FIFO is this design's choice.
module cdc_fifo #(
  parameter int unsigned WIDTH = 112,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             rst_n,
  // write side
  input  logic             wclk,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  // read side
  input  logic             rclk,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen on the read side
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen on the write side

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  wire [AW:0] wbin_next = wbin + (AW+1)'(wr_en && !full);
  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_next;
      wgray    <= bin2gray(wbin_next);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end
  always_ff @(posedge wclk) if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  // full: the write pointer is one lap ahead of the read pointer
  assign full = wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]};

  // read side
  wire [AW:0] rbin_next = rbin + (AW+1)'(rd_en && !empty);
  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_next;
      rgray    <= bin2gray(rbin_next);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
  assign empty = rgray == wgray_r2;
  assign rdata = mem[rbin[AW-1:0]];

  a_no_overflow:  assert property (@(posedge wclk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rst_n) !(rd_en && empty));
endmodule
