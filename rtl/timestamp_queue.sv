// timestamp_queue: records when channels fired.
//
// Whenever any bit of hit[] is set, or a SYNC / pause / resume flag is raised,
// one entry {timestamp, hit mask, flags} is pushed into a FIFO; hits that
// fall in the same clock cycle share one entry. The readout state machine
// pops entries and builds events from them. With N_HIT = 64 and DEPTH = 1024
// this is the 1024 x (48 + 64 + 3) queue of the digital readout; with
// N_HIT = 16 it serves one ASIC's discriminators in the analogue readout.
//
// When the FIFO is full a new entry is lost and drop_count increments; full
// is also exported so that sources able to hold back can do so.
// Entry layout, MSB first: ts[TS_W-1:0], hit[N_HIT-1:0], {sync, pause, resume}.
module timestamp_queue
  import aida_pkg::*;
#(
  parameter int unsigned N_HIT = 64,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned EW = TS_W + N_HIT + 3,
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TS_W-1:0] ts,
  input  logic [N_HIT-1:0] hit,
  input  ts_flags_t       flags,
  input  logic            rd_en,
  output logic [EW-1:0]   rd_data,
  output logic            empty,
  output logic            full,
  output logic [CW-1:0]   count,
  output logic [15:0]     drop_count
);
  wire push = (|hit) || (|flags);

  sync_fifo #(.WIDTH(EW), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en  (push && !full),
    .wr_data({ts, hit, flags}),
    .rd_en,
    .rd_data,
    .full,
    .empty,
    .count
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) drop_count <= '0;
    else if (push && full && drop_count != '1) drop_count <= drop_count + 1'b1;
  end
endmodule
