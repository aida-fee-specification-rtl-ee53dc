// timestamp_counter: the board's 48-bit event clock.
//
// The timestamp gives every event a time relation to the rest of the
// experiment. It counts one per enabled cycle of the clock derived from the
// distributed BuTiS reference and is aligned by the system SYNC signal that
// arrives on the same cable: on a rising edge of sync_in the counter loads
// sync_value (normally zero), so all modules that saw the same SYNC edge agree
// on time. sync_in is taken as already synchronous to clk. sync_seen pulses for
// one cycle on that edge so the event logic can queue a SYNC marker.
// The counting rule and the load-on-SYNC alignment are this design's reading
// of "coordinated by the external clock system"; the width of 48 bits is the
// specification's.
module timestamp_counter #(
  parameter int unsigned TS_W = 48
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tick_en,     // count enable (1 = count every clk)
  input  logic            sync_in,     // system SYNC level
  input  logic [TS_W-1:0] sync_value,  // value loaded on a SYNC edge
  output logic [TS_W-1:0] ts,
  output logic            sync_seen
);
  logic sync_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts        <= '0;
      sync_d    <= 1'b0;
      sync_seen <= 1'b0;
    end else begin
      sync_d    <= sync_in;
      sync_seen <= sync_in && !sync_d;
      if (sync_in && !sync_d) ts <= sync_value;
      else if (tick_en)       ts <= ts + 1'b1;
    end
  end
endmodule
