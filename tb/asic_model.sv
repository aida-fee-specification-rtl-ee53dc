// asic_model: behavioural model of the readout side of one 16-channel ASIC,
// for simulation only. fire(mask, levels) pulses the discriminators of the
// channels in mask for 8 clocks and holds their analogue levels; ro_hold is
// high while channels are held. After ro_start rises the lowest held channel
// appears on ro_chan with ro_valid (ro_last if it is the last one); the
// analogue level of the channel on the multiplexer is on aout. Raising
// ro_next drops ro_valid and drops the channel; when ro_next falls the next
// one is presented after a few clocks. ro_clr and ro_reset release all held
// channels. mute = 1 makes the model ignore ro_start (no answer).
module asic_model (
  input  logic        clk,
  input  logic        ro_start,
  input  logic        ro_next,
  input  logic        ro_clr,
  input  logic        ro_reset,
  output logic [15:0] disc,
  output logic        disc_or,
  output logic [3:0]  ro_chan,
  output logic        ro_valid,
  output logic        ro_last,
  output logic        ro_hold,
  output logic [15:0] aout,
  input  logic        mute
);
  logic [15:0] held = '0;
  logic [15:0] level [16];
  int          disc_cnt = 0;
  int          delay = 0;
  logic        next_d = 1'b0, start_d = 1'b0;

  initial begin
    disc = '0; ro_chan = '0; ro_valid = 1'b0; ro_last = 1'b0;
    for (int i = 0; i < 16; i++) level[i] = '0;
  end

  task automatic fire(input logic [15:0] mask, input logic [15:0] lv [16]);
    for (int i = 0; i < 16; i++) if (mask[i]) level[i] = lv[i];
    held = held | mask;
    disc = mask;
    disc_cnt = 8;
  endtask

  function automatic logic [3:0] lowest(logic [15:0] m);
    lowest = 0;
    for (int i = 15; i >= 0; i--) if (m[i]) lowest = 4'(i);
  endfunction

  assign ro_hold = |held;
  assign disc_or = |disc;
  assign aout    = level[ro_chan];

  always @(posedge clk) begin
    if (disc_cnt > 0) begin
      disc_cnt--;
      if (disc_cnt == 0) disc = '0;
    end
    next_d  <= ro_next;
    start_d <= ro_start;
    if (ro_clr || ro_reset) begin
      held = '0; ro_valid <= 1'b0; delay = 0;
    end else if (ro_start && !start_d && held != 0 && !mute) begin
      delay = 5;
    end else if (ro_next && !next_d) begin
      held[ro_chan] = 1'b0;
      ro_valid <= 1'b0;
    end else if (!ro_next && next_d && held != 0) begin
      delay = 3;
    end
    if (delay > 0) begin
      delay--;
      if (delay == 0) begin
        ro_chan  <= lowest(held);
        ro_last  <= ($countones(held) == 1);
        ro_valid <= 1'b1;
      end
    end
  end
endmodule
