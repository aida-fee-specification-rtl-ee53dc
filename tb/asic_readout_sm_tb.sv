// asic_readout_sm_tb: the readout state machine against the ASIC model and a
// simple converter stand-in (value of the multiplexed output after 10
// clocks). Checks the event words written for a multi-channel readout
// (time MSB info first, then one ADC event per held channel with the entry's
// time), SYNC/pause info events, that the time MSB event is not repeated,
// back-pressure from a full event RAM, and the timeout with ro_reset when the
// ASIC does not answer.
module asic_readout_sm_tb;
  import aida_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [5:0] module_id = 6'd17;
  logic [1:0] asic_id = 2'd2;
  logic tsq_empty, tsq_rd;
  logic [66:0] tsq_data;
  logic [3:0] ro_chan;
  logic ro_valid, ro_last, ro_hold, ro_start, ro_next, ro_clr, ro_reset;
  logic adc_start, adc_done = 0;
  logic [15:0] adc_data = 0;
  logic ev_wr, ev_full = 0;
  logic [31:0] ev_data, event_count;
  logic [15:0] timeout_count;
  logic [15:0] disc, aout;
  logic disc_or, mute = 0;

  asic_readout_sm #(.TIMEOUT(200), .N_DISC(16)) dut (.*);
  asic_model asic (.clk, .ro_start, .ro_next, .ro_clr, .ro_reset, .disc, .disc_or,
                   .ro_chan, .ro_valid, .ro_last, .ro_hold, .aout, .mute);

  // converter stand-in
  int adc_cnt = 0;
  always @(posedge clk) begin
    adc_done <= 0;
    if (adc_start) adc_cnt <= 10;
    else if (adc_cnt > 0) begin
      adc_cnt <= adc_cnt - 1;
      if (adc_cnt == 1) begin adc_done <= 1; adc_data <= aout; end
    end
  end

  logic [66:0] tq[$];
  assign tsq_empty = tq.size() == 0;
  assign tsq_data  = tsq_empty ? '0 : tq[0];
  always @(posedge clk) begin
    logic t; t = tsq_rd; #1; if (t) void'(tq.pop_front());
  end

  logic [31:0] got[$];
  always @(posedge clk) begin
    ev_full <= ($urandom % 5) == 0;
    if (ev_wr) got.push_back(ev_data);
  end

  logic [31:0] expq[$];
  task automatic expect_pair(input logic [31:0] w0, input logic [47:0] ts);
    expq.push_back(w0); expq.push_back({4'b0, ts[27:0]});
  endtask
  task automatic compare(input string what);
    check(got.size() == expq.size(), $sformatf("%s: %0d words exp %0d", what, got.size(), expq.size()));
    foreach (expq[i]) if (i < got.size())
      check(got[i] == expq[i], $sformatf("%s: word %0d %h exp %h", what, i, got[i], expq[i]));
    got.delete(); expq.delete();
  endtask

  initial begin
    logic [15:0] lv [16];
    logic [47:0] t1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) lv[i] = 16'(1000 * i + 7);
    // readout of channels 1, 5, 12
    t1 = 48'h0000_1234_5678_9;
    @(negedge clk);
    asic.fire(16'b0001_0000_0010_0010, lv);
    tq.push_back({t1, 16'b0001_0000_0010_0010, 3'b000});
    expect_pair({EVT_INFO, module_id, INFO_TSMSB, t1[47:28]}, t1);
    foreach (lv[i]) if (i == 1 || i == 5 || i == 12)
      expect_pair({EVT_ADC, 2'b00, module_id, asic_id, 4'(i), lv[i]}, t1);
    repeat (400) @(negedge clk);
    compare("readout");
    check(event_count == 3, "three ADC events");
    check(!ro_hold, "ASIC released by ro_clr");
    // SYNC and pause flags, same time MSBs: no new TSMSB event
    tq.push_back({t1 + 48'd100, 16'h0, 3'b110});
    expect_pair({EVT_INFO, module_id, INFO_SYNC, t1[47:28]}, t1 + 48'd100);
    expect_pair({EVT_INFO, module_id, INFO_PAUSE, t1[47:28]}, t1 + 48'd100);
    repeat (50) @(negedge clk);
    compare("flags");
    // ASIC does not answer: timeout and reset
    mute = 1;
    asic.fire(16'h0008, lv);
    tq.push_back({t1 + 48'd200, 16'h0008, 3'b000});
    repeat (500) @(negedge clk);
    check(timeout_count == 1, $sformatf("timeout count %0d", timeout_count));
    check(!ro_hold, "ASIC reset after timeout");
    compare("timeout");
    mute = 0;
    // readout still works after the timeout; new time MSBs
    t1 = 48'h0000_2000_0000_0;
    asic.fire(16'h8000, lv);
    tq.push_back({t1, 16'h8000, 3'b001});
    expect_pair({EVT_INFO, module_id, INFO_TSMSB, t1[47:28]}, t1);
    expect_pair({EVT_INFO, module_id, INFO_RESUME, t1[47:28]}, t1);
    expect_pair({EVT_ADC, 2'b00, module_id, asic_id, 4'd15, lv[15]}, t1);
    repeat (200) @(negedge clk);
    compare("after timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
