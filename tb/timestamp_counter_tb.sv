// timestamp_counter_tb: checks counting, the load on a SYNC rising edge,
// that a held SYNC loads only once, and the sync_seen pulse.
module timestamp_counter_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic tick_en = 1, sync_in = 0, sync_seen;
  logic [47:0] sync_value = 48'h1234_5678_9ABC, ts;
  timestamp_counter #(.TS_W(48)) dut (.*);

  longint exp_ts;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    exp_ts = 0;
    for (int i = 0; i < 100; i++) begin
      @(posedge clk); #1 exp_ts++;
      check(ts == 48'(exp_ts), $sformatf("count %0d exp %0d", ts, exp_ts));
    end
    tick_en = 0;
    repeat (5) @(posedge clk);
    #1 check(ts == 48'(exp_ts), "hold when tick_en low");
    tick_en = 1;
    sync_in = 1;
    @(posedge clk); #1;
    check(ts == sync_value, "load on the first clock that sees SYNC high");
    check(sync_seen, "sync_seen pulse");
    exp_ts = longint'(sync_value);
    for (int i = 0; i < 20; i++) begin
      @(posedge clk); #1 exp_ts++;
      check(ts == 48'(exp_ts), "counts on while SYNC held");
      check(!sync_seen, "sync_seen only once");
    end
    sync_in = 0;
    sync_value = 48'hFFFF_FFFF_FFFE;
    repeat (3) @(posedge clk);
    #1 sync_in = 1;
    @(posedge clk); #1;
    check(ts == 48'hFFFF_FFFF_FFFE, "second load");
    repeat (2) @(posedge clk); #1;
    check(ts == 48'h0, "48-bit wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
