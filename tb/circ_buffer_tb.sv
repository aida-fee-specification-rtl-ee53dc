// circ_buffer_tb: samples equal to their own index are written every other
// clock; captures must deliver exactly ws_len samples starting pre_len before
// the trigger address, waiting for samples not yet written, and otherwise at
// one word per clock. Requests while busy, with ws_len = 0 or without FIFO
// room are refused.
module circ_buffer_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic s_en = 0, cap_start = 0, cap_accept, busy, fifo_wr;
  logic [13:0] sample = 0;
  logic [5:0] wr_pos, cap_pos = 0, pre_len = 4;
  logic [6:0] ws_len = 12;
  logic [11:0] fifo_free = 100;
  logic [15:0] fifo_data;
  circ_buffer #(.BITS(14), .DEPTH(64), .FW(16), .FCW(12)) dut (.*);

  // sample index n is written at ring address n % 64
  int n = 0;
  always @(posedge clk) begin
    s_en <= ~s_en;
    if (s_en) begin n <= n + 1; sample <= 14'(n + 1); end
  end

  int got[$];
  int wr_cycles[$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (fifo_wr) begin got.push_back(int'(fifo_data)); wr_cycles.push_back(cyc); end
  end

  task automatic capture_at(input int trig_n, input int len, input int pre);
    int start;
    got.delete(); wr_cycles.delete();
    @(negedge clk);
    cap_pos = 6'(trig_n); ws_len = 7'(len); pre_len = 6'(pre); cap_start = 1;
    #1 check(cap_accept, "capture accepted");
    @(negedge clk) cap_start = 0;
    wait (!busy);
    start = trig_n - pre;
    check(got.size() == len, $sformatf("captured %0d words exp %0d", got.size(), len));
    foreach (got[i]) check(got[i] == (start + i), $sformatf("word %0d = %0d exp %0d", i, got[i], start + i));
  endtask

  initial begin
    int t;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (n == 100);
    // trigger in the past: all data present, fast readout
    t = n - 20;
    capture_at(t, 12, 4);
    for (int i = 1; i < wr_cycles.size(); i++) check(wr_cycles[i] - wr_cycles[i-1] == 1, "one word per clock when data present");
    // trigger now: must wait for samples
    wait (n == 160);
    t = n;
    capture_at(t, 16, 4);
    check(wr_cycles[15] - wr_cycles[0] > 15, "waits for samples not yet written");
    // refusals
    @(negedge clk);
    cap_pos = 6'(n); ws_len = 10; cap_start = 1; fifo_free = 9;
    #1 check(!cap_accept, "refused without FIFO room");
    fifo_free = 100; ws_len = 0;
    #1 check(!cap_accept, "refused with zero length");
    ws_len = 30;
    #1 check(cap_accept, "accepted");
    @(negedge clk) cap_start = 1;
    #1 check(!cap_accept && busy, "refused while busy");
    @(negedge clk) cap_start = 0;
    wait (!busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
