// timestamp_queue_tb: hits and flags are queued with the timestamp of their
// cycle; entries beyond the depth are dropped and counted.
module timestamp_queue_tb;
  import aida_pkg::*;
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

  logic [47:0] ts = 0;
  logic [7:0]  hit = 0;
  ts_flags_t   flags = '0;
  logic        rd_en = 0, empty, full;
  logic [47+8+3:0] rd_data;
  logic [2:0]  count;
  logic [15:0] drop_count;
  timestamp_queue #(.N_HIT(8), .DEPTH(4)) dut (.*);

  always @(posedge clk) ts <= ts + 1;

  logic [58:0] expq[$];
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // six entries into a queue of four: two are dropped
    for (int i = 0; i < 6; i++) begin
      @(negedge clk);
      hit = (i == 2) ? 8'h0 : 8'(1 << i);
      flags = (i == 2) ? '{sync: 1'b1, pause: 1'b0, resume: 1'b0} : '0;
      if (i < 4) expq.push_back({ts, hit, flags});
    end
    @(negedge clk) begin hit = 0; flags = '0; end
    @(negedge clk);
    check(full, "full after four");
    check(drop_count == 2, $sformatf("drop count %0d", drop_count));
    // nothing queued on an idle cycle
    check(count == 4, "count 4");
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      check(!empty && rd_data == expq[i], $sformatf("entry %0d %h exp %h", i, rd_data, expq[i]));
      rd_en = 1;
      @(negedge clk) rd_en = 0;
    end
    check(empty, "empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
