// sync_fifo_tb: random pushes and pops on a 10-entry FIFO (not a power of
// two) against a queue reference; checks data order, count, full and empty.
module sync_fifo_tb;
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

  logic wr_en = 0, rd_en = 0, full, empty;
  logic [7:0] wr_data = 0, rd_data;
  logic [3:0] count;
  sync_fifo #(.WIDTH(8), .DEPTH(10)) dut (.*);

  logic [7:0] q[$];
  int seen_full = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wr_en = ($urandom % 100) < (i < 1500 ? 70 : 30) && !full;
      rd_en = ($urandom % 100) < (i < 1500 ? 30 : 70) && !empty;
      wr_data = 8'($urandom);
      if (rd_en) begin
        check(q.size() > 0 && rd_data == q[0], $sformatf("data %h exp %h", rd_data, q.size() ? q[0] : 8'h0));
        void'(q.pop_front());
      end
      if (wr_en) q.push_back(wr_data);
      @(posedge clk); #1;
      check(count == q.size(), $sformatf("count %0d exp %0d", count, q.size()));
      check(full == (q.size() == 10), "full flag");
      check(empty == (q.size() == 0), "empty flag");
      if (full) seen_full++;
    end
    check(seen_full > 0, "FIFO reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
