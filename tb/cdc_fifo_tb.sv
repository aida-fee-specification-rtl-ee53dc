// cdc_fifo_tb: the clock-crossing sample FIFO between a 350 MHz writer and a
// 100 MHz reader (periods 20 and 70 time units), then with the clocks
// swapped in speed. Checks that every word arrives once and in order, that
// full and empty behave (the fast writer fills the FIFO, writes are then
// refused, and the reader drains it), and that a word written into an empty
// FIFO becomes visible to the reader within four read clocks.
module cdc_fifo_tb;
  localparam int W = 16, D = 8;
  logic wclk = 0, rclk = 0, rst_n = 0;
  int wper = 10, rper = 35;
  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    #2000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wdata = 0, rdata;
  cdc_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int exp_q[$];
  int n_full = 0, n_read = 0;
  bit read_on = 0;
  // reader: pops whenever data is there and reading is on
  always @(posedge rclk) begin
    if (rd_en) begin
      check(exp_q.size() > 0 && int'(rdata) == exp_q[0],
            $sformatf("read %0d exp %0d", rdata, exp_q.size() ? exp_q[0] : -1));
      if (exp_q.size()) void'(exp_q.pop_front());
      n_read++;
    end
    #1 rd_en = read_on && !empty;
  end

  task automatic write_words(input int n, input int p);
    for (int i = 0; i < n; i++) begin
      @(negedge wclk);
      while (full) begin n_full++; @(negedge wclk); end
      if ($urandom_range(99) < p) begin
        wr_en = 1; wdata = W'($urandom); exp_q.push_back(int'(wdata));
        @(posedge wclk); #1 wr_en = 0;
      end
    end
  endtask

  initial begin
    int t0;
    #100 rst_n = 1;
    // fill with the reader stopped: full must rise after D words
    write_words(D, 100);
    repeat (8) @(posedge wclk);
    check(full, "full after DEPTH words");
    check(exp_q.size() == D, "DEPTH words accepted");
    read_on = 1;
    wait (empty && exp_q.size() == 0);
    // a fast writer at a 28 % duty (the sample rate: 1 in 7 bit clocks would be
    // 14 %), reader keeps up
    write_words(2000, 28);
    wait (exp_q.size() == 0);
    // latency into an empty FIFO
    repeat (4) @(posedge rclk);
    @(negedge wclk) begin wr_en = 1; wdata = 16'h1234; exp_q.push_back(16'h1234); end
    @(posedge wclk); t0 = n_read; #1 wr_en = 0;
    repeat (4) @(posedge rclk);
    #2 check(n_read == t0 + 1, "word visible within four read clocks");
    // swap speeds: slow writer, fast reader
    wper = 35; rper = 10;
    write_words(500, 80);
    repeat (20) @(posedge rclk);
    check(exp_q.size() == 0 && empty, "all words delivered");
    check(n_full > 0, "writer saw full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
