// flipflop_ram_tb: 8-word banks. Fill a bank to hand it over automatically;
// keep writing into the other bank while the first is read; the writer is held
// off when both banks are busy; a flush hands over a partly filled bank, but
// only at an even fill level; all words read back in order.
module flipflop_ram_tb;
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

  logic wr_en = 0, wr_full, flush = 0, rd_avail, rd_done = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic [3:0] rd_count;
  logic [2:0] rd_addr = 0;
  logic [15:0] swap_count;
  flipflop_ram #(.WORDS(8), .W(32), .GRAIN(2)) dut (.*);

  int next_w = 0, next_r = 0;
  task automatic write_n(input int k);
    for (int i = 0; i < k; i++) begin
      @(negedge clk);
      check(!wr_full, "space to write");
      wr_en = 1; wr_data = 32'(next_w++);
      @(negedge clk) wr_en = 0;
    end
  endtask
  task automatic read_bank(input int exp_n);
    check(rd_avail, "bank available");
    check(rd_count == exp_n, $sformatf("bank count %0d exp %0d", rd_count, exp_n));
    for (int i = 0; i < exp_n; i++) begin
      @(negedge clk) rd_addr = 3'(i);
      @(negedge clk) check(rd_data == 32'(next_r), $sformatf("read %0d exp %0d", rd_data, next_r));
      next_r++;
    end
    @(negedge clk) rd_done = 1;
    @(negedge clk) rd_done = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    write_n(8);
    @(negedge clk); @(negedge clk);
    check(rd_avail && swap_count == 1, "full bank handed over");
    write_n(8);
    @(negedge clk);
    check(wr_full, "writer held off: both banks busy");
    read_bank(8);
    @(negedge clk); @(negedge clk);
    check(!wr_full && rd_avail, "second bank handed over after release");
    read_bank(8);
    // partial bank with odd count: flush waits for an even level
    write_n(3);
    @(negedge clk) flush = 1;
    @(negedge clk) flush = 0;
    @(negedge clk);
    check(!rd_avail, "no hand-over at odd fill level");
    write_n(1);
    @(negedge clk); @(negedge clk);
    check(rd_avail, "flush served at even level");
    read_bank(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
