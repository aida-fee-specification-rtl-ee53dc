// disc_or_tb: random per-ASIC OR patterns; checks the combined output and
// the number of rising edges counted.
module disc_or_tb;
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

  logic [3:0] asic_or = 0;
  logic trig_out;
  logic [31:0] edge_count;
  disc_or #(.N_IN(4)) dut (.*);

  int edges = 0;
  logic prev = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      asic_or = ($urandom % 3 == 0) ? 4'(1 << ($urandom % 4)) : (($urandom % 4 == 0) ? 4'($urandom) : 4'h0);
      #1 check(trig_out == (asic_or != 0), "combinational OR");
      if (trig_out && !prev) edges++;
      prev = trig_out;
    end
    @(negedge clk) asic_or = 0;
    repeat (4) @(posedge clk); #1;
    check(edge_count == 32'(edges), $sformatf("edges %0d exp %0d", edge_count, edges));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
