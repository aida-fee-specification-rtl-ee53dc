// ad7686_if_tb: conversions of random values through the converter model;
// checks the value read, the CNV high time, SDI held high, and the cycle count
// from start to done: 1 + CONV_CYCLES + 16 low phases + 15 high phases of
// SCK_HALF clocks.
module ad7686_if_tb;
  localparam int CONV = 20, HALF = 2;
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

  logic start = 0, busy, done, cnv, sck, sdi, sdo, cnv_high_ok;
  logic [15:0] data, value;
  int conversions;
  ad7686_if #(.CONV_CYCLES(CONV), .SCK_HALF(HALF), .BITS(16)) dut (.*);
  ad7686_model #(.MIN_CONV_NS(CONV * 10.0 - 1.0)) adc (.cnv, .sck, .sdi, .sdo, .value, .cnv_high_ok, .conversions);

  initial begin
    int t0, n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      value = (i == 0) ? 16'hFFFF : (i == 1) ? 16'h0000 : (i == 2) ? 16'h8001 : 16'($urandom);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      n = 1;
      while (!done) begin @(negedge clk); n++; end
      check(data == value, $sformatf("read %h exp %h", data, value));
      check(n == 1 + CONV + 16 * HALF + 15 * HALF, $sformatf("cycles %0d", n));
      check(cnv_high_ok, "CNV high long enough, SDI high");
      @(negedge clk) check(!busy, "idle after done");
    end
    check(conversions == 40, "one CNV pulse per start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
