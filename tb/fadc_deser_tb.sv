// fadc_deser_tb: a serialiser model sends random 14-bit words on eight lanes;
// every parallel sample must match the word sent, arrive seven clocks after
// its first pair, and no realignment may occur. Then the pair strobe is
// gapped (every other clock) and decoding must go on.
module fadc_deser_tb;
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

  logic pair_en = 0;
  logic [13:0] value [8];
  logic [7:0] d_rise, d_fall;
  logic fco_rise, fco_fall, word_start;
  logic [13:0] sample [8];
  logic sample_valid;
  logic [15:0] realign_count;

  fadc_model #(.LANES(8)) src (.clk, .pair_en, .value, .d_rise, .d_fall, .fco_rise, .fco_fall, .word_start);
  fadc_deser #(.LANES(8), .BITS(14)) dut (.clk, .rst_n, .pair_en, .d_rise, .d_fall,
    .fco_rise, .fco_fall, .sample, .sample_valid, .realign_count);

  typedef logic [8*14-1:0] word_t;
  word_t sent[$];
  int    sent_cyc[$];
  int    cyc = 0;
  int    got = 0;
  bit    steady = 1;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && word_start) begin
    sent.push_back({value[7], value[6], value[5], value[4], value[3], value[2], value[1], value[0]});
    sent_cyc.push_back(cyc);
    for (int l = 0; l < 8; l++) value[l] <= 14'($urandom);
  end

  always @(posedge clk) if (rst_n && sample_valid) begin
    if (sent.size() == 0) check(0, "sample with nothing sent");
    else begin
      word_t w;
      int    c;
      w = sent.pop_front();
      c = sent_cyc.pop_front();
      for (int l = 0; l < 8; l++) check(sample[l] == w[l*14 +: 14], $sformatf("lane %0d %h exp %h", l, sample[l], w[l*14 +: 14]));
      if (steady) check(cyc - c == 7, $sformatf("latency %0d", cyc - c));
      got++;
    end
  end

  initial begin
    for (int l = 0; l < 8; l++) value[l] = 14'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) pair_en = 1;
    wait (got == 200);
    check(realign_count == 0, "no realignment in steady state");
    // alternate pair_en to show the strobe is honoured
    steady = 0;
    for (int i = 0; i < 700; i++) begin
      @(negedge clk) pair_en = i[0];
    end
    @(negedge clk) pair_en = 1;
    check(got > 240, $sformatf("words decoded with gapped strobe %0d", got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
