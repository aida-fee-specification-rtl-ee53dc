// le_disc_tb: the discriminator fires once per rising threshold crossing,
// stays quiet until the signal drops below threshold minus hysteresis, and
// ignores cycles without s_en.
module le_disc_tb;
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

  logic s_en = 0, trig, above;
  logic [13:0] sample = 1000, baseline = 1000, hysteresis = 10;
  logic signed [14:0] threshold = 50;
  le_disc #(.BITS(14)) dut (.*);

  // baseline-relative levels and whether trig is expected on each
  int lv[] = '{0, 20, 49, 50, 80, 45, 45, 60, 39, 55, 100, 0, -30, 51, 0};
  bit ex[] = '{0,  0,  0,  1,  0,  0,  0,  0,  0,  1,   0, 0,   0,  1, 0};
  int fired = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (lv[i]) begin
      @(negedge clk);
      sample = 14'(1000 + lv[i]);
      s_en = 1;
      #1 check(trig == ex[i], $sformatf("step %0d level %0d trig %0b", i, lv[i], trig));
      check(above == (lv[i] >= 50), "above flag");
      fired += trig;
      @(negedge clk) s_en = 0;
      #1 check(!trig, "no trig without s_en");
    end
    check(fired == 3, "three crossings");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
