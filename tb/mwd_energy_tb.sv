// mwd_energy_tb: pulses of known height through the MWD filter.
//  - a step of height A with no decay correction gives exactly L*A;
//  - exponentially decaying pulses (tau = 300 samples) with the matching
//    correction give L*A within 1 %, for several heights;
//  - a second trigger inside the window sets pileup;
//  - the result appears M+L samples after the trigger sample.
module mwd_energy_tb;
  localparam int M = 32, L = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic s_en = 0, trig = 0, done, pileup, energy_ovf;
  logic [13:0] sample = 500, baseline = 500;
  logic [15:0] inv_tau = 0;
  logic [31:0] energy;
  logic signed [47:0] trap;
  mwd_energy #(.BITS(14), .M(M), .L(L)) dut (.*);

  int n_since;
  task automatic run_pulse(input int A, input real tau, input int second_at, output int e,
                           output bit pu, output int lat);
    int n = 0;
    n_since = -1;
    e = -1; lat = -1; pu = 0;
    for (int k = -100; k < 400; k++) begin
      real v;
      @(negedge clk);
      v = (k < 0) ? 0.0 : (tau > 0.0 ? A * $exp(-k / tau) : A);
      if (second_at > 0 && k >= second_at) v = v + A * $exp(-(k - second_at) / 300.0);
      sample = 14'(500 + $rtoi(v + 0.5));
      s_en = 1;
      trig = (k == 0) || (second_at > 0 && k == second_at);
      @(posedge clk); #1;
      if (done) begin e = int'(energy); pu = pileup; lat = k; end
      @(negedge clk) begin s_en = 0; trig = 0; end
    end
  endtask

  initial begin
    int e, lat; bit pu;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // let the delay lines fill with baseline
    inv_tau = 0;
    run_pulse(1000, 0.0, 0, e, pu, lat);
    check(e == L * 1000, $sformatf("step energy %0d exp %0d", e, L * 1000));
    check(lat == M + L, $sformatf("latency %0d samples", lat));
    check(!pu, "no pileup on single step");
    // step must fall back to baseline before next pulse: long gap of zeros
    sample = 500;
    for (int k = 0; k < 200; k++) begin @(negedge clk) s_en = 1; @(negedge clk) s_en = 0; end
    inv_tau = 16'($rtoi(65536.0 / 300.0 + 0.5));
    for (int h = 0; h < 3; h++) begin
      int A;
      A = (h == 0) ? 2000 : (h == 1) ? 5000 : 300;
      run_pulse(A, 300.0, 0, e, pu, lat);
      check(e > L * A * 0.99 && e < L * A * 1.01, $sformatf("decay pulse A=%0d energy %0d exp %0d", A, e, L * A));
      check(!pu, "no pileup");
      // drain: the exponential tail must be fully corrected, give it time
      sample = 500;
      for (int k = 0; k < 2500; k++) begin @(negedge clk) s_en = 1; @(negedge clk) s_en = 0; end
    end
    run_pulse(1000, 300.0, 20, e, pu, lat);
    check(pu, "pileup flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
