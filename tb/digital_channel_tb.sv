// digital_channel_tb: exponentially decaying pulses (tau = 100 samples) on a
// baseline of 1000 into one channel with small queues (16-word waveforms,
// 40-word FIFO, 3-entry energy queue). Checks, against values computed here:
//  - an accepted pulse gives one hit, energy L*A within 1 %, and a waveform
//    equal to the samples from pre_len before the threshold crossing;
//  - a pulse above the discriminator threshold but below the energy
//    threshold gives no event;
//  - when the FIFO lacks room the event is kept without waveform;
//  - when the energy queue is full, or accept_ok is low, the event is dropped
//    and counted.
module digital_channel_tb;
  import aida_pkg::*;
  localparam int M = 16, L = 8, WS = 16, PRE = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic s_en = 0, accept_ok = 1, hit, eq_rd = 0, eq_empty, wf_rd = 0, wf_empty;
  logic [13:0] sample = 1000, baseline = 1000, le_hyst = 10;
  logic signed [14:0] le_thresh = 50;
  logic [15:0] inv_tau = 16'(655), wf_data, drop_count;
  logic [31:0] e_thresh = L * 100;
  logic [6:0] ws_len = WS;
  logic [5:0] pre_len = PRE;
  energy_entry_t eq_data;
  digital_channel #(.BITS(14), .RING(64), .WF_DEPTH(40), .EQ_DEPTH(3), .MWD_M(M), .MWD_L(L)) dut (.*);

  // sample stream: one sample every other clock
  int   n = 0;
  real  tail = 0.0;
  int   hist [int];
  int   hits = 0;
  always @(posedge clk) begin
    if (rst_n && hit) hits++;
  end
  task automatic run(input int nsamp, input int A);
    for (int k = 0; k < nsamp; k++) begin
      @(negedge clk);
      if (k == 0) tail = tail + A;
      sample = 14'(1000 + $rtoi(tail + 0.5));
      hist[n] = int'(sample);
      tail = tail * $exp(-1.0 / 100.0);
      s_en = 1;
      @(negedge clk) s_en = 0;
      n++;
    end
  endtask

  int exp_start[$];
  int exp_A[$];
  bit exp_wave[$];
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(200, 0);
    // 1, 2: accepted with waveform
    exp_start.push_back(n - PRE); exp_A.push_back(2000); exp_wave.push_back(1); run(700, 2000);
    exp_start.push_back(n - PRE); exp_A.push_back(700);  exp_wave.push_back(1); run(700, 700);
    // below energy threshold (8 * 60 < 800) but above discriminator threshold
    run(700, 60);
    check(hits == 2, $sformatf("hits %0d exp 2", hits));
    // 3: FIFO holds 32 of 40 words: no room for 16 more, kept without waveform
    exp_start.push_back(n - PRE); exp_A.push_back(3000); exp_wave.push_back(0); run(700, 3000);
    check(hits == 3, "third hit");
    // 4: energy queue full (3 entries): dropped
    run(700, 1500);
    check(hits == 3 && drop_count == 1, $sformatf("queue full drop, count %0d", drop_count));
    // read everything out
    for (int e = 0; e < 3; e++) begin
      @(negedge clk);
      check(!eq_empty, "energy entry present");
      check(real'(eq_data.energy) > 0.99 * L * exp_A[e] && real'(eq_data.energy) < 1.01 * L * exp_A[e],
            $sformatf("energy %0d exp %0d", eq_data.energy, L * exp_A[e]));
      check(eq_data.qual.wave_ok == exp_wave[e], $sformatf("wave_ok %0b", eq_data.qual.wave_ok));
      check(!eq_data.qual.pileup, "no pileup");
      eq_rd = 1;
      @(negedge clk) eq_rd = 0;
      if (exp_wave[e]) for (int k = 0; k < WS; k++) begin
        check(!wf_empty && int'(wf_data) == hist[exp_start[e] + k],
              $sformatf("event %0d sample %0d: %0d exp %0d", e, k, wf_data, hist[exp_start[e] + k]));
        wf_rd = 1;
        @(negedge clk) wf_rd = 0;
      end
    end
    check(eq_empty && wf_empty, "queues empty");
    // accept_ok low: dropped
    accept_ok = 0;
    run(700, 1500);
    check(hits == 3 && drop_count == 2, "dropped while timestamp queue full");
    accept_ok = 1;
    exp_start.delete(); exp_start.push_back(n - PRE);
    run(700, 1200);
    check(hits == 4 && !eq_empty, "accepted again");
    check(real'(eq_data.energy) > 0.99 * L * 1200 && real'(eq_data.energy) < 1.01 * L * 1200, "energy after drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
