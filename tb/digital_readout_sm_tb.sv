// digital_readout_sm_tb: four channels with reference queues in the
// testbench. Timestamp entries with one and with several channels, with and
// without waveform, and with a SYNC flag are read out; the 16-bit stream is
// compared word by word with records built independently here, with random
// back-pressure on out_ready and a waveform FIFO that fills late.
module digital_readout_sm_tb;
  import aida_pkg::*;
  localparam int N = 4, WS = 6;
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

  logic [10:0] ws_len = WS;
  logic tsq_empty, tsq_rd;
  logic [48+N+3-1:0] tsq_data;
  logic [N-1:0] eq_empty, eq_rd, wf_empty, wf_rd;
  energy_entry_t eq_data [N];
  logic [15:0] wf_data [N];
  logic [15:0] out_data;
  logic out_valid, out_last, out_ready = 0;
  logic [31:0] event_count;
  digital_readout_sm #(.N_CH(N), .LEN_W(11)) dut (.*);

  logic [48+N+3-1:0] tq[$];
  energy_entry_t     eq[N][$];
  logic [15:0]       wq[N][$];
  logic [15:0]       expw[$];
  logic              expl[$];
  logic [15:0]       late3[$];   // channel 3 waveform, supplied late

  assign tsq_empty = tq.size() == 0;
  assign tsq_data  = tsq_empty ? '0 : tq[0];
  always_comb for (int c = 0; c < N; c++) begin
    eq_empty[c] = eq[c].size() == 0;
    eq_data[c]  = eq_empty[c] ? '0 : eq[c][0];
    wf_empty[c] = wq[c].size() == 0;
    wf_data[c]  = wf_empty[c] ? '0 : wq[c][0];
  end
  // pops sampled at the clock edge, applied just after it
  always @(posedge clk) begin
    logic t; logic [N-1:0] e, w;
    t = tsq_rd; e = eq_rd; w = wf_rd;
    #1;
    if (t) void'(tq.pop_front());
    for (int c = 0; c < N; c++) begin
      if (e[c]) void'(eq[c].pop_front());
      if (w[c]) void'(wq[c].pop_front());
    end
  end

  int nrec = 0;
  task automatic add_entry(input logic [47:0] ts, input logic [N-1:0] mask, input ts_flags_t fl,
                           input bit [N-1:0] wave);
    int mult = $countones(mask);
    if (fl != 0) begin
      expw.push_back({DIG_INFO_MARK, 9'b0, fl}); expl.push_back(0);
      expw.push_back(ts[47:32]); expl.push_back(0);
      expw.push_back(ts[31:16]); expl.push_back(0);
      expw.push_back(ts[15:0]);  expl.push_back(1);
    end
    for (int c = 0; c < N; c++) if (mask[c]) begin
      energy_entry_t e;
      e.energy = $urandom;
      e.qual = '{reserved: 0, energy_ovf: 0, wave_ok: wave[c], pileup: c[0]};
      eq[c].push_back(e);
      expw.push_back({DIG_EVT_MARK, 2'b00, 6'(c), e.qual}); expl.push_back(0);
      expw.push_back(ts[47:32]); expl.push_back(0);
      expw.push_back(ts[31:16]); expl.push_back(0);
      expw.push_back(ts[15:0]);  expl.push_back(0);
      expw.push_back(e.energy[31:16]); expl.push_back(0);
      expw.push_back(e.energy[15:0]);  expl.push_back(0);
      expw.push_back(wave[c] ? 16'(WS) : 16'h0); expl.push_back(0);
      expw.push_back(16'(mult)); expl.push_back(!wave[c]);
      if (wave[c]) for (int k = 0; k < WS; k++) begin
        logic [15:0] w = 16'($urandom);
        expw.push_back(w); expl.push_back(k == WS - 1);
        if (c == 3) late3.push_back(w); else wq[c].push_back(w);
      end
      nrec++;
    end
    tq.push_back({ts, mask, fl});
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
  end

  int got = 0;
  always @(posedge clk) begin
    out_ready <= ($urandom % 4) != 0;
    if (rst_n && out_valid && out_ready) begin
      check(expw.size() > 0 && out_data == expw[0] && out_last == expl[0],
            $sformatf("word %0d: %h/%0b exp %h/%0b", got, out_data, out_last,
                      expw.size() ? expw[0] : 16'h0, expl.size() ? expl[0] : 1'b0));
      if (expw.size()) begin void'(expw.pop_front()); void'(expl.pop_front()); end
      got++;
    end
  end

  initial begin
    @(posedge rst_n);
    @(negedge clk);
    add_entry(48'h0001_0000_0010, 4'b0001, '0, 4'b0001);
    add_entry(48'hABCD_1234_5678, 4'b1010, '{sync: 1, pause: 0, resume: 0}, 4'b0010);
    add_entry(48'h0000_0000_0FFF, 4'b1100, '0, 4'b1000);
    repeat (200) @(negedge clk);
    check(expw.size() == WS, "stream waits for the waveform FIFO");
    foreach (late3[k]) wq[3].push_back(late3[k]);
    repeat (200) @(negedge clk);
    check(expw.size() == 0, $sformatf("all words sent, %0d left", expw.size()));
    check(event_count == 32'(nrec), $sformatf("event count %0d exp %0d", event_count, nrec));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
