// afe64_rate_tb: the planned event rates of one board, run through the whole
// design at its default sizes for one millisecond of readout.
//
// Workload (per millisecond, the planning figures of the design):
//   analogue - 60 two-word events (60 k events/s): every 66.7 us one ASIC,
//              taken in turn, fires four random channels;
//   digital  - 30 events (30 k events/s) on random strips, each with the
//              longest waveform the circulating buffer holds, 1000 samples
//              (20 us at 50 MSPS), so an event is 16 + 2000 bytes;
//   a processor tick (flush) at the end of the millisecond.
// The flash ADC models run on a 350 MHz bit clock, one bit pair per cycle, so
// samples come at 50 MSPS, one every 2 logic clocks; time here is counted in
// logic clocks of 10 ns. A consumer empties the
// ring as fast as it fills. Checked: every injected event arrives with the
// right channel, energy (L*A within 2 %) and waveform length; no timestamp
// queue drops; the analogue and digital bytes moved match the plan; all of it
// leaves the board before a second millisecond has passed.
module afe64_rate_tb;
  import aida_pkg::*;
  localparam int NCH = 64, L = 64, WS = 1000, PRE = 100, RS = 8192;
  localparam int MS = 100_000;   // clocks per millisecond
  // clk 100 MHz and the ADC bit clock 350 MHz: periods of 70 and 20 time
  // units (one unit = 1/7 ns)
  logic clk = 0, fadc_clk = 0, rst_n = 0;
  always #35 clk = ~clk;
  always #10 fadc_clk = ~fadc_clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    repeat (4 * MS) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- DUT ----------------
  logic sync_in = 0, pause_in = 0, resume_in = 0, disc_or_out;
  logic [47:0] sync_value = 48'h0, timestamp;
  logic fadc_pair_en = 1;
  logic [NCH-1:0] fadc_d_rise, fadc_d_fall;
  logic [7:0] fadc_fco_rise, fadc_fco_fall;
  logic [3:0][15:0] asic_disc;
  logic [3:0] asic_disc_or, ro_valid, ro_last, ro_hold, ro_start, ro_next, ro_clr, ro_reset;
  logic [3:0][3:0] ro_chan;
  logic [3:0] adc_cnv, adc_sck, adc_sdi, adc_sdo;
  logic [5:0] module_id = 6'd3;
  logic [13:0] baseline = 1000, le_hyst = 10;
  logic signed [14:0] le_thresh = 50;
  logic [15:0] inv_tau = 16'(655);
  logic [31:0] e_thresh = L * 100;
  logic [10:0] ws_len = WS;
  logic [9:0] pre_len = PRE;
  logic flush_tick = 0;
  logic m_we, m_ready;
  logic [31:0] m_addr, m_wdata;
  logic [31:0] ring_base = 32'h0002_0000;
  logic [23:0] ring_size = RS, sw_rd_ptr = 0, wr_ptr;
  logic [31:0] dig_event_count, disc_or_count, dma_word_count;
  logic [3:0][31:0] asic_event_count;
  logic [3:0][15:0] asic_timeout_count;
  logic [15:0] dtsq_drop_count;
  logic i2c_cmd_valid = 0, i2c_cmd_ready, i2c_cmd_nack = 0, i2c_rsp_valid, i2c_rsp_nack;
  logic [1:0] i2c_cmd_op = 0;
  logic [7:0] i2c_cmd_data = 0, i2c_rsp_data;
  logic i2c_scl_oe, i2c_sda_oe;
  wire i2c_scl_i = !i2c_scl_oe;
  wire i2c_sda_i = !i2c_sda_oe;

  afe64_top dut (.*, .fadc_clk(fadc_clk));

  // ---------------- flash ADCs: decaying pulses, tau = 100 samples ----------------
  logic [13:0] fval [8][8];
  logic [7:0]  wstart;
  for (genvar d = 0; d < 8; d++) begin : g_fadc
    fadc_model #(.LANES(8)) m (.clk(fadc_clk), .pair_en(fadc_pair_en), .value(fval[d]),
      .d_rise(fadc_d_rise[d*8 +: 8]), .d_fall(fadc_d_fall[d*8 +: 8]),
      .fco_rise(fadc_fco_rise[d]), .fco_fall(fadc_fco_fall[d]), .word_start(wstart[d]));
  end
  real tail [NCH];
  real inject [NCH];
  initial for (int c = 0; c < NCH; c++) begin tail[c] = 0.0; inject[c] = 0.0; end
  initial for (int d = 0; d < 8; d++) for (int l = 0; l < 8; l++) fval[d][l] = 14'd1000;
  always @(negedge fadc_clk) if (wstart[0]) begin
    for (int c = 0; c < NCH; c++) begin
      tail[c] = tail[c] + inject[c];
      inject[c] = 0.0;
      fval[c / 8][c % 8] = 14'(1000 + $rtoi(tail[c] + 0.5));
      tail[c] = tail[c] * $exp(-1.0 / 100.0);
    end
  end

  // ---------------- ASICs and serial ADCs ----------------
  logic [3:0][15:0] aout;
  int conversions [4];
  logic [3:0] cnv_ok;
  for (genvar a = 0; a < 4; a++) begin : g_asic
    asic_model m (.clk, .ro_start(ro_start[a]), .ro_next(ro_next[a]), .ro_clr(ro_clr[a]),
      .ro_reset(ro_reset[a]), .disc(asic_disc[a]), .disc_or(asic_disc_or[a]),
      .ro_chan(ro_chan[a]), .ro_valid(ro_valid[a]), .ro_last(ro_last[a]), .ro_hold(ro_hold[a]),
      .aout(aout[a]), .mute(1'b0));
    ad7686_model #(.MIN_CONV_NS(1500.0 * 7)) adc (.cnv(adc_cnv[a]), .sck(adc_sck[a]), .sdi(adc_sdi[a]),
      .sdo(adc_sdo[a]), .value(aout[a]), .cnv_high_ok(cnv_ok[a]), .conversions(conversions[a]));
  end

  // ---------------- processor memory, emptied as it fills ----------------
  logic [31:0] ring [RS];
  logic [31:0] lin[$];
  assign m_ready = 1'b1;
  always @(posedge clk) if (rst_n && m_we) ring[m_addr - ring_base] <= m_wdata;
  always @(negedge clk) if (rst_n && sw_rd_ptr != wr_ptr) begin
    lin.push_back(ring[sw_rd_ptr]);
    sw_rd_ptr <= (sw_rd_ptr == RS - 1) ? '0 : sw_rd_ptr + 1'b1;
  end

  // ---------------- expected events ----------------
  int exp_dA [NCH][$];
  int n_ana_exp = 0, n_ana = 0, n_dig = 0, n_dig_bytes = 0, n_ana_bytes = 0;
  int t_last_word = 0, t_start = 0;
  always @(posedge clk) if (m_we) t_last_word = cyc;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int t0, c;
    int busy_until [NCH];
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    for (int i = 0; i < NCH; i++) busy_until[i] = 0;
    t0 = cyc;
    t_start = cyc;
    fork
      begin : digital
        for (int k = 0; k < 30; k++) begin
          int a;
          // a strip whose previous waveform is long finished
          do c = int'($urandom_range(NCH - 1)); while (busy_until[c] > cyc);
          a = int'($urandom_range(3000, 500));
          busy_until[c] = cyc + 2 * 2000;
          inject[c] = real'(a);
          exp_dA[c].push_back(a);
          repeat (MS / 30) @(negedge clk);
        end
      end
      begin : analogue
        for (int k = 0; k < 15; k++) begin
          logic [15:0] mask = '0, lv [16];
          while ($countones(mask) < 4) mask[$urandom_range(15)] = 1'b1;
          for (int i = 0; i < 16; i++) lv[i] = 16'($urandom);
          case (k % 4)
            0: g_asic[0].m.fire(mask, lv);
            1: g_asic[1].m.fire(mask, lv);
            2: g_asic[2].m.fire(mask, lv);
            default: g_asic[3].m.fire(mask, lv);
          endcase
          n_ana_exp += 4;
          repeat (MS / 15) @(negedge clk);
        end
      end
    join
    // the processor tick at the end of the millisecond
    while (cyc - t0 < MS) @(negedge clk);
    @(negedge clk) flush_tick = 1;
    @(negedge clk) flush_tick = 0;
    repeat (MS / 2) @(negedge clk);
    check(sw_rd_ptr == wr_ptr, "ring drained");
    check(t_last_word - t0 < 2 * MS, $sformatf("all data left the board after %0d clocks", t_last_word - t0));
    parse();
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic parse();
    int pos = 0;
    logic [15:0] hw[$];
    while (pos < lin.size()) begin
      logic [31:0] w = lin[pos];
      if (w[31:28] == DMA_BLK_MARK) begin
        int n = int'(w[15:0]);
        pos++;
        for (int k = 0; k < n; k += 2) if (lin[pos + k][31:30] == EVT_ADC) begin
          n_ana++; n_ana_bytes += 8;
        end
        pos += n;
      end else begin
        hw.delete();
        hw.push_back(w[31:16]); hw.push_back(w[15:0]);
        pos++;
        if (hw[0][15:12] == DIG_INFO_MARK) begin pos++; continue; end
        check(hw[0][15:12] == DIG_EVT_MARK, $sformatf("record marker %h", hw[0]));
        while (hw.size() < 8) begin hw.push_back(lin[pos][31:16]); hw.push_back(lin[pos][15:0]); pos++; end
        while (hw.size() < 8 + int'(hw[6])) begin
          hw.push_back(lin[pos][31:16]); hw.push_back(lin[pos][15:0]); pos++;
        end
        check_dig(hw);
      end
    end
  endtask

  task automatic check_dig(input logic [15:0] hw[$]);
    int c = int'(hw[0][9:4]);
    int e = int'({hw[4], hw[5]});
    n_dig++;
    n_dig_bytes += 2 * hw.size();
    check(int'(hw[6]) == WS, $sformatf("strip %0d waveform length %0d", c, hw[6]));
    if (exp_dA[c].size() == 0) begin check(0, $sformatf("unexpected event on strip %0d", c)); return; end
    check(e > L * exp_dA[c][0] * 98 / 100 && e < L * exp_dA[c][0] * 102 / 100,
          $sformatf("strip %0d energy %0d exp %0d", c, e, L * exp_dA[c][0]));
    void'(exp_dA[c].pop_front());
  endtask

  task automatic report();
    int left = 0;
    for (int c = 0; c < NCH; c++) left += exp_dA[c].size();
    check(left == 0, $sformatf("%0d digital events missing", left));
    check(n_dig == 30, $sformatf("digital events %0d", n_dig));
    check(n_ana == n_ana_exp && n_ana == 60, $sformatf("analogue events %0d exp %0d", n_ana, n_ana_exp));
    check(n_dig_bytes == 30 * 2016, $sformatf("digital bytes %0d", n_dig_bytes));
    check(n_ana_bytes == 480, $sformatf("analogue bytes %0d", n_ana_bytes));
    check(dtsq_drop_count == 0, "no timestamp queue drop");
    check(asic_timeout_count == '0, "no ASIC timeout");
    $display("one millisecond: digital %0d events %0d bytes, analogue %0d events %0d bytes, last word %0d clocks after start",
             n_dig, n_dig_bytes, n_ana, n_ana_bytes, t_last_word - t_start);
  endtask
endmodule
