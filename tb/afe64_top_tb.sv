// afe64_top_tb: end-to-end run of the whole board logic at its default sizes.
//
// Eight flash-ADC models feed 64 strips with exponentially decaying pulses
// (tau = 100 samples) on a baseline of 1000; four ASIC models with serial ADC
// models serve the analogue readout; a memory model with a consumer reads the
// ring buffer. At the end the ring contents are parsed and every record is
// checked against what was injected:
//   digital events - channel, energy = L*A within 2 %, waveform step, the
//     multiplicity of a shared time entry, pileup flag, event without waveform
//     when the waveform length is set to 0, no event for a pulse below the
//     energy threshold, INFO records for SYNC / pause / resume;
//   analogue events - channel numbers and held levels of every readout, a
//     full event bank handed over on its own and partial ones on the flush
//     tick, a timeout on an ASIC that does not answer;
//   transfer - a full bank waiting for ring space while the consumer pauses;
//   I2C - six identity bytes read from an ID memory model.
// Each mechanism is counted and a failure is counted for any that never
// happened.
module afe64_top_tb;
  import aida_pkg::*;
  localparam int NCH = 64, L = 64, WS = 32, PRE = 8, RS = 1200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  wire fadc_clk = clk;   // deserialisers on the logic clock in this run
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    repeat (600000) @(posedge clk);
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
  logic [5:0] module_id = 6'd9;
  logic [13:0] baseline = 1000, le_hyst = 10;
  logic signed [14:0] le_thresh = 50;
  logic [15:0] inv_tau = 16'(655);
  logic [31:0] e_thresh = L * 100;
  logic [10:0] ws_len = WS;
  logic [9:0] pre_len = PRE;
  logic flush_tick = 0;
  logic m_we, m_ready;
  logic [31:0] m_addr, m_wdata;
  logic [31:0] ring_base = 32'h0001_0000;
  logic [23:0] ring_size = RS, sw_rd_ptr = 0, wr_ptr;
  logic [31:0] dig_event_count, disc_or_count, dma_word_count;
  logic [3:0][31:0] asic_event_count;
  logic [3:0][15:0] asic_timeout_count;
  logic [15:0] dtsq_drop_count;

  logic i2c_cmd_valid = 0, i2c_cmd_ready, i2c_cmd_nack = 0, i2c_rsp_valid, i2c_rsp_nack;
  logic [1:0] i2c_cmd_op = 0;
  logic [7:0] i2c_cmd_data = 0, i2c_rsp_data;
  logic i2c_scl_oe, i2c_sda_oe, rom_sda_pull, rom_scl_pull;
  wire i2c_scl_i = !i2c_scl_oe && !rom_scl_pull;
  wire i2c_sda_i = !i2c_sda_oe && !rom_sda_pull;
  int rom_start, rom_stop, rom_stretch;

  afe64_top dut (.*, .fadc_clk(fadc_clk));

  // ID memory on the I2C bus
  i2c_eeprom_model #(.ADDR(7'h50), .STRETCH_NS(0)) id_rom (.scl(i2c_scl_i), .sda(i2c_sda_i),
    .sda_pull(rom_sda_pull), .scl_pull(rom_scl_pull), .n_start(rom_start), .n_stop(rom_stop),
    .n_stretch(rom_stretch));

  task automatic i2c_op(input logic [1:0] o, input logic [7:0] d, input logic nk,
                        output logic [7:0] rd, output logic bad);
    @(negedge clk);
    while (!i2c_cmd_ready) @(negedge clk);
    i2c_cmd_valid = 1; i2c_cmd_op = o; i2c_cmd_data = d; i2c_cmd_nack = nk;
    @(negedge clk); i2c_cmd_valid = 0;
    while (!i2c_rsp_valid) @(negedge clk);
    rd = i2c_rsp_data; bad = i2c_rsp_nack;
  endtask

  // ---------------- flash ADCs ----------------
  logic [13:0] fval [8][8];
  logic [7:0]  wstart;
  for (genvar d = 0; d < 8; d++) begin : g_fadc
    fadc_model #(.LANES(8)) m (.clk, .pair_en(fadc_pair_en), .value(fval[d]),
      .d_rise(fadc_d_rise[d*8 +: 8]), .d_fall(fadc_d_fall[d*8 +: 8]),
      .fco_rise(fadc_fco_rise[d]), .fco_fall(fadc_fco_fall[d]), .word_start(wstart[d]));
  end

  real tail [NCH];
  real inject [NCH];
  int  sidx = 0;
  initial for (int c = 0; c < NCH; c++) begin tail[c] = 0.0; inject[c] = 0.0; end
  initial for (int d = 0; d < 8; d++) for (int l = 0; l < 8; l++) fval[d][l] = 14'd1000;
  always @(negedge clk) if (wstart[0]) begin
    for (int c = 0; c < NCH; c++) begin
      tail[c] = tail[c] + inject[c];
      inject[c] = 0.0;
      fval[c / 8][c % 8] = 14'(1000 + $rtoi(tail[c] + 0.5));
      tail[c] = tail[c] * $exp(-1.0 / 100.0);
    end
    sidx++;
  end
  task automatic wait_samples(input int n);
    int t = sidx + n;
    wait (sidx >= t);
  endtask

  // ---------------- ASICs and serial ADCs ----------------
  logic [3:0][15:0] aout;
  logic [3:0] mute = 4'b0000;
  int conversions [4];
  logic [3:0] cnv_ok;
  for (genvar a = 0; a < 4; a++) begin : g_asic
    asic_model m (.clk, .ro_start(ro_start[a]), .ro_next(ro_next[a]), .ro_clr(ro_clr[a]),
      .ro_reset(ro_reset[a]), .disc(asic_disc[a]), .disc_or(asic_disc_or[a]),
      .ro_chan(ro_chan[a]), .ro_valid(ro_valid[a]), .ro_last(ro_last[a]), .ro_hold(ro_hold[a]),
      .aout(aout[a]), .mute(mute[a]));
    ad7686_model #(.MIN_CONV_NS(1500.0)) adc (.cnv(adc_cnv[a]), .sck(adc_sck[a]), .sdi(adc_sdi[a]),
      .sdo(adc_sdo[a]), .value(aout[a]), .cnv_high_ok(cnv_ok[a]), .conversions(conversions[a]));
  end

  // expected analogue events, per ASIC: {channel, level}
  int exp_ach[4][$];
  int exp_alv[4][$];
  task automatic asic_fire(input int a, input logic [15:0] mask);
    logic [15:0] lv [16];
    for (int i = 0; i < 16; i++) lv[i] = 16'($urandom);
    if (!mute[a]) for (int i = 0; i < 16; i++) if (mask[i]) begin
      exp_ach[a].push_back(a * 16 + i); exp_alv[a].push_back(int'(lv[i]));
    end
    case (a)
      0: g_asic[0].m.fire(mask, lv);
      1: g_asic[1].m.fire(mask, lv);
      2: g_asic[2].m.fire(mask, lv);
      default: g_asic[3].m.fire(mask, lv);
    endcase
  endtask

  // ---------------- processor memory ----------------
  logic [31:0] ring [RS];
  logic [31:0] lin[$];
  bit consume = 1;
  int n_backpressure = 0, n_ring_full = 0;
  assign m_ready = 1'b1;
  always @(posedge clk) begin
    if (rst_n && m_we && m_ready) begin
      int used;
      used = (int'(wr_ptr) - int'(sw_rd_ptr) + RS) % RS;
      check(used < RS - 1, "no overwrite of unread ring data");
      ring[m_addr - ring_base] <= m_wdata;
    end
    // a bank is waiting but the ring has no room for it
    if (rst_n && (dut.rd_avail & ~dut.u_dma.req[3:0]) != 0) n_ring_full++;
  end
  always @(negedge clk) if (consume && sw_rd_ptr != wr_ptr) begin
    lin.push_back(ring[sw_rd_ptr]);
    sw_rd_ptr <= (sw_rd_ptr == RS - 1) ? '0 : sw_rd_ptr + 1'b1;
  end

  // ---------------- stimulus ----------------
  // expected digital events per channel: amplitude (0 = pileup, energy not checked)
  int  exp_dA[NCH][$];
  bit  exp_dwave[NCH][$];
  bit  exp_dpile[NCH][$];
  int  n_or_pulses = 0;
  task automatic pulse(input int c, input int A, input bit expect_evt, input bit wave);
    inject[c] = inject[c] + A;
    if (expect_evt) begin exp_dA[c].push_back(A); exp_dwave[c].push_back(wave); exp_dpile[c].push_back(0); end
  endtask

  int n_info_dig = 0, n_info_ana = 0, n_full_banks = 0, n_flush_banks = 0;
  int n_mult = 0, n_pile = 0, n_nowave = 0, n_wave = 0, n_dig = 0, n_ana = 0;
  int n_timeout = 0, n_rejected = 0, n_id_bytes = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait_samples(300);
    fork
      begin : digital
        // three strips at once: one time entry, multiplicity 3
        pulse(0, 2000, 1, 1); pulse(37, 1500, 1, 1); pulse(63, 800, 1, 1);
        wait_samples(700);
        // pileup on strip 5
        // (the first pulse is small so that it falls back below the
        //  discriminator threshold before the second one arrives)
        pulse(5, 150, 0, 1);
        exp_dA[5].push_back(0); exp_dwave[5].push_back(1); exp_dpile[5].push_back(1);
        wait_samples(150);
        pulse(5, 1000, 0, 1);
        wait_samples(700);
        // below the energy threshold (L*60 < L*100), above the discriminator
        pulse(10, 60, 0, 0);
        n_rejected++;
        wait_samples(700);
        // waveform capture switched off
        ws_len = 0;
        pulse(20, 1200, 1, 0);
        wait_samples(700);
        ws_len = WS;
        for (int k = 0; k < 6; k++) begin
          pulse(8 * k + 3, 500 + 300 * k, 1, 1);
          wait_samples(400);
        end
      end
      begin : analogue
        // ASIC 1: two channels; ASIC 2 does not answer
        asic_fire(1, 16'h0204);
        mute[2] = 1;
        asic_fire(2, 16'h0010);
        n_or_pulses++;     // both ASICs fire together: one OR edge
        // ASIC 0: enough readouts to fill a 1024-word bank
        for (int r = 0; r < 33; r++) begin
          repeat (20) @(negedge clk);
          asic_fire(0, 16'hFFFF);
          n_or_pulses++;
          repeat (2) @(negedge clk);
          wait (ro_hold[0] == 0);
        end
        asic_fire(3, 16'h8001);
        n_or_pulses++;
      end
      begin : control
        wait_samples(100);
        @(negedge clk) sync_in = 1;
        repeat (4) @(negedge clk) sync_in = 0;
        wait_samples(1500);
        @(negedge clk) pause_in = 1;
        wait_samples(30);
        @(negedge clk) resume_in = 1;
      end
      begin : id_memory
        // read the six identity bytes at word address 0 of the ID memory
        logic [7:0] b;
        logic nk;
        i2c_op(0, 0, 0, b, nk);
        i2c_op(2, 8'hA0, 0, b, nk); check(!nk, "ID memory address acknowledged");
        i2c_op(2, 8'h00, 0, b, nk); check(!nk, "ID memory word address acknowledged");
        i2c_op(0, 0, 0, b, nk);
        i2c_op(2, 8'hA1, 0, b, nk); check(!nk, "ID memory read address acknowledged");
        for (int i = 0; i < 6; i++) begin
          i2c_op(3, 0, i == 5, b, nk);
          check(b == 8'(i * 7 + 3), $sformatf("ID byte %0d = %h", i, b));
          n_id_bytes++;
        end
        i2c_op(1, 0, 0, b, nk);
      end
      begin : consumer_pause
        // the consumer holds off until a full bank waits for ring space
        consume = 0;
        while (!dut.g_asic[0].u_ro.rd_avail) @(negedge clk);
        repeat (1000) @(negedge clk);
        consume = 1;
      end
    join
    $display("stimulus done at %0t", $time);
    wait (ro_hold == 0 || mute != 0);
    repeat (2000) @(negedge clk);
    @(negedge clk) flush_tick = 1;
    @(negedge clk) flush_tick = 0;
    repeat (5000) @(negedge clk);
    check(sw_rd_ptr == wr_ptr, "ring drained");
    parse();
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- checking ----------------
  task automatic parse();
    int pos = 0;
    logic [15:0] hw[$];
    while (pos < lin.size()) begin
      logic [31:0] w = lin[pos];
      if (w[31:28] == DMA_BLK_MARK) begin
        int src = int'(w[27:24]), n = int'(w[15:0]);
        pos++;
        check(src < 4, "block source");
        if (n == 1024) n_full_banks++; else n_flush_banks++;
        for (int k = 0; k < n; k += 2) begin
          logic [31:0] w0 = lin[pos + k], w1 = lin[pos + k + 1];
          if (w0[31:30] == EVT_INFO) n_info_ana++;
          else if (w0[31:30] == EVT_ADC) begin
            n_ana++;
            check(int'(w0[21:16]) == src * 16 + int'(w0[19:16]) && int'(w0[21:20]) == src, "ASIC number in channel id");
            check(w0[27:22] == module_id, "module id");
            check(exp_ach[src].size() > 0 && int'(w0[21:16]) == exp_ach[src][0] && int'(w0[15:0]) == exp_alv[src][0],
                  $sformatf("analogue event %h exp ch %0d level %h", w0,
                            exp_ach[src].size() ? exp_ach[src][0] : -1, exp_alv[src].size() ? exp_alv[src][0] : -1));
            if (exp_ach[src].size()) begin void'(exp_ach[src].pop_front()); void'(exp_alv[src].pop_front()); end
          end else check(0, $sformatf("unknown event word %h", w0));
          check(w1[31:28] == 0, "time word");
        end
        pos += n;
      end else begin
        // one digital record: collect halfwords
        int need;
        hw.delete();
        hw.push_back(w[31:16]); hw.push_back(w[15:0]);
        pos++;
        if (hw[0][15:12] == DIG_INFO_MARK) begin
          n_info_dig++;
          pos++;
          continue;
        end
        check(hw[0][15:12] == DIG_EVT_MARK, $sformatf("record marker %h", hw[0]));
        while (hw.size() < 8) begin hw.push_back(lin[pos][31:16]); hw.push_back(lin[pos][15:0]); pos++; end
        need = 8 + int'(hw[6]);
        while (hw.size() < need) begin hw.push_back(lin[pos][31:16]); hw.push_back(lin[pos][15:0]); pos++; end
        check_dig(hw);
      end
    end
  endtask

  task automatic check_dig(input logic [15:0] hw[$]);
    int c = int'(hw[0][9:4]);
    logic [3:0] q = hw[0][3:0];
    int e = int'({hw[4], hw[5]});
    int wl = int'(hw[6]);
    n_dig++;
    if (int'(hw[7]) > 1) n_mult++;
    if (q[0]) n_pile++;
    if (wl == 0) n_nowave++; else n_wave++;
    if (exp_dA[c].size() == 0) begin check(0, $sformatf("unexpected event on strip %0d", c)); return; end
    if (exp_dpile[c][0]) check(q[0], "pileup flagged");
    else begin
      check(!q[0], "no pileup");
      check(real'(e) > 0.98 * L * exp_dA[c][0] && real'(e) < 1.02 * L * exp_dA[c][0],
            $sformatf("strip %0d energy %0d exp %0d", c, e, L * exp_dA[c][0]));
    end
    check(q[1] == exp_dwave[c][0] && (wl == (exp_dwave[c][0] ? WS : 0)), $sformatf("strip %0d waveform %0d", c, wl));
    if (wl > 0 && !exp_dpile[c][0]) begin
      int step = int'(hw[8 + PRE]) - int'(hw[8 + PRE - 1]);
      check(step > exp_dA[c][0] - 20 && step < exp_dA[c][0] + 20,
            $sformatf("strip %0d waveform step %0d at pre_len exp %0d", c, step, exp_dA[c][0]));
    end
    if (c == 0 || c == 37 || c == 63) check(int'(hw[7]) == 3, "three strips in one time entry");
    void'(exp_dA[c].pop_front()); void'(exp_dwave[c].pop_front()); void'(exp_dpile[c].pop_front());
  endtask

  task automatic report();
    int left = 0;
    for (int c = 0; c < NCH; c++) left += exp_dA[c].size();
    for (int a = 0; a < 4; a++) if (!mute[a]) left += exp_ach[a].size();
    check(left == 0, $sformatf("%0d expected events missing", left));
    check(dtsq_drop_count == 0, "no timestamp queue drop");
    n_timeout = int'(asic_timeout_count[2]);
    check(disc_or_count == 32'(n_or_pulses), $sformatf("discriminator OR edges %0d exp %0d", disc_or_count, n_or_pulses));
    check(cnv_ok == 4'hF, "ADC conversion time");
    $display("mechanisms: digital events %0d (with waveform %0d, without %0d, multiplicity>1 %0d, pileup %0d, below threshold %0d)",
             n_dig, n_wave, n_nowave, n_mult, n_pile, n_rejected);
    $display("            analogue events %0d, info records digital %0d analogue %0d, full banks %0d, flushed banks %0d",
             n_ana, n_info_dig, n_info_ana, n_full_banks, n_flush_banks);
    $display("            ASIC timeouts %0d, ring back-pressure cycles %0d, ID bytes over I2C %0d",
             n_timeout, n_ring_full, n_id_bytes);
    check(n_wave > 0, "event with waveform happened");
    check(n_nowave > 0, "event without waveform happened");
    check(n_mult > 0, "shared time entry happened");
    check(n_pile > 0, "pileup happened");
    check(n_info_dig >= 3 && n_info_ana >= 3, "SYNC/pause/resume records happened");
    check(n_full_banks > 0, "full bank hand-over happened");
    check(n_flush_banks > 0, "flush hand-over happened");
    check(n_timeout > 0, "ASIC timeout happened");
    check(n_ring_full > 0, "ring back-pressure happened");
    check(n_id_bytes == 6, "ID memory read over I2C happened");
    check(n_ana == 33 * 16 + 4, $sformatf("analogue events %0d", n_ana));
  endtask
endmodule
