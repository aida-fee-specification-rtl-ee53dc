// asic_readout_tb: one ASIC's analogue readout with the ASIC model and the
// serial ADC model. Discriminator pulses on three channels must produce a
// TSMSB info event and three ADC events carrying the held levels and the time
// of the discriminator edge, in the bank handed over by a flush; a SYNC flag
// after the time crossed a 2^28 boundary adds a new TSMSB and a SYNC event. Also checks the
// conversion time per channel.
module asic_readout_tb;
  import aida_pkg::*;
  localparam int CONV = 40, HALF = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [5:0] module_id = 6'd3;
  logic [1:0] asic_id = 2'd1;
  logic [47:0] ts = 48'h0000_0FFF_FF00;
  ts_flags_t flags = '0;
  logic [15:0] disc, aout;
  logic [3:0] ro_chan;
  logic ro_valid, ro_last, ro_hold, ro_start, ro_next, ro_clr, ro_reset, disc_or, mute = 0;
  logic adc_cnv, adc_sck, adc_sdi, adc_sdo, cnv_ok;
  int conversions;
  logic flush = 0, rd_avail, rd_done = 0;
  logic [6:0] rd_count;
  logic [5:0] rd_addr = 0;
  logic [31:0] rd_data, event_count;
  logic [15:0] timeout_count, tsq_drop_count, swap_count;

  asic_readout #(.TSQ_DEPTH(8), .RAM_WORDS(64), .CONV_CYCLES(CONV), .SCK_HALF(HALF), .TIMEOUT(500)) dut (.*);
  asic_model asic (.clk, .ro_start, .ro_next, .ro_clr, .ro_reset, .disc, .disc_or,
                   .ro_chan, .ro_valid, .ro_last, .ro_hold, .aout, .mute);
  ad7686_model #(.MIN_CONV_NS(CONV * 10.0 - 1.0)) adc (.cnv(adc_cnv), .sck(adc_sck), .sdi(adc_sdi),
    .sdo(adc_sdo), .value(aout), .cnv_high_ok(cnv_ok), .conversions);

  always @(posedge clk) ts <= ts + 1;

  int t_first_cnv = -1, t_last_done = -1, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (adc_cnv && t_first_cnv < 0) t_first_cnv = cyc;
  end

  initial begin
    logic [15:0] lv [16];
    logic [47:0] t_edge;
    logic [31:0] expw[$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 16; i++) lv[i] = 16'($urandom);
    asic.fire(16'b0100_0000_1000_0001, lv);
    t_edge = ts + 2;        // time seen two clocks later, after the synchroniser
    expw.push_back(info_word0(module_id, INFO_TSMSB, t_edge)); expw.push_back(ts_word1(t_edge));
    foreach (lv[i]) if (i == 0 || i == 7 || i == 14) begin
      expw.push_back(adc_word0(module_id, {asic_id, 4'(i)}, lv[i]));
      expw.push_back(ts_word1(t_edge));
    end
    repeat (600) @(negedge clk);
    check(event_count == 3 && conversions == 3, "three conversions");
    check(cnv_ok, "conversion time respected");
    @(negedge clk) flags.sync = 1;
    // the time has crossed a 2^28 boundary since the first entry: new TSMSB first
    check(ts[47:28] != t_edge[47:28], "time MSBs changed");
    expw.push_back(info_word0(module_id, INFO_TSMSB, ts)); expw.push_back(ts_word1(ts));
    expw.push_back(info_word0(module_id, INFO_SYNC, ts)); expw.push_back(ts_word1(ts));
    @(negedge clk) flags.sync = 0;
    repeat (20) @(negedge clk);
    check(!rd_avail, "bank not handed over before flush");
    flush = 1;
    @(negedge clk) flush = 0;
    repeat (3) @(negedge clk);
    check(rd_avail && rd_count == 7'(expw.size()), $sformatf("bank with %0d words exp %0d", rd_count, expw.size()));
    foreach (expw[i]) begin
      @(negedge clk) rd_addr = 6'(i);
      @(negedge clk) check(rd_data == expw[i], $sformatf("word %0d %h exp %h", i, rd_data, expw[i]));
    end
    @(negedge clk) rd_done = 1;
    @(negedge clk) rd_done = 0;
    check(!rd_avail && swap_count == 1, "bank returned");
    check(timeout_count == 0 && tsq_drop_count == 0, "no timeout or drop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
