// dma_engine_tb: two flip-flop RAM sources of 8-word banks and a stream of
// 16-bit events into a 40-word ring, with random memory back-pressure and a
// slow consumer that lets the ring fill up. The ring contents, read in order,
// must be exactly: bank blocks (header + words, in the order each source
// offered them) and stream events packed two per word, padded when odd.
// Also: no write into unread ring space, and a full bank moves at one word
// per clock when memory is always ready.
module dma_engine_tb;
  localparam int NR = 2, RAW = 3, RS = 40;
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

  logic [NR-1:0] rd_avail = 0, rd_done;
  logic [RAW:0]  rd_count [NR];
  logic [RAW-1:0] rd_addr;
  logic [31:0]   rd_data [NR];
  logic [15:0]   s_data;
  logic          s_valid, s_last, s_ready;
  logic          m_we, m_ready = 1;
  logic [31:0]   m_addr, m_wdata;
  logic [31:0]   ring_base = 32'h100;
  logic [23:0]   ring_size = RS, sw_rd_ptr = 0, wr_ptr;
  logic [31:0]   word_count;
  dma_engine #(.N_RAM(NR), .RAW(RAW), .PW(24)) dut (.*);

  // ---- bank sources
  logic [31:0] bank [NR][8];
  int          bank_seq [NR];
  logic [31:0] exp_blocks [NR][$];    // expected words of each source, in order
  int          exp_lens   [NR][$];
  always @(posedge clk) for (int i = 0; i < NR; i++) rd_data[i] <= bank[i][rd_addr];
  task automatic offer_bank(input int i, input int n);
    wait (!rd_avail[i]);
    @(negedge clk);
    for (int k = 0; k < 8; k++) bank[i][k] = {8'(i), 8'(bank_seq[i]), 16'(k)};
    for (int k = 0; k < n; k++) exp_blocks[i].push_back(bank[i][k]);
    exp_lens[i].push_back(n);
    bank_seq[i]++;
    rd_count[i] = (RAW+1)'(n);
    rd_avail[i] = 1;
  endtask
  always @(posedge clk) for (int i = 0; i < NR; i++) if (rd_done[i]) rd_avail[i] <= 0;

  // ---- stream source
  logic [15:0] sq[$];
  logic        sl[$];
  logic [15:0] exp_stream[$];       // packed 32-bit words as two halves
  int          ev_lens[$];
  bit          s_en = 1;
  assign s_valid = s_en && sq.size() > 0;
  assign s_data  = sq.size() ? sq[0] : '0;
  assign s_last  = sl.size() ? sl[0] : 1'b0;
  always @(posedge clk) begin
    logic f; f = s_valid && s_ready; #1;
    if (f) begin void'(sq.pop_front()); void'(sl.pop_front()); end
  end
  task automatic add_event(input int n);
    for (int k = 0; k < n; k++) begin
      logic [15:0] w = (k == 0) ? {4'hD, 12'($urandom)} : 16'($urandom);
      sq.push_back(w); sl.push_back(k == n - 1); exp_stream.push_back(w);
    end
    if (n % 2) exp_stream.push_back(16'h0);
    ev_lens.push_back((n + 1) / 2);
  endtask

  // ---- memory and consumer
  logic [31:0] ring [RS];
  logic [31:0] lin[$];
  bit          consume = 1;
  int          used_max = 0;
  always @(posedge clk) begin
    m_ready <= ($urandom % 4) != 0 || !consume;
    if (m_we && m_ready) begin
      int used;
      used = (int'(wr_ptr) - int'(sw_rd_ptr) + RS) % RS;
      check(used < RS - 1, "no write into unread space");
      check(m_addr == ring_base + 32'(wr_ptr), "address = base + wr_ptr");
      ring[m_addr - ring_base] <= m_wdata;
      if (used > used_max) used_max = used;
    end
  end
  always @(negedge clk) if (consume && sw_rd_ptr != wr_ptr && ($urandom % 3 == 0)) begin
    lin.push_back(ring[sw_rd_ptr]);
    sw_rd_ptr <= (sw_rd_ptr == RS - 1) ? '0 : sw_rd_ptr + 1'b1;
  end

  initial begin
    int first, last_c, pos, bi[NR], si;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // rate check: one bank, memory always ready, stream idle
    consume = 0;
    @(negedge clk);
    offer_bank(0, 8);
    first = -1;
    for (int c = 0; c < 40; c++) begin
      @(posedge clk); #1;
      if (m_we && m_ready && first < 0) first = c;
      if (m_we && m_ready) last_c = c;
    end
    check(last_c - first == 8, $sformatf("header + 8 words in %0d clocks", last_c - first + 1));
    consume = 1;
    // mixed traffic
    fork
      for (int n = 0; n < 6; n++) offer_bank(0, (n % 2) ? 8 : 2 * (n + 1) % 8 + 2);
      for (int n = 0; n < 6; n++) offer_bank(1, 8 - n);
      for (int n = 0; n < 10; n++) begin add_event(3 + n * 2 + (n % 2)); repeat (30) @(negedge clk); end
    join
    wait (rd_avail == 0 && sq.size() == 0);
    repeat (20) @(negedge clk);
    wait (sw_rd_ptr == wr_ptr);
    repeat (5) @(negedge clk);
    check(used_max >= RS - 12, $sformatf("ring filled up (max use %0d)", used_max));
    // parse
    pos = 0; bi = '{0, 0}; si = 0;
    while (pos < lin.size()) begin
      if (lin[pos][31:28] == 4'hA) begin
        int src, n;
        src = int'(lin[pos][27:24]); n = int'(lin[pos][15:0]);
        check(src < NR && exp_lens[src].size() > 0 && n == exp_lens[src][0], $sformatf("block header %h", lin[pos]));
        if (src < NR && exp_lens[src].size() > 0) void'(exp_lens[src].pop_front());
        pos++;
        for (int k = 0; k < n; k++) begin
          check(src < NR && exp_blocks[src].size() > 0 && lin[pos] == exp_blocks[src][0], $sformatf("block word %h", lin[pos]));
          if (src < NR && exp_blocks[src].size() > 0) void'(exp_blocks[src].pop_front());
          pos++;
        end
      end else begin
        int n;
        check(ev_lens.size() > 0, "stream event expected");
        n = ev_lens.size() ? ev_lens.pop_front() : 1;
        for (int k = 0; k < n; k++) begin
          check(lin[pos] == {exp_stream[0], exp_stream[1]}, $sformatf("stream word %h exp %h%h", lin[pos], exp_stream[0], exp_stream[1]));
          void'(exp_stream.pop_front()); void'(exp_stream.pop_front());
          pos++;
        end
      end
    end
    check(exp_blocks[0].size() == 0 && exp_blocks[1].size() == 0 && ev_lens.size() == 0, "everything delivered");
    check(word_count == 32'(lin.size()), "word count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
