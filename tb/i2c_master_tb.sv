// i2c_master_tb: drives the I2C master against an EEPROM model on an
// open-drain bus and checks:
//   - a write of four bytes to the model, every byte acknowledged;
//   - a random read of the same bytes back (word address write, repeated
//     start, four reads, the last with NACK), data compared;
//   - a preset model byte read back after a second address write;
//   - a NACK reported for a device address nobody answers;
//   - the SCL period of 4 x QUARTER clocks (rising edge to rising edge), the byte time of 36 x QUARTER
//     clocks from command to response, start and stop conditions counted by
//     the model, and a transaction that completes across clock stretching.
module i2c_master_tb;
  localparam int Q = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic cmd_valid = 0, cmd_ready, cmd_nack = 0, rsp_valid, rsp_nack;
  logic [1:0] cmd_op = 0;
  logic [7:0] cmd_data = 0, rsp_data;
  logic scl_oe, sda_oe, sda_pull, scl_pull;
  wire scl = !scl_oe && !scl_pull;
  wire sda = !sda_oe && !sda_pull;
  int n_start, n_stop, n_stretch;

  i2c_master #(.QUARTER(Q)) dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_op, .cmd_data,
    .cmd_nack, .rsp_valid, .rsp_data, .rsp_nack, .scl_oe, .sda_oe, .scl_i(scl), .sda_i(sda));
  i2c_eeprom_model #(.ADDR(7'h50), .STRETCH_NS(230)) rom (.scl, .sda, .sda_pull, .scl_pull,
    .n_start, .n_stop, .n_stretch);

  // SCL period, measured between rising edges inside a byte
  int last_rise = -1, n_period_ok = 0, n_period_long = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  // cycles in which the master has released SCL but a slave holds it low
  always @(posedge clk) if (rst_n && !scl_oe && !scl) n_period_long++;
  always @(posedge scl) begin
    if (last_rise >= 0) begin
      if (cyc - last_rise == 4 * Q) n_period_ok++;
    end
    last_rise = cyc;
  end

  int byte_cycles;
  task automatic op(input logic [1:0] o, input logic [7:0] d, input logic nk,
                    output logic [7:0] rd, output logic ack_bad);
    int t0;
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_op = o; cmd_data = d; cmd_nack = nk;
    @(posedge clk); t0 = cyc;
    @(negedge clk); cmd_valid = 0;
    while (!rsp_valid) @(negedge clk);
    rd = rsp_data; ack_bad = rsp_nack;
    byte_cycles = cyc - t0;
  endtask

  logic [7:0] rd, wdat [4];
  logic nk;
  int s0, p0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    s0 = n_start; p0 = n_stop;
    // write four bytes at word address 0x10
    for (int i = 0; i < 4; i++) wdat[i] = 8'($urandom);
    op(0, 0, 0, rd, nk);
    op(2, 8'hA0, 0, rd, nk); check(!nk, "device address acknowledged");
    check(byte_cycles == 36 * Q + 1, $sformatf("byte time %0d exp %0d", byte_cycles, 36 * Q + 1));
    op(2, 8'h10, 0, rd, nk); check(!nk, "word address acknowledged");
    check(byte_cycles > 36 * Q + 10 && byte_cycles <= 36 * Q + 40,
          $sformatf("byte time %0d after a stretch", byte_cycles));
    for (int i = 0; i < 4; i++) begin
      op(2, wdat[i], 0, rd, nk); check(!nk, "data byte acknowledged");
    end
    op(1, 0, 0, rd, nk);
    for (int i = 0; i < 4; i++) check(rom.mem[16 + i] == wdat[i], $sformatf("model holds byte %0d", i));
    // random read of the same four bytes
    op(0, 0, 0, rd, nk);
    op(2, 8'hA0, 0, rd, nk); check(!nk, "device address acknowledged");
    op(2, 8'h10, 0, rd, nk); check(!nk, "word address acknowledged");
    op(0, 0, 0, rd, nk);
    op(2, 8'hA1, 0, rd, nk); check(!nk, "read address acknowledged");
    for (int i = 0; i < 4; i++) begin
      op(3, 0, i == 3, rd, nk);
      check(rd == wdat[i], $sformatf("read byte %0d = %h exp %h", i, rd, wdat[i]));
    end
    op(1, 0, 0, rd, nk);
    // a preset byte at 0x40
    op(0, 0, 0, rd, nk);
    op(2, 8'hA0, 0, rd, nk);
    op(2, 8'h40, 0, rd, nk);
    op(0, 0, 0, rd, nk);
    op(2, 8'hA1, 0, rd, nk);
    op(3, 0, 1, rd, nk);
    check(rd == 8'(64 * 7 + 3), $sformatf("preset byte %h", rd));
    op(1, 0, 0, rd, nk);
    // nobody at 0x51
    op(0, 0, 0, rd, nk);
    op(2, 8'hA2, 0, rd, nk); check(nk, "absent device not acknowledged");
    op(1, 0, 0, rd, nk);
    repeat (20) @(posedge clk);
    check(scl && sda, "bus released when idle");
    check(n_start - s0 == 6 && n_stop - p0 == 4,
          $sformatf("conditions start %0d stop %0d", n_start - s0, n_stop - p0));
    check(n_stretch == 5, $sformatf("stretches %0d", n_stretch));
    check(n_period_ok > 100, $sformatf("SCL periods of 4 x QUARTER: %0d", n_period_ok));
    check(n_period_long > 5 * 10, $sformatf("master waited %0d cycles for stretched SCL", n_period_long));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
