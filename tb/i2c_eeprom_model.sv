// i2c_eeprom_model: behavioural model of a 128-byte I2C EEPROM (the board's
// ID memory) for simulation only.
//
// It answers at device address ADDR. A write transaction sends a word
// address and then data bytes, stored at consecutive addresses; a read
// transaction (usually after a write of the word address and a repeated
// start) returns bytes from consecutive addresses until the master answers
// NACK. Lines are open drain: sda_pull / scl_pull = 1 pulls the line low. The
// model changes SDA only while SCL is low, samples on the SCL rising edge,
// and, when STRETCH_NS is non-zero, holds SCL low for that long after
// acknowledging its address, to exercise clock stretching. It counts start
// and stop conditions and the stretches it made.
module i2c_eeprom_model #(
  parameter logic [6:0] ADDR       = 7'h50,
  parameter int         STRETCH_NS = 0
) (
  input  logic scl,
  input  logic sda,
  output logic sda_pull,
  output logic scl_pull,
  output int   n_start,
  output int   n_stop,
  output int   n_stretch
);
  logic [7:0] mem [128];
  logic [6:0] ptr;
  bit         again;

  initial begin
    sda_pull = 1'b0; scl_pull = 1'b0;
    n_start = 0; n_stop = 0; n_stretch = 0;
    ptr = '0;
    for (int i = 0; i < 128; i++) mem[i] = 8'(i * 7 + 3);
  end

  task automatic get_byte(output logic [7:0] b);
    for (int i = 0; i < 8; i++) begin
      @(posedge scl);
      b = {b[6:0], sda};
    end
  endtask

  task automatic give_ack(bit stretch);
    @(negedge scl); #1; sda_pull = 1'b1;
    @(negedge scl); #1; sda_pull = 1'b0;
    if (stretch && STRETCH_NS > 0) begin
      // hold SCL low for a while; the next data bit is set up meanwhile
      scl_pull = 1'b1; n_stretch++;
      fork
        begin #(STRETCH_NS); scl_pull = 1'b0; end
      join_none
    end
  endtask

  // called just after SCL fell; returns the master's acknowledge bit
  task automatic put_byte(input logic [7:0] b, output logic nack);
    for (int i = 7; i >= 0; i--) begin
      sda_pull = !b[i];
      @(negedge scl); #1;
    end
    sda_pull = 1'b0;
    @(posedge scl); nack = sda;
    @(negedge scl); #1;
  endtask

  task automatic transaction();
    logic [7:0] b;
    logic nack;
    get_byte(b);
    if (b[7:1] != ADDR) begin
      @(ev_stop_or_start);   // not addressed: ignore until the next condition
    end else begin
      give_ack(1'b1);
      if (!b[0]) begin
        get_byte(b); give_ack(1'b0); ptr = b[6:0];
        forever begin
          get_byte(b); give_ack(1'b0);
          mem[ptr] = b; ptr = ptr + 1'b1;
        end
      end else begin
        forever begin
          put_byte(mem[ptr], nack); ptr = ptr + 1'b1;
          if (nack) break;
        end
        @(ev_stop_or_start);
      end
    end
  endtask

  event ev_stop_or_start;
  always @(negedge sda) if (scl) begin n_start++; again = 1'b1; ->ev_stop_or_start; end
  always @(posedge sda) if (scl) begin n_stop++;  again = 1'b0; ->ev_stop_or_start; end

  initial begin
    again = 1'b0;
    forever begin
      if (!again) @(negedge sda iff scl);
      #1;   // let the start condition's own event pass
      again = 1'b0;
      fork
        transaction();
        @(ev_stop_or_start);
      join_any
      disable fork;
      sda_pull = 1'b0; scl_pull = 1'b0;
    end
  end
endmodule
