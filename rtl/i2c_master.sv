// i2c_master: byte-level I2C bus master for the two-wire register path to the
// ASICs and to the board's ID EEPROM.
//
// The processor issues one command at a time on a valid/ready handshake:
// START (also a repeated start), STOP, WRITE (send cmd_data, return the
// acknowledge bit the slave gave) or READ (receive a byte, then send cmd_nack
// as the master's acknowledge: 0 = ACK, 1 = NACK for the last byte). Each
// command ends with one rsp_valid pulse carrying rsp_data (the byte read) and
// rsp_nack (the slave's acknowledge bit after a WRITE; 1 = not acknowledged).
//
// Both bus lines are open drain: scl_oe / sda_oe = 1 pulls the line low, 0
// releases it; scl_i / sda_i are the line levels. Every bit is four quarter
// periods of QUARTER clocks: SCL low with SDA set up, SCL released, SCL high
// (SDA sampled at the end, mid-high), SCL low again. While SCL is released the
// quarter counter waits for scl_i to go high, so a slave may stretch the
// clock. START releases both lines, then pulls SDA low while SCL is high, then
// SCL; STOP pulls SDA low with SCL low, releases SCL, then SDA. With
// QUARTER = 250 the bus runs at 100 kHz from a 100 MHz clock.
//
// The two signals (clock and bidirectional data) follow the specification; it
// gives no more of the interface, so the command set, the bus speed and the
// bit timing are this design's, chosen to follow the usual I2C rules.
module i2c_master #(
  parameter int unsigned QUARTER = 250   // clocks per quarter SCL period
) (
  input  logic       clk,
  input  logic       rst_n,
  // command side
  input  logic       cmd_valid,
  output logic       cmd_ready,
  input  logic [1:0] cmd_op,       // 0 START, 1 STOP, 2 WRITE, 3 READ
  input  logic [7:0] cmd_data,
  input  logic       cmd_nack,     // READ: acknowledge bit the master sends
  output logic       rsp_valid,
  output logic [7:0] rsp_data,
  output logic       rsp_nack,
  // bus (open drain)
  output logic       scl_oe,
  output logic       sda_oe,
  input  logic       scl_i,
  input  logic       sda_i
);
  localparam logic [1:0] OP_START = 2'd0, OP_STOP = 2'd1, OP_WRITE = 2'd2, OP_READ = 2'd3;
  localparam int unsigned CW = $clog2(QUARTER + 1);

  typedef enum logic [1:0] {S_IDLE, S_START, S_STOP, S_BITS} state_t;
  state_t state;

  logic [CW-1:0] cnt;
  logic [1:0]    phase;
  logic [3:0]    nbit;     // bits done in this byte (0..8, bit 8 is the acknowledge)
  logic [8:0]    tx;       // bits to drive, MSB first (1 = release)
  logic [8:0]    rx;       // bits sampled
  logic          reading;

  wire quarter_end = cnt == CW'(QUARTER - 1);
  // in the phases where SCL is released, wait for the line to be high
  wire scl_wait    = !scl_oe && !scl_i;

  assign cmd_ready = state == S_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cnt <= '0; phase <= '0; nbit <= '0;
      tx <= '1; rx <= '0; reading <= 1'b0;
      scl_oe <= 1'b0; sda_oe <= 1'b0;
      rsp_valid <= 1'b0; rsp_data <= '0; rsp_nack <= 1'b0;
    end else begin
      rsp_valid <= 1'b0;
      if (state == S_IDLE) begin
        cnt <= '0; phase <= '0; nbit <= '0;
        if (cmd_valid) begin
          unique case (cmd_op)
            OP_START: state <= S_START;
            OP_STOP:  state <= S_STOP;
            default: begin
              state   <= S_BITS;
              reading <= cmd_op == OP_READ;
              tx      <= (cmd_op == OP_READ) ? {8'hFF, cmd_nack} : {cmd_data, 1'b1};
            end
          endcase
        end
      end else if (!scl_wait) begin
        cnt <= quarter_end ? '0 : cnt + 1'b1;
        unique case (state)
          S_START: begin
            // quarter 0: release SDA (SCL still low after a byte); 1: release
            // SCL; 2: SDA low while SCL high; 3: SCL low
            unique case (phase)
              2'd0: sda_oe <= 1'b0;
              2'd1: scl_oe <= 1'b0;
              2'd2: sda_oe <= 1'b1;
              default: scl_oe <= 1'b1;
            endcase
          end
          S_STOP: begin
            unique case (phase)
              2'd0: begin scl_oe <= 1'b1; sda_oe <= 1'b1; end
              2'd1: scl_oe <= 1'b0;
              2'd2: sda_oe <= 1'b0;
              default: ;
            endcase
          end
          S_BITS: begin
            unique case (phase)
              2'd0: begin scl_oe <= 1'b1; sda_oe <= !tx[8]; end
              2'd1: scl_oe <= 1'b0;
              2'd2: if (quarter_end) rx <= {rx[7:0], sda_i};
              default: scl_oe <= 1'b1;
            endcase
          end
          default: ;
        endcase
        if (quarter_end) begin
          phase <= phase + 1'b1;
          if (phase == 2'd3) begin
            if (state == S_BITS) begin
              tx   <= {tx[7:0], 1'b1};
              nbit <= nbit + 1'b1;
              if (nbit == 4'd8) begin
                sda_oe    <= 1'b0;
                state     <= S_IDLE;
                rsp_valid <= 1'b1;
                rsp_data  <= reading ? rx[8:1] : 8'h00;
                rsp_nack  <= reading ? 1'b0 : rx[0];
              end
            end else begin
              state     <= S_IDLE;
              rsp_valid <= 1'b1;
              rsp_data  <= 8'h00;
              rsp_nack  <= 1'b0;
            end
          end
        end
      end
    end
  end

  a_one_command: assert property (@(posedge clk) disable iff (!rst_n)
                                  cmd_valid && cmd_ready |=> !cmd_ready);
endmodule
