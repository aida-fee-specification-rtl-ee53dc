// ad7686_if: reads the 16-bit serial ADC that digitises an ASIC's
// multiplexed analogue output.
//
// The converter (500 ksps, 16 bits, serial output) is used in its three-wire
// mode without busy indicator: SDI is held high, a rising edge on CNV starts
// a conversion, CNV stays high for the conversion time, and when CNV falls
// the converter drives the MSB on SDO and shifts the next bit out after each
// falling edge of SCK. A start pulse runs one conversion: CNV high for
// CONV_CYCLES clocks, then 16 SCK periods of 2 x SCK_HALF clocks; SDO is
// sampled at the end of each low phase, just before the rising edge. data is
// valid with the one-cycle done pulse; busy is high from start to done.
// Defaults give 1.6 us conversion time and a 25 MHz SCK from a 100 MHz clock,
// about 2 us per conversion. The part and its rate are the specification's;
// the mode and timing come from the converter's usual use and are this
// design's choice.
module ad7686_if #(
  parameter int unsigned CONV_CYCLES = 160,
  parameter int unsigned SCK_HALF    = 2,
  parameter int unsigned BITS        = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  output logic            done,
  output logic [BITS-1:0] data,
  // converter pins
  output logic            cnv,
  output logic            sck,
  output logic            sdi,
  input  logic            sdo
);
  typedef enum logic [1:0] {S_IDLE, S_CONV, S_LOW, S_HIGH} state_t;
  state_t state;
  logic [$clog2(CONV_CYCLES + 1)-1:0] cnt;
  logic [$clog2(BITS + 1)-1:0]        nbits;
  logic [BITS-1:0]                    sh;

  assign sdi  = 1'b1;
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cnt <= '0; nbits <= '0; sh <= '0;
      cnv <= 1'b0; sck <= 1'b0; done <= 1'b0; data <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          cnv   <= 1'b1;
          cnt   <= '0;
          state <= S_CONV;
        end
        S_CONV: begin
          if (cnt == $bits(cnt)'(CONV_CYCLES - 1)) begin
            cnv   <= 1'b0;
            cnt   <= '0;
            nbits <= '0;
            state <= S_LOW;
          end else cnt <= cnt + 1'b1;
        end
        S_LOW: begin
          if (cnt == $bits(cnt)'(SCK_HALF - 1)) begin
            cnt <= '0;
            sh  <= {sh[BITS-2:0], sdo};
            if (nbits == $bits(nbits)'(BITS - 1)) begin
              data  <= {sh[BITS-2:0], sdo};
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              nbits <= nbits + 1'b1;
              sck   <= 1'b1;
              state <= S_HIGH;
            end
          end else cnt <= cnt + 1'b1;
        end
        S_HIGH: begin
          if (cnt == $bits(cnt)'(SCK_HALF - 1)) begin
            cnt   <= '0;
            sck   <= 1'b0;
            state <= S_LOW;
          end else cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
