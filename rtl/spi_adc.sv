// SPI master that reads one channel of an MCP3008 10-bit ADC, over and over.
//
// A frame lasts FRAME_LEN = 18 SPI clock periods. Each period begins with a
// falling SCLK edge, where this master updates CS and MOSI; the ADC samples
// MOSI on the following rising edge, and this master samples MISO on that
// rising edge too, in the middle of the bit the ADC shifted out on the
// previous falling edge. Period by period:
//   0      CS high (deselect gap between conversions)
//   1      CS low, MOSI = start bit (1)
//   2..5   MOSI = CTRL[3:0] = SGL/DIFF, D2, D1, D0 (channel select)
//   6      ADC finishes sampling; MOSI 0
//   7      ADC drives its null bit
//   8..17  ADC drives B9..B0, MSB first; shifted in on the rising edges
// At the rising edge of period 17 the result is copied to data_out and done
// pulses for one system clock. SCLK runs freely (also while CS is high), as in
// the original design. With the defaults (50 MHz system clock, SCLK_DIV_N =
// 250) SCLK is 100 kHz and a new sample arrives every 18 * 10 us = 180 us.
//
// The command bits, the free-running SPI clock of 2*250 system clocks and the
// held output register follow the original controller. The exact frame
// layout (one deselect period, 17 selected periods), sampling MISO on the
// rising edge rather than on the falling edge, and the synchronous reset are
// choices of this design. With enable low the master idles with CS high.
module spi_adc #(
  parameter int unsigned SCLK_DIV_N = 250,          // system clocks per SCLK half period
  parameter logic [3:0]  CTRL       = 4'b1000       // SGL/DIFF, D2, D1, D0: single-ended CH0
) (
  input  logic                        clk,
  input  logic                        rst,          // synchronous, active high
  input  logic                        enable,
  // SPI pins
  output logic                        sclk,
  output logic                        cs,           // chip select, active low
  output logic                        mosi,
  input  logic                        miso,
  // result
  output logic                        done,         // one-cycle pulse: data_out updated
  output logic [bldc_pkg::ADC_W-1:0]  data_out
);
  import bldc_pkg::*;

  typedef enum logic [2:0] {
    ST_GAP,     // CS high
    ST_START,   // start bit on MOSI
    ST_CMD,     // SGL/DIFF and channel bits on MOSI
    ST_WAIT,    // sampling end and null bit
    ST_DATA     // 10 result bits on MISO
  } state_e;

  state_e           state;
  logic [3:0]       bit_cnt;        // bits left in the current state
  logic [ADC_W-2:0] shift;          // first nine result bits
  logic             rise_en, fall_en;

  clk_div #(.N(SCLK_DIV_N)) u_sclk_div (
    .clk     (clk),
    .rst     (rst),
    .clk_out (sclk),
    .rise_en (rise_en),
    .fall_en (fall_en)
  );

  // CS and MOSI change on falling SCLK edges; in ST_DATA the bit counter
  // steps on rising edges, one per result bit.
  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= ST_GAP;
      bit_cnt <= '0;
      cs      <= 1'b1;
      mosi    <= 1'b0;
    end else if (fall_en) begin
      unique case (state)
        ST_GAP: begin
          if (enable) begin
            state <= ST_START;
            cs    <= 1'b0;
            mosi  <= 1'b1;
          end else begin
            cs    <= 1'b1;
            mosi  <= 1'b0;
          end
        end
        ST_START: begin
          state   <= ST_CMD;
          bit_cnt <= 4'd3;
          mosi    <= CTRL[3];
        end
        ST_CMD: begin
          if (bit_cnt == 4'd0) begin
            state   <= ST_WAIT;
            bit_cnt <= 4'd1;
            mosi    <= 1'b0;
          end else begin
            bit_cnt <= bit_cnt - 1'b1;
            mosi    <= CTRL[2'(bit_cnt - 1'b1)];
          end
        end
        ST_WAIT: begin
          if (bit_cnt == 4'd0) begin
            state   <= ST_DATA;
            bit_cnt <= 4'(ADC_W);
          end else begin
            bit_cnt <= bit_cnt - 1'b1;
          end
        end
        ST_DATA: begin
          // leave once the last result bit has been taken
          if (bit_cnt == 4'd0) begin
            state <= ST_GAP;
            cs    <= 1'b1;
          end
        end
        default: state <= ST_GAP;
      endcase
    end else if (rise_en && state == ST_DATA && bit_cnt != 4'd0) begin
      bit_cnt <= bit_cnt - 1'b1;
    end
  end

  // MISO is sampled on rising SCLK edges during ST_DATA.
  always_ff @(posedge clk) begin
    if (rst) begin
      shift    <= '0;
      data_out <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (rise_en && state == ST_DATA) begin
        shift <= {shift[ADC_W-3:0], miso};
        if (bit_cnt == 4'd1) begin       // B0, the last result bit
          data_out <= {shift, miso};
          done     <= 1'b1;
        end
      end
    end
  end

endmodule
