// spi_master: single-word SPI master, mode 0 (SCLK idles low), MSB first.
//
// This is the SPI controller of the telemetry link. A transfer starts with a
// one-cycle `start`; the word in `tx_data` is shifted out on `mosi` while
// `miso` is shifted into `rx_data`. `mosi` changes after each falling SCLK
// edge and both sides sample on the rising edge, which is what the MAX1168
// expects: it latches DIN on the rising edge of SCLK and moves DOUT after the
// falling edge, with the MSB of a result already on DOUT before the first
// rising edge. Chip selects are not driven here; the sequencer owns them, so
// a command and the later read-back can share one CS low period with SCLK
// stopped in between (the ADC runs on its internal clock meanwhile).
//
// Timing: each SCLK half period is HALF_DIV clock cycles, so a WORD_W-bit
// transfer takes 2*HALF_DIV*WORD_W cycles from `start` to `done` (a one-cycle
// pulse with `rx_data` valid). The default gives 200 kbit/s from a 100 MHz
// clock; the bit rate is the design's target rate, the clock is this design's
// own assumption. `start` is ignored while `busy`.
module spi_master #(
  parameter int unsigned WORD_W   = 16,
  parameter int unsigned HALF_DIV = 250
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [WORD_W-1:0] tx_data,
  output logic [WORD_W-1:0] rx_data,
  output logic              busy,
  output logic              done,
  output logic              sclk,
  output logic              mosi,
  input  logic              miso
);

  localparam int unsigned DIV_W = (HALF_DIV > 1) ? $clog2(HALF_DIV) : 1;
  localparam int unsigned CNT_W = $clog2(WORD_W + 1);

  logic [DIV_W-1:0]  div_cnt;
  logic [CNT_W-1:0]  bit_cnt;
  logic [WORD_W-1:0] tx_sh;
  logic              tick;

  assign tick = (div_cnt == DIV_W'(HALF_DIV - 1));
  assign mosi = tx_sh[WORD_W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      sclk    <= 1'b0;
      div_cnt <= '0;
      bit_cnt <= '0;
      tx_sh   <= '0;
      rx_data <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        sclk    <= 1'b0;
        div_cnt <= '0;
        if (start) begin
          busy    <= 1'b1;
          tx_sh   <= tx_data;
          bit_cnt <= '0;
        end
      end else begin
        div_cnt <= tick ? '0 : div_cnt + 1'b1;
        if (tick) begin
          if (!sclk) begin
            // rising edge: both ends sample
            sclk    <= 1'b1;
            rx_data <= {rx_data[WORD_W-2:0], miso};
          end else begin
            // falling edge: next bit out, or finish
            sclk <= 1'b0;
            if (bit_cnt == CNT_W'(WORD_W - 1)) begin
              busy <= 1'b0;
              done <= 1'b1;
            end else begin
              bit_cnt <= bit_cnt + 1'b1;
              tx_sh   <= {tx_sh[WORD_W-2:0], 1'b0};
            end
          end
        end
      end
    end
  end

endmodule
