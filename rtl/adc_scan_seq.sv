// adc_scan_seq: reads every telemetry sensor of the RF downconverter in turn.
//
// The downconverter carries two MAX1168 ADCs; ADC1 (chip select CS1) digitises
// the LO-section temperatures, LO power and supply currents on AIN0..7, ADC2
// (CS2) the eight signal-path temperatures on AIN0..7. One sweep visits ADC1
// channels 0..7 and then ADC2 channels 0..7. For each sensor the sequence is:
//   1. pull the ADC's chip select low and wait CS_SETUP cycles;
//   2. clock out 16 SCLKs: the command byte {channel, SCAN=00, REF PD=01,
//      INT CLK=1} followed by eight don't-care bits; SCLK then stops because
//      the ADC converts on its own internal clock;
//   3. wait for the ADC to pull EOC low (end of conversion);
//   4. clock in 16 SCLKs carrying the result, MSB first;
//   5. release chip select, publish the result (`res_valid`) and offer it to
//      the serial output (`out_valid`/`out_ready`), then keep CS high for at
//      least CS_GAP cycles before the next conversion.
// This is the acquisition loop of the design's telemetry flowchart, moved
// from processor software into logic. Two protections are this design's own:
// if EOC does not fall within EOC_TIMEOUT cycles the conversion is abandoned
// and counted in `timeout_cnt` (SPI has no acknowledge, so a missing ADC would
// otherwise hang the loop), and a sweep runs only when asked.
//
// Starting: a `start` pulse runs one sweep; `continuous` keeps sweeping; and
// after START_CHARS characters have arrived from the host (`rx_char` pulses)
// the sequencer is armed and sweeps for ever, which is how the system is
// brought up from a terminal (type two characters).
//
// Timing per sensor: CS_SETUP + 32*2*HALF_DIV + (EOC wait) + (serial output
// back-pressure) + CS_GAP cycles. `eoc_n` is asynchronous and is brought in
// through two flip-flops.
module adc_scan_seq
  import tlm_pkg::*;
#(
  parameter int unsigned CS_SETUP    = 100,
  parameter int unsigned CS_GAP      = 100,
  parameter int unsigned EOC_TIMEOUT = 20000,
  parameter int unsigned START_CHARS = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  // control
  input  logic                start,
  input  logic                continuous,
  input  logic                rx_char,
  // SPI controller
  output logic                spi_start,
  output logic [15:0]         spi_tx,
  input  logic [15:0]         spi_rx,
  input  logic                spi_done,
  // ADC pins owned by the sequencer
  output logic [N_ADC-1:0]    cs_n,
  input  logic                eoc_n,
  // results
  output logic                res_valid,
  output tlm_result_t         res,
  output logic                out_valid,
  output logic [RESULT_W-1:0] out_data,
  input  logic                out_ready,
  // status
  output logic                busy,
  output logic                armed,
  output logic [15:0]         sweep_cnt,
  output logic [7:0]          timeout_cnt
);

  localparam int unsigned TMAX  = (EOC_TIMEOUT > CS_SETUP) ?
                                  ((EOC_TIMEOUT > CS_GAP) ? EOC_TIMEOUT : CS_GAP) :
                                  ((CS_SETUP > CS_GAP) ? CS_SETUP : CS_GAP);
  localparam int unsigned TW    = $clog2(TMAX + 1);
  localparam int unsigned CHR_W = $clog2(START_CHARS + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_CS_SETUP, S_CMD, S_CMD_WAIT, S_EOC, S_READ, S_READ_WAIT, S_SEND, S_GAP
  } state_e;

  state_e            state;
  logic [3:0]        idx;          // {adc, ch}
  logic [TW-1:0]     timer;
  logic [CHR_W-1:0]  chr_cnt;
  logic [1:0]        eoc_sync;
  logic              eoc_low;

  assign eoc_low = ~eoc_sync[1];
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) eoc_sync <= 2'b11;
    else        eoc_sync <= {eoc_sync[0], eoc_n};
  end

  // Host characters arm the free-running mode.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chr_cnt <= '0;
      armed   <= 1'b0;
    end else if (rx_char && !armed) begin
      if (chr_cnt == CHR_W'(START_CHARS - 1)) armed <= 1'b1;
      chr_cnt <= chr_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      idx         <= '0;
      timer       <= '0;
      cs_n        <= '1;
      spi_start   <= 1'b0;
      spi_tx      <= '0;
      res_valid   <= 1'b0;
      res         <= '0;
      out_valid   <= 1'b0;
      out_data    <= '0;
      sweep_cnt   <= '0;
      timeout_cnt <= '0;
    end else begin
      spi_start <= 1'b0;
      res_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start || continuous || armed) begin
            idx   <= '0;
            timer <= '0;
            cs_n  <= ~(N_ADC'(1));
            state <= S_CS_SETUP;
          end
        end
        S_CS_SETUP: begin
          timer <= timer + 1'b1;
          if (timer == TW'(CS_SETUP - 1)) begin
            spi_tx    <= {max1168_cmd(idx[2:0]), 8'h00};
            spi_start <= 1'b1;
            state     <= S_CMD;
          end
        end
        S_CMD:      state <= S_CMD_WAIT;  // spi_master sees start this cycle
        S_CMD_WAIT: begin
          timer <= '0;
          if (spi_done) state <= S_EOC;
        end
        S_EOC: begin
          timer <= timer + 1'b1;
          if (eoc_low) begin
            spi_tx    <= '0;
            spi_start <= 1'b1;
            state     <= S_READ;
          end else if (timer == TW'(EOC_TIMEOUT - 1)) begin
            cs_n        <= '1;
            timeout_cnt <= timeout_cnt + 1'b1;
            timer       <= '0;
            state       <= S_GAP;
          end
        end
        S_READ:      state <= S_READ_WAIT;
        S_READ_WAIT: begin
          if (spi_done) begin
            cs_n      <= '1;
            res_valid <= 1'b1;
            res       <= '{adc: idx[3], ch: idx[2:0], value: spi_rx};
            out_valid <= 1'b1;
            out_data  <= spi_rx;
            state     <= S_SEND;
          end
        end
        S_SEND: begin
          if (out_ready) begin
            out_valid <= 1'b0;
            timer     <= '0;
            state     <= S_GAP;
          end
        end
        S_GAP: begin
          timer <= timer + 1'b1;
          if (timer >= TW'(CS_GAP - 1)) begin
            timer <= '0;
            if (idx == 4'(N_SENSOR - 1)) begin
              sweep_cnt <= sweep_cnt + 1'b1;
              if (continuous || armed) begin
                idx   <= '0;
                cs_n  <= ~(N_ADC'(1));
                state <= S_CS_SETUP;
              end else begin
                state <= S_IDLE;
              end
            end else begin
              idx   <= idx + 1'b1;
              cs_n  <= ~(N_ADC'(1) << ((idx + 1'b1) >> 3));
              state <= S_CS_SETUP;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A chip select is low only while a conversion is in progress, and never
  // both at once.
  a_one_cs: assert property (@(posedge clk) disable iff (!rst_n) $countones(~cs_n) <= 1);
  a_cs_busy: assert property (@(posedge clk) disable iff (!rst_n)
                              (state == S_IDLE) |-> (cs_n == '1));

endmodule
