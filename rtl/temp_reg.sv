// temp_reg: processor-visible register block of the telemetry peripheral.
//
// It is the custom peripheral through which the processor controls the
// telemetry link and reads its results. It holds
//   - CTRL: a self-clearing "start one sweep" bit, the continuous-sweep bit,
//     the two heater-resistor lines SHDN_p and SHDN_n (both 0 at reset, i.e.
//     the channel heaters are off) and a bit that stops sample capture;
//   - STATUS and SELECT: sequencer state; SELECT shows which ADC's chip select
//     is active in bit 31 (ADC_1) and bit 27 (ADC_2);
//   - POFFSET: the phase correction that PhaseCalc subtracts, which is how the
//     processor compensates a temperature-dependent phase error;
//   - PHASE: the last corrected phase and a count of phase results;
//   - FIFO: the sample FIFO overflow count;
//   - XC_RE, XC_IM, POW1, POW2: the sums behind the last phase, from which
//     the processor can form the coherence |C| / sqrt(P1 P2) of the channels;
//   - a 16-word result memory holding the latest value of every sensor,
//     written by the sequencer, word REG_RESULT0 + adc*8 + ch.
// The bus is a plain single-cycle register bus standing in for the processor
// bus of the original system (whose protocol is not part of this design):
// a write takes effect on the clock edge where `wr` is high; a read returns
// `rdata` with `rvalid` one cycle after `rd`.
module temp_reg
  import tlm_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // register bus
  input  logic                wr,
  input  logic                rd,
  input  logic [4:0]          addr,
  input  logic [31:0]         wdata,
  output logic [31:0]         rdata,
  output logic                rvalid,
  // to/from the sequencer
  output logic                start,
  output logic                continuous,
  input  logic                res_valid,
  input  tlm_result_t         res,
  input  logic                busy,
  input  logic                armed,
  input  logic [15:0]         sweep_cnt,
  input  logic [7:0]          timeout_cnt,
  input  logic [N_ADC-1:0]    cs_n,
  // heater lines
  output logic                shdn_p,
  output logic                shdn_n,
  // capture and phase
  output logic                capture_stop,
  input  logic                capture_on,
  input  logic [15:0]         fifo_ovf_cnt,
  output logic [15:0]         phase_offset,
  input  logic                phase_valid,
  input  logic signed [15:0]  phase,
  input  logic signed [31:0]  xc_re,
  input  logic signed [31:0]  xc_im,
  input  logic        [31:0]  pow1,
  input  logic        [31:0]  pow2
);

  logic [RESULT_W-1:0] results [N_SENSOR];
  logic [15:0]         last_phase;
  logic [15:0]         phase_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start        <= 1'b0;
      continuous   <= 1'b0;
      shdn_p       <= 1'b0;
      shdn_n       <= 1'b0;
      capture_stop <= 1'b0;
      phase_offset <= '0;
    end else begin
      start <= 1'b0;
      if (wr) begin
        unique case (addr)
          REG_CTRL: begin
            start        <= wdata[0];
            continuous   <= wdata[1];
            shdn_p       <= wdata[2];
            shdn_n       <= wdata[3];
            capture_stop <= wdata[4];
          end
          REG_POFFSET: phase_offset <= wdata[15:0];
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_phase <= '0;
      phase_cnt  <= '0;
    end else if (phase_valid) begin
      last_phase <= phase;
      phase_cnt  <= phase_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_SENSOR; i++) results[i] <= '0;
    end else if (res_valid) begin
      results[{res.adc, res.ch}] <= res.value;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata  <= '0;
      rvalid <= 1'b0;
    end else begin
      rvalid <= rd;
      if (rd) begin
        rdata <= '0;
        if (addr >= REG_RESULT0) begin
          rdata <= 32'(results[addr[3:0]]);
        end else begin
          unique case (addr)
            REG_CTRL:    rdata <= {27'd0, capture_stop, shdn_n, shdn_p, continuous, 1'b0};
            REG_STATUS:  rdata <= {sweep_cnt, timeout_cnt, 5'd0, capture_on, armed, busy};
            REG_SELECT:  rdata <= {~cs_n[0], 3'd0, ~cs_n[1], 27'd0};
            REG_POFFSET: rdata <= {16'd0, phase_offset};
            REG_PHASE:   rdata <= {phase_cnt, last_phase};
            REG_FIFO:    rdata <= {16'd0, fifo_ovf_cnt};
            REG_XC_RE:   rdata <= xc_re;
            REG_XC_IM:   rdata <= xc_im;
            REG_POW1:    rdata <= pow1;
            REG_POW2:    rdata <= pow2;
            default:     rdata <= '0;
          endcase
        end
      end
    end
  end

endmodule
