// dphase_top: data-processing FPGA logic of a Ka-band interferometer receiver.
//
// Two jobs share the chip. The phase path measures, in real time, the phase
// difference between the two interferometric receive channels: sample pairs
// from the channel ADCs are written into a FIFO once the external trigger has
// fired, and PhaseCalc averages V1*conj(V2) over N_LOOKS pairs and turns it
// into a phase, minus a correction set by the processor. The telemetry path
// reads the temperature, LO power and current sensors of the RF
// downconverter through its two MAX1168 ADCs over SPI, keeps the latest value
// of every sensor in a register block and prints each result as hex text on a
// 115200-baud serial line, so that phase and temperature can be logged
// together and the thermally caused phase error corrected.
//
//   adc samples -> sample_fifo -> phase_calc ------------> phase, temp_reg
//   trig_in -> trigger_ctrl (clear, capture enable)
//   temp_reg <-> adc_scan_seq <-> spi_master <-> SPI pins, CS1/CS2, EOC
//                adc_scan_seq -> hex_formatter -> uart_tx -> uart_txd
//   uart_rxd -> uart_rx -> adc_scan_seq (two characters start the sweeps)
//
// The processor, its memories and bus, the debug module, the SATA host
// controller and the configuration of the high-speed ADCs are outside this
// module: the register bus of temp_reg and the sample inputs are ports.
// Sample ports carry one complex pair per clock when `adc_valid` is high.
// Clock: one clock `clk` at CLK_HZ (100 MHz assumed); reset `rst_n` is
// asynchronous, active low.
module dphase_top
  import tlm_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 100_000_000,
  parameter int unsigned BAUD        = 115_200,
  parameter int unsigned SPI_HZ      = 200_000,
  parameter int unsigned CS_SETUP    = 100,
  parameter int unsigned CS_GAP      = 100,
  parameter int unsigned EOC_TIMEOUT = 20000,
  parameter int unsigned START_CHARS = 2,
  parameter int unsigned SAMPLE_W    = 8,
  parameter int unsigned N_LOOKS     = 1024,
  parameter int unsigned FIFO_DEPTH  = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // channel samples (complex baseband, one pair per clock)
  input  logic                       adc_valid,
  input  logic signed [SAMPLE_W-1:0] ch1_i,
  input  logic signed [SAMPLE_W-1:0] ch1_q,
  input  logic signed [SAMPLE_W-1:0] ch2_i,
  input  logic signed [SAMPLE_W-1:0] ch2_q,
  input  logic                       trig_in,
  // telemetry link to the RF downconverter
  output logic                       spi_sclk,
  output logic                       spi_mosi,
  input  logic                       spi_miso,
  output logic                       adc_cs1_n,
  output logic                       adc_cs2_n,
  input  logic                       adc_eoc_n,
  output logic                       shdn_p,
  output logic                       shdn_n,
  // host serial line
  input  logic                       uart_rxd,
  output logic                       uart_txd,
  // processor register bus
  input  logic                       reg_wr,
  input  logic                       reg_rd,
  input  logic [4:0]                 reg_addr,
  input  logic [31:0]                reg_wdata,
  output logic [31:0]                reg_rdata,
  output logic                       reg_rvalid,
  // phase results
  output logic                       phase_valid,
  output logic signed [15:0]         phase,
  output logic signed [15:0]         phase_raw
);

  localparam int unsigned HALF_DIV = CLK_HZ / (2 * SPI_HZ);
  localparam int unsigned FW       = 4 * SAMPLE_W;

  // ---------------- telemetry path ----------------
  logic               start, continuous;
  logic               spi_start, spi_done, spi_busy;
  logic [15:0]        spi_tx, spi_rx;
  logic [N_ADC-1:0]   cs_n;
  logic               res_valid;
  tlm_result_t        res;
  logic               out_valid, out_ready;
  logic [15:0]        out_data;
  logic               seq_busy, armed;
  logic [15:0]        sweep_cnt;
  logic [7:0]         timeout_cnt;
  logic               ch_valid, ch_ready;
  logic [7:0]         ch_data;
  logic               rx_valid, rx_ferr;
  logic [7:0]         rx_data;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart_rx (
    .clk, .rst_n, .rxd(uart_rxd), .valid(rx_valid), .data(rx_data), .frame_err(rx_ferr)
  );

  adc_scan_seq #(
    .CS_SETUP(CS_SETUP), .CS_GAP(CS_GAP), .EOC_TIMEOUT(EOC_TIMEOUT), .START_CHARS(START_CHARS)
  ) u_seq (
    .clk, .rst_n,
    .start, .continuous, .rx_char(rx_valid),
    .spi_start, .spi_tx, .spi_rx, .spi_done,
    .cs_n, .eoc_n(adc_eoc_n),
    .res_valid, .res,
    .out_valid, .out_data, .out_ready,
    .busy(seq_busy), .armed, .sweep_cnt, .timeout_cnt
  );

  spi_master #(.WORD_W(16), .HALF_DIV(HALF_DIV)) u_spi (
    .clk, .rst_n,
    .start(spi_start), .tx_data(spi_tx), .rx_data(spi_rx),
    .busy(spi_busy), .done(spi_done),
    .sclk(spi_sclk), .mosi(spi_mosi), .miso(spi_miso)
  );

  assign adc_cs1_n = cs_n[0];
  assign adc_cs2_n = cs_n[1];

  hex_formatter #(.EOL(1'b1)) u_fmt (
    .clk, .rst_n,
    .in_valid(out_valid), .in_data(out_data), .in_ready(out_ready),
    .ch_valid, .ch_data, .ch_ready
  );

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart_tx (
    .clk, .rst_n, .valid(ch_valid), .data(ch_data), .ready(ch_ready), .txd(uart_txd)
  );

  // ---------------- phase path ----------------
  logic              trig_clr, capture, capture_stop;
  logic [15:0]       trig_cnt;
  logic              f_full, f_empty, f_rd;
  logic [FW-1:0]     f_dout;
  logic [15:0]       ovf_cnt;
  logic [15:0]       phase_offset;
  localparam int unsigned ACC_W = 2 * SAMPLE_W + 2 + $clog2(N_LOOKS);
  logic signed [ACC_W-1:0] xc_re, xc_im;
  logic        [ACC_W-1:0] pow1, pow2;

  trigger_ctrl #(.CLR_LEN(4)) u_trig (
    .clk, .rst_n, .trig_in, .stop(capture_stop), .clr(trig_clr), .capture, .trig_cnt
  );

  sample_fifo #(.W(FW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clr(trig_clr),
    .wr(adc_valid && capture), .din({ch1_i, ch1_q, ch2_i, ch2_q}), .full(f_full),
    .rd(f_rd), .dout(f_dout), .empty(f_empty), .ovf_cnt
  );

  assign f_rd = ~f_empty;

  phase_calc #(.SAMPLE_W(SAMPLE_W), .N_LOOKS(N_LOOKS), .PHASE_W(16), .ITERS(16)) u_phase (
    .clk, .rst_n, .clr(trig_clr),
    .in_valid(f_rd),
    .v1_i(f_dout[4*SAMPLE_W-1 -: SAMPLE_W]), .v1_q(f_dout[3*SAMPLE_W-1 -: SAMPLE_W]),
    .v2_i(f_dout[2*SAMPLE_W-1 -: SAMPLE_W]), .v2_q(f_dout[SAMPLE_W-1 -: SAMPLE_W]),
    .phase_offset,
    .xc_re, .xc_im, .pow1, .pow2,
    .phase_valid, .phase_raw, .phase
  );

  // ---------------- register block ----------------
  temp_reg u_reg (
    .clk, .rst_n,
    .wr(reg_wr), .rd(reg_rd), .addr(reg_addr), .wdata(reg_wdata),
    .rdata(reg_rdata), .rvalid(reg_rvalid),
    .start, .continuous,
    .res_valid, .res,
    .busy(seq_busy), .armed, .sweep_cnt, .timeout_cnt, .cs_n,
    .shdn_p, .shdn_n,
    .capture_stop, .capture_on(capture), .fifo_ovf_cnt(ovf_cnt),
    .phase_offset, .phase_valid, .phase,
    .xc_re(32'(xc_re)), .xc_im(32'(xc_im)), .pow1(32'(pow1)), .pow2(32'(pow2))
  );

endmodule
