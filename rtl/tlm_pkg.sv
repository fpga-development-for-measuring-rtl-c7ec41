// tlm_pkg: constants and types shared by the telemetry and phase blocks.
//
// The telemetry side talks to two MAX1168 8-channel 16-bit ADCs on the RF
// downconverter (one SPI master, two slaves, one chip select each). Every
// conversion is started by an 8-bit command byte whose layout is
//   bit 7..5  channel select (CH SEL2..0)
//   bit 4..3  scan mode      (SCAN1..0)
//   bit 2..1  reference/power-down select (REF PD SEL1..0)
//   bit 0     internal/external conversion clock (1 = internal)
// and whose low five bits are the "CONFIG" row of the ADC's command table:
// SCAN = 00, REF PD SEL = 01, INT/EXT CLK = 1. Only the channel changes from
// one conversion to the next.
//
// The register map of temp_reg (word addresses) is also defined here so that
// the register block, the top level and the testbenches agree on it.
package tlm_pkg;

  localparam int RESULT_W = 16;   // MAX1168 16-bit data-transfer mode
  localparam int N_ADC    = 2;    // ADC1 (CS1) and ADC2 (CS2)
  localparam int N_CH     = 8;    // AIN0..AIN7 per ADC
  localparam int N_SENSOR = N_ADC * N_CH;

  // Low five bits of the command byte (SCAN1:0, REF PD SEL1:0, INT EXT CLK).
  localparam logic [4:0] CMD_CONFIG_LOW = 5'b00_01_1;

  function automatic logic [7:0] max1168_cmd(input logic [2:0] ch);
    return {ch, CMD_CONFIG_LOW};
  endfunction

  // One finished telemetry conversion.
  typedef struct packed {
    logic                adc;    // 0 = ADC1, 1 = ADC2
    logic [2:0]          ch;     // analog input 0..7
    logic [RESULT_W-1:0] value;  // straight binary, 62.5 uV per LSB
  } tlm_result_t;

  // temp_reg word addresses.
  typedef enum logic [4:0] {
    REG_CTRL    = 5'd0,   // [0] start one sweep (self clearing) [1] continuous
                          // [2] SHDN_p [3] SHDN_n [4] stop sample capture
    REG_STATUS  = 5'd1,   // [0] busy [1] armed [2] capture on [15:8] EOC timeouts
                          // [31:16] completed sweeps
    REG_SELECT  = 5'd2,   // [31] ADC_1 selected  [27] ADC_2 selected (read only)
    REG_POFFSET = 5'd3,   // [15:0] phase correction subtracted by PhaseCalc
    REG_PHASE   = 5'd4,   // [15:0] last corrected phase [31:16] phase results seen
    REG_FIFO    = 5'd5,   // [15:0] sample FIFO overflows
    REG_XC_RE   = 5'd6,   // real part of the last sum of V1 conj(V2), sign extended
    REG_XC_IM   = 5'd7,   // imaginary part of the same sum
    REG_POW1    = 5'd8,   // last sum of |V1|^2
    REG_POW2    = 5'd9,   // last sum of |V2|^2
    REG_RESULT0 = 5'd16   // 16..31: last result of sensor adc*8+ch
  } reg_addr_e;

endpackage
