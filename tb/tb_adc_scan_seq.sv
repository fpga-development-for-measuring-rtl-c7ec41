// tb_adc_scan_seq: runs the telemetry sweep against two MAX1168 models.
//
// The sequencer drives a spi_master and two behavioural ADCs that share
// SCLK/DIN/DOUT/EOC and have their own chip selects. Checked:
//   - one sweep from `start` yields 16 results in the order ADC1 ch0..7,
//     ADC2 ch0..7, each equal to the value the model holds for that channel;
//   - every frame carries a CONFIG command (low bits 00011) for the right
//     channel and exactly 32 SCLK pulses (16 command + 16 read);
//   - the same results are offered on the serial-output handshake, which is
//     held back by random delays;
//   - two received characters arm free-running sweeps;
//   - with ADC2 dead, its eight conversions time out and are counted.
`timescale 1ns/1ps
module tb_adc_scan_seq;
  import tlm_pkg::*;

  localparam int H = 4;
  localparam logic [127:0] V1 = {16'hFFFF, 16'h8000, 16'h7A31, 16'h1234,
                                 16'h00FE, 16'h0A0B, 16'h0100, 16'h0005};
  localparam logic [127:0] V2 = {16'h4C4C, 16'h4B00, 16'h4A17, 16'h49EE,
                                 16'h4801, 16'h4711, 16'h4620, 16'h45AB};

  logic clk = 0, rst_n = 0;
  logic start = 0, continuous = 0, rx_char = 0;
  logic spi_start, spi_done, spi_busy;
  logic [15:0] spi_tx, spi_rx;
  logic [1:0] cs_n;
  logic eoc_n, sclk, mosi, miso;
  logic res_valid; tlm_result_t res;
  logic out_valid, out_ready = 0; logic [15:0] out_data;
  logic busy, armed; logic [15:0] sweep_cnt; logic [7:0] timeout_cnt;
  logic d1, d2, e1, e2, dead2 = 0;
  logic [15:0] offs = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  adc_scan_seq #(.CS_SETUP(5), .CS_GAP(5), .EOC_TIMEOUT(600), .START_CHARS(2)) dut (.*);
  spi_master #(.WORD_W(16), .HALF_DIV(H)) u_spi (
    .clk, .rst_n, .start(spi_start), .tx_data(spi_tx), .rx_data(spi_rx),
    .busy(spi_busy), .done(spi_done), .sclk, .mosi, .miso);
  max1168_model #(.CONV_NS(1500), .VALUES(V1)) adc1 (
    .cs_n(cs_n[0]), .sclk, .din(mosi), .dout(d1), .eoc_n(e1), .dead(1'b0), .offset(offs));
  max1168_model #(.CONV_NS(2500), .VALUES(V2)) adc2 (
    .cs_n(cs_n[1]), .sclk, .din(mosi), .dout(d2), .eoc_n(e2), .dead(dead2), .offset(offs));
  assign miso  = (!cs_n[0] & d1) | (!cs_n[1] & d2);
  assign eoc_n = e1 & e2;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // expected stream
  int exp_idx = 0;       // index of next expected result within the sweep
  int out_idx = 0;
  bit skip_adc2 = 0;
  function automatic logic [15:0] expv(int idx);
    return (idx < 8 ? V1[16*idx +: 16] : V2[16*(idx-8) +: 16]) + offs;
  endfunction

  always @(posedge clk) if (rst_n && res_valid) begin
    check(res.adc == exp_idx[3] && res.ch == exp_idx[2:0],
          $sformatf("result for adc%0d ch%0d, expected index %0d", res.adc, res.ch, exp_idx));
    check(res.value == expv(exp_idx),
          $sformatf("value %h expected %h (index %0d)", res.value, expv(exp_idx), exp_idx));
    exp_idx = (skip_adc2 && exp_idx == 7) ? 0 : (exp_idx + 1) % 16;
  end

  // serial-output consumer with random back-pressure
  always @(posedge clk) begin
    out_ready <= ($urandom_range(0, 3) == 0);
    if (rst_n && out_valid && out_ready) begin
      check(out_data == expv(out_idx), $sformatf("out %h expected %h", out_data, expv(out_idx)));
      out_idx = (skip_adc2 && out_idx == 7) ? 0 : (out_idx + 1) % 16;
    end
  end

  // frame checks at every CS rising edge
  always @(posedge cs_n[0]) if (rst_n && !dead2) begin
    check(adc1.last_rises == 32, $sformatf("ADC1 frame had %0d SCLKs", adc1.last_rises));
  end
  always @(posedge cs_n[1]) if (rst_n && !dead2) begin
    check(adc2.last_rises == 32, $sformatf("ADC2 frame had %0d SCLKs", adc2.last_rises));
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    check(cs_n == 2'b11 && !busy, "idle after reset");
    // one sweep
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    wait (sweep_cnt == 1);
    @(posedge clk);
    repeat (10) @(posedge clk);
    check(!busy, "single sweep stops");
    check(exp_idx == 0 && out_idx == 0, "16 results delivered");
    check(adc1.frames == 8 && adc2.frames == 8, "8 frames per ADC");
    check(adc1.bad_cmds == 0 && adc2.bad_cmds == 0, "CONFIG command bits");
    check(adc2.last_ch == 3'd7, "last channel of ADC2 was 7");
    // arm with two characters: sweeps run on their own
    offs = 16'h0101;
    @(negedge clk) rx_char = 1; @(negedge clk) rx_char = 0;
    repeat (30) @(negedge clk);
    check(!armed && !busy, "one character does not arm");
    @(negedge clk) rx_char = 1; @(negedge clk) rx_char = 0;
    check(armed, "two characters arm");
    wait (sweep_cnt == 3);
    check(exp_idx == 0, "sweeps complete while armed");
    // ADC2 disappears: its conversions time out
    wait (exp_idx == 8);   // ADC2 part of sweep starting
    dead2 = 1; skip_adc2 = 1;
    exp_idx = 0;
    wait (sweep_cnt == 4);
    check(timeout_cnt == 8, $sformatf("timeouts %0d expected 8", timeout_cnt));
    wait (sweep_cnt == 5);
    check(timeout_cnt == 16, $sformatf("timeouts %0d expected 16", timeout_cnt));
    check(busy, "armed sequencer keeps sweeping");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
