// tb_dphase_top: end-to-end test of the whole design at its default sizes
// (100 MHz clock, 200 kbit/s SPI, 115200 baud, 1024 looks per phase).
//
// Around the top sit two MAX1168 models, a serial decoder on uart_txd, a
// serial driver on uart_rxd, a sample generator and a register-bus driver.
// The run:
//   1. reset values: chip selects high, heater lines low;
//   2. one telemetry sweep started through CTRL: the 16 lines of hex text on
//      the serial output and the 16 result registers must equal the model
//      values (one is 0x0005, which needs zero padding);
//   3. heater lines set and cleared through CTRL;
//   4. samples before the trigger are ignored; after the trigger three
//      averages of a known phase difference give phases within 0.5 degree of
//      (difference - offset), on the port and in the PHASE register;
//      the sums read from XC_RE/XC_IM/POW1/POW2 give a coherence near 1;
//   5. stopping capture ends the phase results;
//   6. two characters typed on the serial input arm free-running sweeps;
//      then ADC2 is made silent and its EOC timeouts are counted in STATUS.
// Each mechanism's occurrences are counted; one that never happened is a
// failure.
`timescale 1ns/1ps
module tb_dphase_top;
  import tlm_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam int  DIV = 100_000_000 / 115_200;
  localparam logic [127:0] V1 = {16'hFFFF, 16'h8000, 16'h7A31, 16'h1234,
                                 16'h00FE, 16'h0A0B, 16'h0100, 16'h0005};
  localparam logic [127:0] V2 = {16'h4C4C, 16'h4B00, 16'h4A17, 16'h49EE,
                                 16'h4801, 16'h4711, 16'h4620, 16'h45AB};

  logic clk = 0, rst_n = 0;
  logic adc_valid = 0;
  logic signed [7:0] ch1_i = 0, ch1_q = 0, ch2_i = 0, ch2_q = 0;
  logic trig_in = 0;
  logic spi_sclk, spi_mosi, spi_miso, adc_cs1_n, adc_cs2_n, adc_eoc_n, shdn_p, shdn_n;
  logic uart_rxd = 1, uart_txd;
  logic reg_wr = 0, reg_rd = 0; logic [4:0] reg_addr = '0; logic [31:0] reg_wdata = '0;
  logic [31:0] reg_rdata; logic reg_rvalid;
  logic phase_valid; logic signed [15:0] phase, phase_raw;
  logic d1, d2, e1, e2, dead2 = 0;
  int checks = 0, failures = 0;

  dphase_top dut (.*);

  max1168_model #(.CONV_NS(8000), .VALUES(V1)) adc1 (
    .cs_n(adc_cs1_n), .sclk(spi_sclk), .din(spi_mosi), .dout(d1), .eoc_n(e1),
    .dead(1'b0), .offset(16'h0000));
  max1168_model #(.CONV_NS(9000), .VALUES(V2)) adc2 (
    .cs_n(adc_cs2_n), .sclk(spi_sclk), .din(spi_mosi), .dout(d2), .eoc_n(e2),
    .dead(dead2), .offset(16'h0000));
  assign spi_miso  = (!adc_cs1_n & d1) | (!adc_cs2_n & d2);
  assign adc_eoc_n = e1 & e2;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---- mechanism counters ----
  int n_sweep_start = 0, n_conv = 0, n_line = 0, n_pad = 0, n_heater = 0;
  int n_coh = 0, n_trig = 0, n_phase = 0, n_offset = 0, n_stop = 0, n_armed = 0, n_timeout = 0;

  // ---- serial decoder on uart_txd ----
  string line = "";
  string lines[$];
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge uart_txd);
      repeat (DIV / 2) @(posedge clk);
      for (int k = 0; k < 8; k++) begin
        repeat (DIV) @(posedge clk);
        b[k] = uart_txd;
      end
      repeat (DIV) @(posedge clk);
      if (uart_txd !== 1'b1) begin failures++; $display("FAIL: stop bit"); end
      if (b == 8'h0A) begin lines.push_back(line); line = ""; end
      else if (b != 8'h0D) line = {line, string'(b)};
    end
  end

  task automatic send_char(input logic [7:0] b);
    uart_rxd = 0; repeat (DIV) @(posedge clk);
    for (int k = 0; k < 8; k++) begin uart_rxd = b[k]; repeat (DIV) @(posedge clk); end
    uart_rxd = 1; repeat (2 * DIV) @(posedge clk);
  endtask

  task automatic wreg(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask

  task automatic rreg(input logic [4:0] a, output logic [31:0] d);
    @(negedge clk); reg_rd = 1; reg_addr = a;
    @(negedge clk); reg_rd = 0;
    d = reg_rdata;
  endtask

  function automatic logic [15:0] expv(int idx);
    return idx < 8 ? V1[16*idx +: 16] : V2[16*(idx-8) +: 16];
  endfunction

  function automatic int wrapdiff(int a, int b);
    int d;
    d = (a - b) % 65536;
    if (d >= 32768) d -= 65536;
    if (d < -32768) d += 65536;
    return d;
  endfunction

  // ---- sample generator: phase difference `delta`, one pair per clock ----
  real delta = 0.0;
  bit  gen_on = 0;
  always @(negedge clk) begin
    real th;
    adc_valid <= gen_on;
    th = ($urandom % 3600) / 3600.0 * 2.0 * PI;
    ch1_i <= 8'($rtoi($floor(100.0 * $cos(th) + 0.5)));
    ch1_q <= 8'($rtoi($floor(100.0 * $sin(th) + 0.5)));
    ch2_i <= 8'($rtoi($floor(100.0 * $cos(th - delta) + 0.5)));
    ch2_q <= 8'($rtoi($floor(100.0 * $sin(th - delta) + 0.5)));
  end

  int phase_seen = 0;
  logic [15:0] offset_now = '0;
  always @(posedge clk) if (rst_n && phase_valid) begin
    int exp_p;
    phase_seen++;
    n_phase++;
    exp_p = $rtoi($floor(delta / PI * 32768.0 + 0.5)) - int'(offset_now);
    check(wrapdiff(int'(phase), exp_p) <= 91 && wrapdiff(int'(phase), exp_p) >= -91,
          $sformatf("phase %0d expected about %0d", phase, exp_p));
    if (offset_now != 0) n_offset++;
  end

  always @(posedge clk) if (rst_n && dut.u_seq.res_valid) n_conv++;
  logic clr_d = 0;
  always @(posedge clk) begin
    if (rst_n && dut.u_trig.clr && !clr_d) n_trig++;
    clr_d <= rst_n && dut.u_trig.clr;
  end

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int n0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(adc_cs1_n && adc_cs2_n && !shdn_p && !shdn_n, "reset pin state");

    // ---- 2. one sweep ----
    wreg(REG_CTRL, 32'h1);
    n_sweep_start++;
    rreg(REG_SELECT, d);
    check(d == 32'h8000_0000, $sformatf("ADC_1 selected first (%h)", d));
    wait (lines.size() == 16);
    repeat (100) @(posedge clk);
    for (int i = 0; i < 16; i++) begin
      string e;
      e = $sformatf("%04x", expv(i));
      e = e.toupper();
      check(lines[i] == e, $sformatf("line %0d '%s' expected '%s'", i, lines[i], e));
      if (expv(i)[15:12] == 0) n_pad++;
      n_line++;
    end
    for (int i = 0; i < 16; i++) begin
      rreg(5'(REG_RESULT0 + i), d);
      check(d == {16'd0, expv(i)}, $sformatf("result reg %0d = %h", i, d));
    end
    rreg(REG_STATUS, d);
    check(d[31:16] == 1 && d[0] == 0, $sformatf("one sweep done, idle (%h)", d));
    check(adc1.bad_cmds == 0 && adc2.bad_cmds == 0, "ADC commands");

    // ---- 3. heater lines ----
    wreg(REG_CTRL, 32'hC);
    check(shdn_p && shdn_n, "heaters on");
    wreg(REG_CTRL, 32'h0);
    check(!shdn_p && !shdn_n, "heaters off");
    n_heater++;

    // ---- 4. phase path ----
    delta = 0.7;
    gen_on = 1;
    repeat (3000) @(posedge clk);
    check(phase_seen == 0, "no phase results before the trigger");
    trig_in = 1;
    wait (phase_seen == 1);
    rreg(REG_PHASE, d);
    check(d[31:16] == 1, "PHASE register counts results");
    offset_now = 16'd5000;
    wreg(REG_POFFSET, 32'd5000);
    delta = -2.5;
    n0 = phase_seen;
    wait (phase_seen == n0 + 3);
    rreg(REG_STATUS, d);
    check(d[2], "capture on in STATUS");
    // coherence from the registers: equal-amplitude, noiseless channels give
    // |C| close to sqrt(P1 P2)
    begin
      logic [31:0] re, im, p1, p2;
      real coh;
      rreg(REG_XC_RE, re); rreg(REG_XC_IM, im); rreg(REG_POW1, p1); rreg(REG_POW2, p2);
      coh = $sqrt(real'($signed(re)) ** 2 + real'($signed(im)) ** 2) / $sqrt(real'(p1) * real'(p2));
      check(coh > 0.98 && coh <= 1.0001, $sformatf("coherence %f", coh));
      check(p1 > 32'd1024 * 32'd9000, "channel power registers");
      n_coh++;
    end
    // ---- 5. stop capture ----
    wreg(REG_CTRL, 32'h10);
    repeat (10) @(posedge clk);
    n0 = phase_seen;
    repeat (3000) @(posedge clk);
    check(phase_seen == n0, "stopped capture gives no phases");
    n_stop++;
    gen_on = 0;
    wreg(REG_CTRL, 32'h0);

    // ---- 6. arm by two characters, then ADC2 goes silent ----
    n0 = lines.size();
    send_char("g");
    send_char("o");
    rreg(REG_STATUS, d);
    check(d[1], "armed after two characters");
    n_armed++;
    wait (lines.size() >= n0 + 16);
    rreg(REG_STATUS, d);
    check(d[31:16] >= 2, "sweep without a start bit");
    wait (adc_cs2_n == 0);
    dead2 = 1;
    wait (dut.u_seq.timeout_cnt == 8);
    rreg(REG_STATUS, d);
    check(d[15:8] == 8, $sformatf("timeouts in STATUS %0d", d[15:8]));
    n_timeout = int'(d[15:8]);

    // ---- mechanism coverage ----
    check(n_sweep_start > 0, "sweep start");
    check(n_conv >= 24, $sformatf("conversions %0d", n_conv));
    check(n_line == 16, "serial lines");
    check(n_pad > 0, "zero padding");
    check(n_heater > 0, "heater control");
    check(n_trig == 1, $sformatf("trigger clears %0d", n_trig));
    check(n_phase >= 4, "phase results");
    check(n_offset > 0, "offset correction");
    check(n_stop > 0, "capture stop");
    check(n_armed > 0, "armed by characters");
    check(n_timeout > 0, "EOC timeout");
    check(n_coh > 0, "coherence read");
    $display("mechanisms: sweeps-started=%0d conversions=%0d lines=%0d padded=%0d heater=%0d trigger=%0d phases=%0d corrected=%0d stop=%0d armed=%0d timeouts=%0d",
             n_sweep_start, n_conv, n_line, n_pad, n_heater, n_trig, n_phase, n_offset, n_stop, n_armed, n_timeout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
