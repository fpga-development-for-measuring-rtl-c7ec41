// tb_temp_reg: exercises every register of the telemetry register block.
// Checks the reset values (heaters off), CTRL write/read-back and the
// one-cycle start pulse, the SELECT bits 31/27 against the chip selects,
// STATUS packing, the phase offset and phase registers, the FIFO count, and
// that sensor results land in and read back from the right result word,
// with the one-cycle read latency, and the four phase-sum registers.
`timescale 1ns/1ps
module tb_temp_reg;
  import tlm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr = 0, rd = 0; logic [4:0] addr = '0; logic [31:0] wdata = '0;
  logic [31:0] rdata; logic rvalid;
  logic start, continuous;
  logic res_valid = 0; tlm_result_t res = '0;
  logic busy = 0, armed = 0; logic [15:0] sweep_cnt = 0; logic [7:0] timeout_cnt = 0;
  logic [1:0] cs_n = 2'b11;
  logic shdn_p, shdn_n, capture_stop, capture_on = 0;
  logic [15:0] fifo_ovf_cnt = 0, phase_offset;
  logic phase_valid = 0; logic signed [15:0] phase = 0;
  logic signed [31:0] xc_re = -32'sd123456, xc_im = 32'sd98765;
  logic [31:0] pow1 = 32'd5555555, pow2 = 32'd7777777;
  int checks = 0, failures = 0;
  logic [15:0] model [16];

  temp_reg dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wreg(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); wr = 1; addr = a; wdata = d;
    @(negedge clk); wr = 0;
  endtask

  task automatic rreg(input logic [4:0] a, output logic [31:0] d);
    @(negedge clk); rd = 1; addr = a;
    @(negedge clk); rd = 0;
    check(rvalid, "rvalid one cycle after rd");
    d = rdata;
  endtask

  int starts = 0;
  always @(posedge clk) if (start) starts++;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(shdn_p == 0 && shdn_n == 0 && !continuous && !start, "reset values");
    rreg(REG_CTRL, d);
    check(d == 0, "CTRL resets to 0");
    wreg(REG_CTRL, 32'h0000_001F);
    @(negedge clk);
    check(starts == 1 && !start, "start is a single pulse");
    check(shdn_p && shdn_n && continuous && capture_stop, "CTRL bits drive outputs");
    rreg(REG_CTRL, d);
    check(d == 32'h1E, $sformatf("CTRL reads %h", d));
    wreg(REG_CTRL, 32'h0000_0004);
    check(shdn_p && !shdn_n && !continuous && !capture_stop, "SHDN_p alone");
    cs_n = 2'b10;
    rreg(REG_SELECT, d);
    check(d == 32'h8000_0000, $sformatf("SELECT ADC_1 %h", d));
    cs_n = 2'b01;
    rreg(REG_SELECT, d);
    check(d == 32'h0800_0000, $sformatf("SELECT ADC_2 %h", d));
    cs_n = 2'b11;
    busy = 1; armed = 1; capture_on = 1; sweep_cnt = 16'hBEEF; timeout_cnt = 8'h5A;
    rreg(REG_STATUS, d);
    check(d == {16'hBEEF, 8'h5A, 5'd0, 3'b111}, $sformatf("STATUS %h", d));
    wreg(REG_POFFSET, 32'hFFFF_1234);
    check(phase_offset == 16'h1234, "phase offset output");
    rreg(REG_POFFSET, d);
    check(d == 32'h1234, "POFFSET read back");
    for (int k = 0; k < 3; k++) begin
      @(negedge clk); phase_valid = 1; phase = 16'sd1000 * 16'(k + 1) - 16'sd5000;
      @(negedge clk); phase_valid = 0;
    end
    rreg(REG_PHASE, d);
    check(d == {16'd3, 16'(-2000)}, $sformatf("PHASE %h", d));
    fifo_ovf_cnt = 16'd77;
    rreg(REG_FIFO, d);
    check(d == 77, "FIFO overflow count");
    rreg(REG_XC_RE, d); check(d == 32'(-123456), "XC_RE");
    rreg(REG_XC_IM, d); check(d == 32'd98765, "XC_IM");
    rreg(REG_POW1, d);  check(d == 32'd5555555, "POW1");
    rreg(REG_POW2, d);  check(d == 32'd7777777, "POW2");
    for (int i = 0; i < 16; i++) model[i] = 0;
    for (int k = 0; k < 40; k++) begin
      logic [3:0] s;
      s = 4'($urandom);
      @(negedge clk);
      res_valid = 1; res.adc = s[3]; res.ch = s[2:0]; res.value = 16'($urandom);
      model[s] = res.value;
      @(negedge clk); res_valid = 0;
    end
    for (int i = 0; i < 16; i++) begin
      rreg(5'(REG_RESULT0 + i), d);
      check(d == {16'd0, model[i]}, $sformatf("result %0d = %h expected %h", i, d, model[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
