// tb_trigger_ctrl: drives an asynchronous trigger and checks that capture
// starts only after a CLR_LEN-cycle clear pulse, that later edges while
// capturing are ignored, that `stop` ends capture at once and that the next
// edge starts it again; trigger edges that started a capture are counted.
`timescale 1ns/1ps
module tb_trigger_ctrl;
  localparam int CL = 4;
  logic clk = 0, rst_n = 0, trig_in = 0, stop = 0;
  logic clr, capture;
  logic [15:0] trig_cnt;
  int checks = 0, failures = 0;

  trigger_ctrl #(.CLR_LEN(CL)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int clr_cycles;
  always @(posedge clk) if (clr) clr_cycles++;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(!capture && !clr, "idle after reset");
    for (int r = 0; r < 3; r++) begin
      clr_cycles = 0;
      #3.3 trig_in = 1;
      repeat (3) @(negedge clk);
      check(!capture, "no capture before clear");
      repeat (CL + 2) @(negedge clk);
      check(capture, "capture after clear");
      check(clr_cycles == CL, $sformatf("clear lasted %0d cycles", clr_cycles));
      trig_in = 0; repeat (4) @(negedge clk); trig_in = 1; repeat (10) @(negedge clk);
      check(clr_cycles == CL && capture, "edge while capturing ignored");
      check(trig_cnt == 16'(r + 1), "trigger count");
      stop = 1; @(negedge clk); stop = 0;
      check(!capture, "stop ends capture");
      trig_in = 0; repeat (5) @(negedge clk);
      check(!capture, "stays stopped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
