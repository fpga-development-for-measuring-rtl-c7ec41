// tb_uart_tx: decodes the transmitter's line with a sampler written here and
// checks each byte, the start and stop bits, and the frame length of
// 10*CLK_HZ/BAUD cycles (bit time 1/BAUD).
`timescale 1ns/1ps
module tb_uart_tx;
  localparam int CLK_HZ = 1_000_000, BAUD = 100_000, DIV = CLK_HZ / BAUD;
  logic clk = 0, rst_n = 0;
  logic valid = 0, ready, txd;
  logic [7:0] data = '0;
  int checks = 0, failures = 0;

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b, got;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(txd == 1 && ready, "line idles high");
    for (int t = 0; t < 30; t++) begin
      b = (t == 0) ? 8'h00 : (t == 1) ? 8'hFF : 8'($urandom);
      @(negedge clk); data = b; valid = 1;
      @(negedge clk); valid = 0;
      // now half a cycle after the edge that took the byte; sample mid-bit
      repeat (DIV / 2) @(negedge clk);
      check(txd == 0, "start bit");
      for (int k = 0; k < 8; k++) begin
        repeat (DIV) @(negedge clk);
        got[k] = txd;
      end
      repeat (DIV) @(negedge clk);
      check(txd == 1, "stop bit");
      check(got == b, $sformatf("byte %h expected %h", got, b));
      cyc = 1 + DIV / 2 + 9 * DIV;
      while (!ready) begin @(negedge clk); cyc++; end
      check(cyc == 10 * DIV + 1, $sformatf("frame %0d cycles, expected %0d", cyc - 1, 10 * DIV));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
