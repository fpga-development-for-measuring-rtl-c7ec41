// tb_uart_rx: drives serial frames at the nominal bit rate and at +-3 %,
// checks every received byte, a frame error for a zero stop bit, and that a
// short glitch on the idle line is not taken for a start bit.
`timescale 1ns/1ps
module tb_uart_rx;
  localparam int CLK_HZ = 1_000_000, BAUD = 50_000, DIV = CLK_HZ / BAUD;
  logic clk = 0, rst_n = 0;
  logic rxd = 1;
  logic valid, frame_err;
  logic [7:0] data;
  int checks = 0, failures = 0;
  int nvalid = 0, nerr = 0;
  logic [7:0] last;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);
  always #500 clk = ~clk;   // 1 MHz

  always @(posedge clk) begin
    if (valid) begin nvalid++; last = data; end
    if (frame_err) nerr++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic [7:0] b, input real bit_ns, input bit stop);
    rxd = 0; #(bit_ns);
    for (int k = 0; k < 8; k++) begin rxd = b[k]; #(bit_ns); end
    rxd = stop; #(bit_ns);
    rxd = 1; #(bit_ns);
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    int nv;
    real bit_ns;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #10000;
    for (int t = 0; t < 30; t++) begin
      b = 8'($urandom);
      bit_ns = 1.0e9 / BAUD * ((t % 3 == 0) ? 1.0 : (t % 3 == 1) ? 1.03 : 0.97);
      nv = nvalid;
      send(b, bit_ns, 1'b1);
      check(nvalid == nv + 1, "one byte received");
      check(last == b, $sformatf("got %h expected %h", last, b));
    end
    nv = nvalid;
    send(8'h55, 1.0e9 / BAUD, 1'b0);
    #(3.0e9 / BAUD);
    check(nerr == 1 && nvalid == nv, "zero stop bit is a frame error");
    // 3 us glitch
    nv = nvalid;
    rxd = 0; #3000; rxd = 1;
    #(12.0e9 / BAUD);
    check(nvalid == nv && nerr == 1, "glitch ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
