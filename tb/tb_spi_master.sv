// tb_spi_master: checks the SPI master against a mode-0 slave written here.
// Random words are exchanged in both directions; the test checks the word
// each side received, the number of SCLK pulses, that SCLK idles low, and the
// transfer time of 2*HALF_DIV*WORD_W cycles from start to done.
`timescale 1ns/1ps
module tb_spi_master;
  localparam int W = 16;
  localparam int H = 3;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [W-1:0] tx_data = '0, rx_data;
  logic busy, done, sclk, mosi, miso;
  int checks = 0, failures = 0;

  spi_master #(.WORD_W(W), .HALF_DIV(H)) dut (.*);

  always #5 clk = ~clk;

  // slave: samples MOSI on rising SCLK, moves MISO after falling SCLK
  logic [W-1:0] s_rx, s_tx;
  int           s_rises;
  always @(posedge sclk) begin s_rx = {s_rx[W-2:0], mosi}; s_rises++; end
  always @(negedge sclk) begin s_tx = {s_tx[W-2:0], 1'b0}; end
  assign miso = s_tx[W-1];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] m_word, s_word;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check(sclk == 0 && !busy, "idle state");
    for (int t = 0; t < 20; t++) begin
      m_word = W'($urandom);
      s_word = W'($urandom);
      if (t == 0) begin m_word = 16'h8001; s_word = 16'h7FFE; end
      s_tx = s_word; s_rises = 0; s_rx = '0;
      @(negedge clk);
      tx_data = m_word; start = 1;
      @(negedge clk);
      start = 0; tx_data = '0;
      cyc = 0;   // clock edges after the one that took start
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc == 2*H*W, $sformatf("transfer took %0d cycles, expected %0d", cyc, 2*H*W));
      check(rx_data == s_word, $sformatf("master got %h expected %h", rx_data, s_word));
      check(s_rx == m_word, $sformatf("slave got %h expected %h", s_rx, m_word));
      check(s_rises == W, $sformatf("%0d SCLK pulses", s_rises));
      check(sclk == 0, "SCLK idles low");
      repeat ($urandom_range(0, 4)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
