// tb_hex_formatter: feeds words and checks the characters that come out.
// Each word must give four upper-case hex digits, zero padded per byte, then
// CR LF, whatever the back-pressure on the character stream. The expected
// text is built here with $sformatf.
`timescale 1ns/1ps
module tb_hex_formatter;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [15:0] in_data = '0;
  logic ch_valid, ch_ready = 0;
  logic [7:0] ch_data;
  int checks = 0, failures = 0;
  byte exp_q[$];

  hex_formatter #(.EOL(1'b1)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    ch_ready <= ($urandom_range(0, 2) != 0);
    if (rst_n && ch_valid && ch_ready) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL: unexpected char %h", ch_data);
      end else begin
        byte e;
        e = exp_q.pop_front();
        if (e != ch_data) begin failures++; $display("FAIL: char %h expected %h", ch_data, e); end
      end
    end
  end

  initial begin
    logic [15:0] w;
    string s;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      case (t)
        0: w = 16'h0005; 1: w = 16'hFFFF; 2: w = 16'h0A0B; 3: w = 16'h1000; 4: w = 16'h00F0;
        default: w = 16'($urandom);
      endcase
      s = $sformatf("%04x\r\n", w);
      s = s.toupper();
      for (int k = 0; k < s.len(); k++) exp_q.push_back(s[k]);
      @(negedge clk);
      in_data = w; in_valid = 1;
      do @(posedge clk); while (!in_ready);
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    while (exp_q.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    checks++;
    if (ch_valid) begin failures++; $display("FAIL: extra characters"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
