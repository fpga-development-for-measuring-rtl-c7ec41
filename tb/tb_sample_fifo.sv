// tb_sample_fifo: random writes and reads against a queue model. Checks the
// order and content of every word read, full and empty against the model's
// fill level, the overflow counter for writes into a full FIFO, and clear.
`timescale 1ns/1ps
module tb_sample_fifo;
  localparam int W = 32, D = 8;
  logic clk = 0, rst_n = 0, clr = 0, wr = 0, rd = 0;
  logic [W-1:0] din = '0, dout;
  logic full, empty;
  logic [15:0] ovf_cnt;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int ovf = 0;

  sample_fifo #(.W(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

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
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int pw;
      pw = (n < 1500) ? 70 : 30;   // first fill up, then drain
      @(negedge clk);
      check(empty == (q.size() == 0) && full == (q.size() == D),
            $sformatf("flags at level %0d", q.size()));
      if (!empty) check(dout == q[0], "head word");
      if (n == 2000) begin
        clr = 1; wr = 0; rd = 0;
        @(negedge clk); clr = 0; q.delete();
        check(empty, "clear empties");
        continue;
      end
      wr = ($urandom_range(0, 99) < pw);
      rd = !empty && ($urandom_range(0, 99) < 50);
      din = W'($urandom);
      @(posedge clk);
      #1;
      begin
        bit was_full;
        was_full = (q.size() == D);
        if (rd) void'(q.pop_front());
        if (wr) begin
          if (!was_full) q.push_back(din);   // a full FIFO drops the write
          else ovf++;
        end
      end
      rd = 0; wr = 0;
    end
    check(ovf > 0, "overflows happened");
    check(ovf_cnt == 16'(ovf), $sformatf("overflow count %0d expected %0d", ovf_cnt, ovf));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
