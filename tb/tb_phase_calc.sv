// tb_phase_calc: feeds complex sample pairs with a known phase difference.
//
// Samples are V1 = A e^{j theta_n} and V2 = A e^{j(theta_n - delta)} with a
// random theta_n per sample, rounded to 8 bits, plus a little noise. The
// testbench accumulates the same sums itself and checks: the cross
// product and both powers exactly; the phase against $atan2 of the expected
// sums (within 3 LSB of a 16-bit half-turn scale); the phase against delta
// (within 0.5 degree); the corrected phase = raw - offset; the latency of
// ITERS+2 cycles from the last sample of an average to `phase_valid`; that
// `clr` drops a partial average. Deltas include 0, +-90 deg and 180 deg.
`timescale 1ns/1ps
module tb_phase_calc;
  localparam int SW = 8, NL = 64, PW = 16, IT = 16;
  localparam int ACC_W = 2 * SW + 2 + $clog2(NL);
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, clr = 0, in_valid = 0;
  logic signed [SW-1:0] v1_i = 0, v1_q = 0, v2_i = 0, v2_q = 0;
  logic [PW-1:0] phase_offset = '0;
  logic signed [ACC_W-1:0] xc_re, xc_im;
  logic [ACC_W-1:0] pow1, pow2;
  logic phase_valid;
  logic signed [PW-1:0] phase_raw, phase;
  int checks = 0, failures = 0;

  phase_calc #(.SAMPLE_W(SW), .N_LOOKS(NL), .PHASE_W(PW), .ITERS(IT)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int wrapdiff(int a, int b);
    int d;
    d = (a - b) % 65536;
    if (d >= 32768) d -= 65536;
    if (d < -32768) d += 65536;
    return d;
  endfunction

  longint cyc = 0;
  longint last_edge;
  always @(posedge clk) cyc++;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real delta, th, a;
    longint e_re, e_im, e_p1, e_p2;
    int ref_ph, exp_d;
    int a1i, a1q, a2i, a2q;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // a partial average that is cleared
    for (int n = 0; n < 20; n++) begin
      @(negedge clk); in_valid = 1; v1_i = 8'sd100; v1_q = 0; v2_i = 0; v2_q = 8'sd100;
    end
    @(negedge clk); in_valid = 0; clr = 1;
    @(negedge clk); clr = 0;
    for (int t = 0; t < 24; t++) begin
      case (t)
        0: delta = 0.0; 1: delta = PI / 2; 2: delta = -PI / 2; 3: delta = PI - 0.001;
        4: delta = -PI + 0.002;
        default: delta = (($urandom % 20000) / 10000.0 - 1.0) * PI;
      endcase
      phase_offset = (t % 2 == 0) ? 16'h0000 : 16'($urandom);
      e_re = 0; e_im = 0; e_p1 = 0; e_p2 = 0;
      for (int n = 0; n < NL; n++) begin
        th = ($urandom % 36000) / 36000.0 * 2.0 * PI;
        a  = 90.0 + ($urandom % 30);
        a1i = $rtoi($floor(a * $cos(th) + 0.5)) + int'($urandom_range(0, 4)) - 2;
        a1q = $rtoi($floor(a * $sin(th) + 0.5)) + int'($urandom_range(0, 4)) - 2;
        a2i = $rtoi($floor(a * $cos(th - delta) + 0.5)) + int'($urandom_range(0, 4)) - 2;
        a2q = $rtoi($floor(a * $sin(th - delta) + 0.5)) + int'($urandom_range(0, 4)) - 2;
        if (t == 0 && n == 0) begin a1i = -128; a1q = -128; a2i = -128; a2q = -128; end
        e_re += a1i * a2i + a1q * a2q;
        e_im += a1q * a2i - a1i * a2q;
        e_p1 += a1i * a1i + a1q * a1q;
        e_p2 += a2i * a2i + a2q * a2q;
        @(negedge clk);
        in_valid = 1; v1_i = SW'(a1i); v1_q = SW'(a1q); v2_i = SW'(a2i); v2_q = SW'(a2q);
        if (n == NL - 1) last_edge = cyc + 1;
        if ($urandom_range(0, 7) == 0 && n != NL - 1) begin
          @(negedge clk); in_valid = 0;
        end
      end
      @(negedge clk); in_valid = 0;
      while (!phase_valid) @(negedge clk);
      check(cyc - last_edge == IT + 2,
            $sformatf("latency %0d expected %0d", cyc - last_edge, IT + 2));
      check(xc_re == ACC_W'(e_re) && xc_im == ACC_W'(e_im),
            $sformatf("cross product %0d,%0d expected %0d,%0d", xc_re, xc_im, e_re, e_im));
      check(pow1 == ACC_W'(e_p1) && pow2 == ACC_W'(e_p2), "powers");
      ref_ph = $rtoi($floor($atan2(real'(e_im), real'(e_re)) / PI * 32768.0 + 0.5));
      check(wrapdiff(phase_raw, ref_ph) <= 3 && wrapdiff(phase_raw, ref_ph) >= -3,
            $sformatf("phase %0d expected %0d", phase_raw, ref_ph));
      exp_d = $rtoi($floor(delta / PI * 32768.0 + 0.5));
      check(wrapdiff(phase_raw, exp_d) <= 91 && wrapdiff(phase_raw, exp_d) >= -91,
            $sformatf("phase %0d vs true difference %0d", phase_raw, exp_d));
      check(phase == PW'(phase_raw - phase_offset), "offset subtracted");
      repeat ($urandom_range(0, 30)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
