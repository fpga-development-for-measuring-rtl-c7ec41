// cordic_atan2: angle of a two's-complement vector (x, y) by CORDIC vectoring.
//
// The vector is first moved into the right half plane (negated, with a start
// angle of pi, if x < 0). Each following clock cycle rotates it by
// +-atan(2^-i), i = 0..ITERS-1, towards the x axis, adding the rotation to an
// angle accumulator; the accumulator then holds atan2(y, x). Angles are
// fractions of a half turn: a 32-bit accumulator in which 2^31 is pi, so the
// angle wraps around the circle by itself. The micro-rotation table holds
// round(atan(2^-i) / pi * 2^31). The result `angle` keeps the top OUT_W bits,
// rounded: 2^(OUT_W-1) stands for pi, the range is [-pi, pi).
//
// Timing: `start` is taken when not busy; `done` pulses ITERS+1 cycles later
// with `angle` valid (it holds until the next result). One vector at a time.
module cordic_atan2 #(
  parameter int unsigned IN_W  = 28,
  parameter int unsigned OUT_W = 16,
  parameter int unsigned ITERS = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [IN_W-1:0]  x_in,
  input  logic signed [IN_W-1:0]  y_in,
  output logic                    busy,
  output logic                    done,
  output logic signed [OUT_W-1:0] angle
);

  localparam int unsigned XW = IN_W + 2;   // CORDIC gain 1.65 and negation
  localparam int unsigned IW = $clog2(ITERS + 1);

  function automatic logic [31:0] atan_tab(input logic [4:0] i);
    unique case (i)
      5'd0:  return 32'h20000000;  5'd1:  return 32'h12e4051e;
      5'd2:  return 32'h09fb385b;  5'd3:  return 32'h051111d4;
      5'd4:  return 32'h028b0d43;  5'd5:  return 32'h0145d7e1;
      5'd6:  return 32'h00a2f61e;  5'd7:  return 32'h00517c55;
      5'd8:  return 32'h0028be53;  5'd9:  return 32'h00145f2f;
      5'd10: return 32'h000a2f98;  5'd11: return 32'h000517cc;
      5'd12: return 32'h00028be6;  5'd13: return 32'h000145f3;
      5'd14: return 32'h0000a2fa;  5'd15: return 32'h0000517d;
      5'd16: return 32'h000028be;  5'd17: return 32'h0000145f;
      5'd18: return 32'h00000a30;  5'd19: return 32'h00000518;
      5'd20: return 32'h0000028c;  5'd21: return 32'h00000146;
      5'd22: return 32'h000000a3;  5'd23: return 32'h00000051;
      5'd24: return 32'h00000029;  5'd25: return 32'h00000014;
      5'd26: return 32'h0000000a;  5'd27: return 32'h00000005;
      5'd28: return 32'h00000003;  5'd29: return 32'h00000001;
      5'd30: return 32'h00000001;  default: return 32'h00000000;
    endcase
  endfunction

  logic signed [XW-1:0] x, y, xs, ys;
  logic        [31:0]   z, z_next;
  logic        [IW-1:0] i;
  logic                 neg_y;

  // One micro-rotation.
  always_comb begin
    xs     = x >>> i;
    ys     = y >>> i;
    neg_y  = y[XW-1];
    z_next = neg_y ? (z - atan_tab(5'(i))) : (z + atan_tab(5'(i)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      x     <= '0;
      y     <= '0;
      z     <= '0;
      i     <= '0;
      angle <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          i    <= '0;
          if (x_in[IN_W-1]) begin
            x <= -XW'(x_in);
            y <= -XW'(y_in);
            z <= 32'h80000000;
          end else begin
            x <= XW'(x_in);
            y <= XW'(y_in);
            z <= '0;
          end
        end
      end else begin
        x <= neg_y ? (x - ys) : (x + ys);
        y <= neg_y ? (y + xs) : (y - xs);
        z <= z_next;
        i <= i + 1'b1;
        if (i == IW'(ITERS - 1)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          angle <= OUT_W'((z_next + (32'd1 << (31 - OUT_W))) >> (32 - OUT_W));
        end
      end
    end
  end

endmodule
