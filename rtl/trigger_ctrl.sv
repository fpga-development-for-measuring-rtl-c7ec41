// trigger_ctrl: starts sample capture on the external trigger.
//
// The trigger arrives on an SMA input, asynchronously, and is brought in
// through two flip-flops. Its first rising edge (while capture is off) makes
// `clr` high for CLR_LEN cycles, clearing the sample path, and then turns
// `capture` on, which enables writes into the sample FIFO. Capture stays on
// until `stop` (from the processor) is high, after which the next trigger
// edge starts it again. The clear length is this design's choice.
module trigger_ctrl #(
  parameter int unsigned CLR_LEN = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trig_in,
  input  logic stop,
  output logic clr,
  output logic capture,
  output logic [15:0] trig_cnt
);

  localparam int unsigned CW = $clog2(CLR_LEN + 1);

  logic [2:0]    sync;   // two synchroniser stages and one for edge detection
  logic [CW-1:0] clr_cnt;
  logic          rise;

  assign rise = sync[1] & ~sync[2];
  assign clr  = (clr_cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync     <= '0;
      clr_cnt  <= '0;
      capture  <= 1'b0;
      trig_cnt <= '0;
    end else begin
      sync <= {sync[1:0], trig_in};
      if (stop) begin
        capture <= 1'b0;
        clr_cnt <= '0;
      end else if (clr) begin
        clr_cnt <= clr_cnt - 1'b1;
        if (clr_cnt == CW'(1)) capture <= 1'b1;
      end else if (rise && !capture) begin
        clr_cnt  <= CW'(CLR_LEN);
        trig_cnt <= trig_cnt + 1'b1;
      end
    end
  end

endmodule
