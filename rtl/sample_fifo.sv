// sample_fifo: synchronous first-in first-out buffer for ADC sample pairs.
//
// Sits between the sampled data and PhaseCalc. A word is written when `wr`
// is high and the FIFO is not full, and read (shown on `dout`, first-word
// fall-through) when `rd` is high and it is not empty. A write into a full
// FIFO is dropped and counted in `ovf_cnt`. `clr` empties it. Depth must be
// a power of two. Depth and overflow handling are this design's choices.
module sample_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         wr,
  input  logic [W-1:0] din,
  output logic         full,
  input  logic         rd,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic [15:0]  ovf_cnt
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;

  assign empty = (wp == rp);
  assign full  = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign dout  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr && !full) mem[wp[AW-1:0]] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp      <= '0;
      rp      <= '0;
      ovf_cnt <= '0;
    end else if (clr) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (wr && !full) wp <= wp + 1'b1;
      if (wr && full)  ovf_cnt <= ovf_cnt + 1'b1;
      if (rd && !empty) rp <= rp + 1'b1;
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd |-> !empty);

endmodule
