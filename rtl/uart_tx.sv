// uart_tx: asynchronous serial transmitter, 8 data bits, no parity, 1 stop.
//
// Sends the telemetry text to the host PC. A byte is taken on
// `valid && ready`; the line then carries a start bit (0), the eight data
// bits LSB first and a stop bit (1), each CLK_HZ/BAUD clock cycles long, so
// a byte occupies 10*CLK_HZ/BAUD cycles and `ready` returns high the cycle
// after the stop bit ends. The line idles high. 115200 baud is the host link
// rate; the 100 MHz clock is this design's assumption.
module uart_tx #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);

  localparam int unsigned DIV   = CLK_HZ / BAUD;
  localparam int unsigned DIV_W = $clog2(DIV);

  logic [DIV_W-1:0] cnt;
  logic [3:0]       nbit;   // bits still to send including the current one
  logic [8:0]       sh;     // {stop, data} still to go after the current bit

  assign ready = (nbit == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      nbit <= '0;
      sh   <= '1;
      txd  <= 1'b1;
    end else if (nbit == 4'd0) begin
      if (valid) begin
        txd  <= 1'b0;                 // start bit
        sh   <= {1'b1, data};
        nbit <= 4'd10;
        cnt  <= '0;
      end
    end else if (cnt == DIV_W'(DIV - 1)) begin
      cnt  <= '0;
      nbit <= nbit - 4'd1;
      txd  <= (nbit == 4'd1) ? 1'b1 : sh[0];
      sh   <= {1'b1, sh[8:1]};
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

endmodule
