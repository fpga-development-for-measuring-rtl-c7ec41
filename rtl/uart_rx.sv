// uart_rx: asynchronous serial receiver, 8 data bits, no parity, 1 stop.
//
// Receives the characters typed on the host terminal; the system is started
// by typing two of them. `rxd` is synchronised by two flip-flops. A falling
// edge starts a frame; the start bit is checked again half a bit later, then
// every bit is sampled in its middle, every CLK_HZ/BAUD cycles. After the
// stop bit has been sampled `valid` pulses for one cycle with the byte on
// `data`; `frame_err` pulses instead of `valid` if the stop bit is 0.
module uart_rx #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data,
  output logic       frame_err
);

  localparam int unsigned DIV   = CLK_HZ / BAUD;
  localparam int unsigned DIV_W = $clog2(DIV);

  logic [1:0]       sync;
  logic             rx;
  logic             active;
  logic [DIV_W-1:0] cnt;
  logic [3:0]       nbit;   // 0 start, 1..8 data, 9 stop
  logic [7:0]       sh;

  assign rx = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], rxd};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      cnt       <= '0;
      nbit      <= '0;
      sh        <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      if (!active) begin
        if (!rx) begin
          active <= 1'b1;
          cnt    <= '0;
          nbit   <= '0;
        end
      end else begin
        cnt <= cnt + 1'b1;
        if ((nbit == 4'd0 && cnt == DIV_W'(DIV / 2 - 1)) ||
            (nbit != 4'd0 && cnt == DIV_W'(DIV - 1))) begin
          cnt <= '0;
          if (nbit == 4'd0) begin
            if (rx) active <= 1'b0;     // glitch, not a start bit
            else    nbit   <= 4'd1;
          end else if (nbit == 4'd9) begin
            active <= 1'b0;
            if (rx) begin
              valid <= 1'b1;
              data  <= sh;
            end else begin
              frame_err <= 1'b1;
            end
          end else begin
            sh   <= {rx, sh[7:1]};
            nbit <= nbit + 4'd1;
          end
        end
      end
    end
  end

endmodule
