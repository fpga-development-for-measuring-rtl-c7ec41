// hex_formatter: prints a 16-bit telemetry result as text for the serial port.
//
// The result is sent as two bytes, high byte first, each written as exactly
// two hexadecimal digits: a byte below 0x10 gets a leading '0', so every
// value takes the same four characters. The line is closed with CR LF when
// EOL is set (the line ending is this design's choice). Digits are upper
// case ASCII ('0'..'9', 'A'..'F').
//
// Interface: a word is taken on `in_valid && in_ready`; `in_ready` is high
// only while idle. Characters leave on a valid/ready stream (`ch_valid`,
// `ch_data`, `ch_ready`), one per accepted handshake, so the formatter keeps
// pace with whatever UART follows it. A word becomes 4 (or 6 with EOL)
// characters; the first is offered the cycle after the word is taken.
module hex_formatter #(
  parameter bit EOL = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [15:0] in_data,
  output logic        in_ready,
  output logic        ch_valid,
  output logic [7:0]  ch_data,
  input  logic        ch_ready
);

  localparam logic [2:0] N_CHARS = EOL ? 3'd6 : 3'd4;

  logic [15:0] word;
  logic [2:0]  pos;

  function automatic logic [7:0] hex_digit(input logic [3:0] n);
    return (n < 4'd10) ? (8'h30 + 8'(n)) : (8'h41 + 8'(n) - 8'd10);
  endfunction

  always_comb begin
    unique case (pos)
      3'd0:    ch_data = hex_digit(word[15:12]);
      3'd1:    ch_data = hex_digit(word[11:8]);
      3'd2:    ch_data = hex_digit(word[7:4]);
      3'd3:    ch_data = hex_digit(word[3:0]);
      3'd4:    ch_data = 8'h0D;
      default: ch_data = 8'h0A;
    endcase
  end

  assign in_ready = ~ch_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word     <= '0;
      pos      <= '0;
      ch_valid <= 1'b0;
    end else if (!ch_valid) begin
      if (in_valid) begin
        word     <= in_data;
        pos      <= '0;
        ch_valid <= 1'b1;
      end
    end else if (ch_ready) begin
      if (pos == N_CHARS - 3'd1) ch_valid <= 1'b0;
      else                       pos      <= pos + 3'd1;
    end
  end

endmodule
