// max1168_model: behavioural model of one MAX1168 telemetry ADC, for
// simulation only (not synthesizable: it uses delays and edge events).
//
// Follows the 16-bit data-transfer, internal-clock, single-conversion use of
// the part: the falling edge of CS_n starts a frame; DIN is latched on SCLK
// rising edges, the first eight bits being the command byte; CONV_NS after
// the 16th rising edge the conversion is done, EOC_n falls and the MSB of the
// result is on DOUT; each SCLK falling edge then moves the next bit out.
// CS_n rising ends the frame and raises EOC_n. The result for channel c is
// VALUES[16*c +: 16] plus `offset`. With `dead` high the model never ends a
// conversion (a missing or unpowered ADC). It counts frames, the SCLK rising
// edges of the last frame, and commands whose low five bits are not 00011.
`timescale 1ns/1ps
module max1168_model #(
  parameter int unsigned CONV_NS = 2000,
  parameter logic [127:0] VALUES = '0
) (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic        din,
  output logic        dout,
  output logic        eoc_n,
  input  logic        dead,
  input  logic [15:0] offset
);

  logic [7:0]  cmd;
  logic [15:0] shreg;
  int          rise_cnt;
  logic        reading;
  int          frames;
  int          bad_cmds;
  logic [2:0]  last_ch;
  int          last_rises;

  initial begin
    dout = 1'b0; eoc_n = 1'b1; cmd = '0; shreg = '0; rise_cnt = 0;
    reading = 1'b0; frames = 0; bad_cmds = 0; last_ch = '0; last_rises = 0;
  end

  always @(negedge cs_n) begin
    rise_cnt = 0;
    reading  = 1'b0;
    dout     = 1'b0;
    frames++;
  end

  always @(posedge cs_n) begin
    last_rises = rise_cnt;
    eoc_n   = 1'b1;
    reading = 1'b0;
    dout    = 1'b0;
  end

  always @(posedge sclk) begin
    if (!cs_n) begin
      rise_cnt++;
      if (rise_cnt <= 8) cmd = {cmd[6:0], din};
      if (rise_cnt == 8) begin
        last_ch = cmd[7:5];
        if (cmd[4:0] != 5'b00011) bad_cmds++;
      end
      if (rise_cnt == 16 && !dead) begin
        fork
          begin
            #(CONV_NS);
            if (!cs_n) begin
              shreg   = VALUES[16*last_ch +: 16] + offset;
              dout    = shreg[15];
              reading = 1'b1;
              eoc_n   = 1'b0;
            end
          end
        join_none
      end
    end
  end

  always @(negedge sclk) begin
    if (!cs_n && reading) begin
      shreg = {shreg[14:0], 1'b0};
      dout  = shreg[15];
    end
  end

endmodule
