// i2c_av_cfg: power-up register programme for the WM8731 codec.
//
// After reset this sequencer walks a table of ten codec register writes and
// hands each, prefixed with the codec's bus address 0x34, to i2c_master. A
// write the codec does not acknowledge is sent again; an acknowledged one
// advances to the next entry. When all ten are acknowledged, config_done
// rises and stays high until reset.
//
// The table (left/right line-in 0x001A/0x021A, headphone volume
// 0x0479/0x0679, analogue path 0x0810 = DAC selected with bypass off,
// digital path 0x0A06, power 0x0C00 = all on, interface format 0x0E42 =
// master, I2S, 16 bit, sampling 0x1000 = normal mode 48 kHz, active 0x1201)
// and the retry-on-missing-acknowledge rule follow the published design.
// The start/done handshake with the bus master is this design's own.
//
// Timing: one transfer at a time; index advances in the clock after done.
module i2c_av_cfg
  import audio_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  output logic        start,
  output logic [23:0] data,
  input  logic        busy,
  input  logic        done,
  input  logic        nack,
  output logic [3:0]  index,
  output logic        config_done
);
  localparam int unsigned LUT_SIZE = 10;
  localparam logic [15:0] LUT [LUT_SIZE] = '{
    16'h001A, 16'h021A, 16'h0479, 16'h0679, 16'h0810,
    16'h0A06, 16'h0C00, 16'h0E42, 16'h1000, 16'h1201
  };

  logic waiting;

  assign config_done = (index == 4'(LUT_SIZE));
  assign data        = {CODEC_I2C_ADDR, config_done ? 16'h0000 : LUT[index]};

  always_ff @(posedge clk) begin
    start <= 1'b0;
    if (reset) begin
      index   <= '0;
      waiting <= 1'b0;
    end else if (!config_done) begin
      if (!waiting && !busy && !start) begin
        start   <= 1'b1;
        waiting <= 1'b1;
      end else if (waiting && done) begin
        waiting <= 1'b0;
        if (!nack) index <= index + 1'b1;
      end
    end
  end
endmodule
