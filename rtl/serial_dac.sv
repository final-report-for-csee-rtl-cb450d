// serial_dac: serialiser for the WM8731 DAC in I2S format, codec as master.
//
// The codec drives the bit clock (bclk) and the DAC left/right clock
// (daclrck, low = left); this block returns one bit of audio per bclk
// falling edge on dacdat. Each channel slot carries the 33-bit pattern
// {1'b0, sample[15:0], 16'b0} MSB first: the leading 0 is the one-bit delay
// of I2S, then the 16-bit sample, then zero padding until the slot ends.
// Left and right carry the same (mono) sample, captured once per frame at
// the start of the left slot. The slot pattern, mono output and I2S framing
// follow the published design (codec format register 0x0E42: master, I2S,
// 16 bit).
//
// This design's choice: the codec clocks are not used as clocks. They are
// brought into the system clock domain by two-flop synchronisers and their
// edges detected, so everything runs on clk, which must be several times
// faster than bclk (50 MHz against about 3 MHz). dacdat then changes about
// three clk periods after each bclk falling edge, well before the codec
// samples it on the next rising edge.
//
// frame_tick is a one-clock strobe at the start of every left slot (the
// falling edge of daclrck); it clocks the address generators at the sample
// rate (48 kHz).
module serial_dac
  import audio_pkg::*;
(
  input  logic    clk,
  input  logic    reset,
  input  logic    bclk,
  input  logic    daclrck,
  input  sample_t sample,
  output logic    dacdat,
  output logic    frame_tick
);
  logic [2:0] bclk_sync, lrck_sync;
  logic       bclk_fall;
  logic       lrck_prev;     // daclrck as seen at the previous bclk fall
  logic       slot_start;
  sample_t    frame_sample;
  logic [32:0] shreg;

  always_ff @(posedge clk) begin
    if (reset) begin
      bclk_sync <= '0;
      lrck_sync <= '0;
    end else begin
      bclk_sync <= {bclk_sync[1:0], bclk};
      lrck_sync <= {lrck_sync[1:0], daclrck};
    end
  end

  assign bclk_fall  = bclk_sync[2] && !bclk_sync[1];
  assign slot_start = bclk_fall && (lrck_sync[1] != lrck_prev);
  assign frame_tick = slot_start && !lrck_sync[1];

  always_ff @(posedge clk) begin
    if (reset) begin
      lrck_prev    <= 1'b0;
      shreg        <= '0;
      frame_sample <= '0;
    end else if (bclk_fall) begin
      lrck_prev <= lrck_sync[1];
      if (slot_start) begin
        if (!lrck_sync[1]) begin
          frame_sample <= sample;
          shreg        <= {1'b0, sample, 16'b0};
        end else begin
          shreg        <= {1'b0, frame_sample, 16'b0};
        end
      end else begin
        shreg <= {shreg[31:0], 1'b0};
      end
    end
  end

  assign dacdat = shreg[32];
endmodule
