// playback: per-voice fractional address generators ("playback module").
//
// Pitch shifting works by undersampling: each voice keeps a 16.16
// fixed-point read position and, once per audio frame, adds its phase step
// (1.0 plays the recording as stored, 2.0 skips every other sample, and
// non-integer steps give the semitones in between). The integer part of the
// position is the sample-table address. With reverse set, the step is
// subtracted instead and the recording plays backwards. Positions wrap
// around the table (modulo DEPTH), so playback loops in both directions.
//
// Follows the published design: 16.16 steps, one update per frame (the
// falling edge of the codec's DAC left/right clock), table of 32768 words,
// reverse selected by a board switch, and no advance while the host is
// writing. This design's own choices: a clean modular wrap (the published
// design restarts from 0 on reaching the last word and re-enters at the top
// on reaching word 0), and a synchronous reset to position 0.
//
// Interface: tick is a one-clock strobe per frame; hold freezes all voices;
// step[v] from pitch_step; addr[v] = integer part of position v.
// Timing: positions update on the clock edge where tick is high and hold low.
module playback
  import audio_pkg::*;
#(
  parameter int unsigned DEPTH = 32768,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          tick,
  input  logic          hold,
  input  logic          reverse,
  input  step_t         step [NUM_VOICES],
  output logic [AW-1:0] addr [NUM_VOICES],
  output logic [AW+15:0] pos [NUM_VOICES]
);
  for (genvar v = 0; v < NUM_VOICES; v++) begin : g_voice
    logic [AW+15:0] step_m;
    assign step_m = step[v][AW+15:0];   // step mod table length

    always_ff @(posedge clk) begin
      if (reset)                pos[v] <= '0;
      else if (tick && !hold)   pos[v] <= reverse ? pos[v] - step_m
                                                  : pos[v] + step_m;
    end
    assign addr[v] = pos[v][AW+15:16];
  end
endmodule
