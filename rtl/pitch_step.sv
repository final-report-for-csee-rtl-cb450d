// pitch_step: note number to phase increment ("sample parameter computation").
//
// A key number k (1..31) selects the playback rate 2^((k-1)/12) relative to
// the stored recording: key 1 replays the sample at its own pitch, key 13 an
// octave higher (every second sample), key 25 two octaves higher. The result
// is an unsigned 16.16 step that the address generator adds once per audio
// frame. Key 0 means "no key" and gives a step of zero, which freezes the
// voice.
//
// How: n = k-1 is split into semitone n mod 12 and octave n div 12; the
// semitone picks one of twelve equal-temperament ratios and the octave
// shifts it left. The published design lists all 31 steps as constants; the
// ratio-and-shift form is this design's own and reproduces them to within a
// few units of 2^-16.
//
// Purely combinational; no clock.
module pitch_step
  import audio_pkg::*;
(
  input  key_t  key,
  output step_t step
);
  logic [4:0] n;
  logic [3:0] semitone;
  logic [1:0] octave;

  always_comb begin
    n        = key - 5'd1;
    semitone = 4'(n % 5'd12);
    octave   = 2'(n / 5'd12);
    if (key == '0) step = '0;
    else           step = SEMITONE_RATIO[semitone] << octave;
  end
endmodule
