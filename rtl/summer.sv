// summer: mixes the active voices at constant loudness.
//
// Adding voices would raise the output level with every extra key, so the
// sum of the voices that have a key is divided by their number: one key
// passes its voice through, two keys give (a+b)/2, three give (a+b+c)/3.
// Voices without a key are left out of the sum. With no key at all the
// output is 0 (the published design then averages all three; its envelope
// is silent at that point, so nothing audible changes).
//
// Arithmetic: 18-bit signed sum, division truncates toward zero, the
// quotient always fits in 16 bits. Purely combinational.
module summer
  import audio_pkg::*;
(
  input  sample_t voice [NUM_VOICES],
  input  key_t    keys  [NUM_VOICES],
  output sample_t mix,
  output logic [1:0] active
);
  logic signed [17:0] sum;
  logic signed [17:0] quot;

  always_comb begin
    sum    = '0;
    active = '0;
    for (int v = 0; v < NUM_VOICES; v++) begin
      if (keys[v] != '0) begin
        sum    += 18'(voice[v]);
        active += 2'd1;
      end
    end
    unique case (active)
      2'd0:    quot = '0;
      2'd1:    quot = sum;
      2'd2:    quot = sum / 18'sd2;
      default: quot = sum / 18'sd3;
    endcase
    mix = sample_t'(quot);
  end
endmodule
