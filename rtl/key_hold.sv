// key_hold: keeps the last chord sounding while the envelope releases.
//
// When every key is lifted the host writes zeros, but the release stage of
// the envelope still needs audio to fade out. This register therefore
// passes the live keys through while at least one key is down and, once all
// are up, keeps presenting the last non-empty set. The held set drives the
// pitch steps and the voice count of the summer; "pressed" (any live key
// non-zero) drives the envelope.
//
// Timing: one clock of latency from the live keys to held_keys; pressed is
// combinational. Reset clears the held set.
module key_hold
  import audio_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  key_t keys      [NUM_VOICES],
  output key_t held_keys [NUM_VOICES],
  output logic pressed
);
  always_comb begin
    pressed = 1'b0;
    for (int v = 0; v < NUM_VOICES; v++) pressed |= (keys[v] != '0);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int v = 0; v < NUM_VOICES; v++) held_keys[v] <= '0;
    end else if (pressed) begin
      held_keys <= keys;
    end
  end
endmodule
