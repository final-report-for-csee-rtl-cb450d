// asr_envelope: attack / sustain / release amplitude envelope.
//
// A four-state machine (IDLE, ATTACK, SUSTAIN, RELEASE; the decay stage of a
// classic ADSR is left out) scales the mixed voices by a 16-bit amplitude.
// Pressing any key starts ATTACK, where the amplitude climbs by the attack
// rate once per envelope tick until it reaches the peak 0x7BFF, which is
// then held in SUSTAIN. Lifting all keys enters RELEASE, where the
// amplitude falls by the release rate per tick; at or below 1024 the note
// ends (IDLE, amplitude 0). A key pressed again during RELEASE returns to
// ATTACK from the current level, and releasing during ATTACK goes straight
// to RELEASE.
//
// The states, transitions, peak, end level, rate register (word address
// 0x8800: attack in bits [7:0], release in [15:8], 64 and 32 after reset),
// the tick of one in every 5001 clocks and the output scaling
// sample_out = (amplitude * sample_in) >> 16 all follow the published design.
// The synchronous reset (active high) is this design's addition.
//
// Timing: state and amplitude update on the clock; sample_out is
// combinational from sample_in and the amplitude register.
module asr_envelope
  import audio_pkg::*;
#(
  parameter int unsigned TICK_PERIOD = 5001
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        chipselect,
  input  logic        write,
  input  logic [15:0] address,
  input  logic [15:0] writedata,
  input  logic        pressed,
  input  sample_t     sample_in,
  output sample_t     sample_out,
  output env_state_t  state,
  output logic [15:0] amplitude,
  output logic        env_tick
);
  localparam int unsigned CW = $clog2(TICK_PERIOD);

  logic [7:0]    attack_rate, release_rate;
  logic [CW-1:0] tick_cnt;

  always_ff @(posedge clk) begin
    if (reset) begin
      attack_rate  <= ENV_ATTACK_RST;
      release_rate <= ENV_RELEASE_RST;
    end else if (chipselect && write && address == ADDR_ENV) begin
      attack_rate  <= writedata[7:0];
      release_rate <= writedata[15:8];
    end
  end

  // Envelope time base: one tick every TICK_PERIOD clocks.
  always_ff @(posedge clk) begin
    if (reset || tick_cnt == CW'(TICK_PERIOD - 1)) tick_cnt <= '0;
    else                                            tick_cnt <= tick_cnt + 1'b1;
  end
  assign env_tick = (tick_cnt == CW'(TICK_PERIOD - 1));

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= ENV_IDLE;
      amplitude <= '0;
    end else begin
      unique case (state)
        ENV_IDLE: begin
          amplitude <= '0;
          if (pressed) state <= ENV_ATTACK;
        end
        ENV_ATTACK: begin
          if (amplitude >= ENV_PEAK) state <= ENV_SUSTAIN;
          else if (!pressed)         state <= ENV_RELEASE;
          if (env_tick) amplitude <= amplitude + 16'(attack_rate);
        end
        ENV_SUSTAIN: begin
          amplitude <= ENV_PEAK;
          if (!pressed) state <= ENV_RELEASE;
        end
        ENV_RELEASE: begin
          if (amplitude <= ENV_FLOOR) state <= ENV_IDLE;
          else if (pressed)           state <= ENV_ATTACK;
          if (env_tick && amplitude > ENV_FLOOR)
            amplitude <= amplitude - 16'(release_rate);
        end
      endcase
    end
  end

  logic signed [31:0] product;
  always_comb begin
    product    = $signed({1'b0, amplitude[14:0]}) * sample_in;
    sample_out = sample_t'(product >>> 16);
  end
endmodule
