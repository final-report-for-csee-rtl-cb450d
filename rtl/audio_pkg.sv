// audio_pkg: types and constants shared by the sampler's blocks.
//
// The sampler stores a 16-bit mono recording three times in block RAM, reads
// each copy with its own fractional address generator (one per held key,
// three keys of polyphony), averages the voices, shapes them with an
// attack/sustain/release envelope and sends the result to a WM8731 codec.
// The register map (sample words at 0x0000-0x7FFF, key word at 0x8000,
// envelope word at 0x8800), the 32768-sample table, the 16.16 step format
// and the twelve equal-temperament ratios are the design's published values;
// the ratios are taken, rounded to six decimals, from its interval table and
// scaled by 2^16 here.
package audio_pkg;

  // Sample memory: 32768 signed 16-bit words per bank, three banks.
  localparam int unsigned SAMPLE_W     = 16;
  localparam int unsigned SAMPLE_DEPTH = 32768;
  localparam int unsigned NUM_VOICES   = 3;

  localparam logic [15:0] ADDR_KEYS = 16'h8000;  // three 5-bit note numbers
  localparam logic [15:0] ADDR_ENV  = 16'h8800;  // attack[7:0], release[15:8]

  // Note numbers: 0 = no key, 1 = G2 (sample played at its stored pitch),
  // 31 = C#5 (two and a half octaves higher).
  typedef logic [4:0] key_t;
  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Phase increment: unsigned 16.16 fixed point.
  typedef logic [31:0] step_t;

  // 2^(i/12) for i = 0..11 as 16.16 fixed point, rounded from the
  // six-decimal ratios 1, 1.059463, 1.122462, 1.189207, 1.259921, 1.334840,
  // 1.414214, 1.498307, 1.587401, 1.681793, 1.781797, 1.887749.
  localparam step_t SEMITONE_RATIO [12] = '{
    32'h0001_0000, 32'h0001_0F39, 32'h0001_1F5A, 32'h0001_3070,
    32'h0001_428A, 32'h0001_55B8, 32'h0001_6A0A, 32'h0001_7F91,
    32'h0001_9660, 32'h0001_AE8A, 32'h0001_C824, 32'h0001_E344
  };

  // Envelope: peak (sustain) level 0x7BFF, end of release at or below 1024.
  localparam logic [15:0] ENV_PEAK       = 16'd31743;
  localparam logic [15:0] ENV_FLOOR      = 16'd1024;
  localparam logic [7:0]  ENV_ATTACK_RST = 8'd64;
  localparam logic [7:0]  ENV_RELEASE_RST= 8'd32;

  typedef enum logic [1:0] {
    ENV_IDLE    = 2'd0,
    ENV_ATTACK  = 2'd1,
    ENV_SUSTAIN = 2'd2,
    ENV_RELEASE = 2'd3
  } env_state_t;

  // WM8731 control address (write) on the two-wire bus.
  localparam logic [7:0] CODEC_I2C_ADDR = 8'h34;

endpackage
