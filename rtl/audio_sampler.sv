// audio_sampler: three-voice sample-playback synthesiser for the WM8731.
//
// A host processor loads a mono 16-bit recording into the sample table
// (word addresses 0x0000-0x7FFF of a 16-bit Avalon-MM agent), then, as keys
// go up and down, writes the held notes as three 5-bit numbers to 0x8000
// and the envelope rates to 0x8800. On every audio frame (48 kHz, paced by
// the codec's DAC left/right clock) each voice advances through its own
// copy of the table by a step of 2^((note-1)/12), so one recording plays at
// 31 pitches. The active voices are averaged, scaled by a shared
// attack/sustain/release envelope and shifted out to the codec in I2S.
// After reset the codec is programmed over its two-wire control bus.
//
//   Avalon write -> key_parser -> key_hold -> pitch_step x3 -> playback
//   Avalon write -> sample_bank (3 copies) <- playback addresses
//   sample_bank -> summer -> asr_envelope -> serial_dac -> dacdat
//   i2c_av_cfg -> i2c_master -> sclk / sda;  mclk_div -> aud_xclk
//
// Follows the published design: block structure, register map, table size,
// step format, averaging, envelope and codec programme; sw[0] selects
// reverse playback; swt low holds the codec interface (configuration and
// serialiser) in reset; gpio mirrors the codec and bus strobes for a logic
// analyser. This design's own choices: everything runs on clk (the codec
// clocks are synchronised and edge-detected), an active-high synchronous
// reset, read latency of one clock, sample writes only below 0x8000, and
// the two-wire data line as separate out / enable / in signals. Internal
// status (envelope state and level, voice count, set-up progress, full voice
// positions) has no port on the component and is left for simulation to
// observe, so lint lists those nets as unused.
module audio_sampler
  import audio_pkg::*;
#(
  parameter int unsigned DEPTH       = SAMPLE_DEPTH,
  parameter int unsigned ENV_TICK    = 5001,
  parameter int unsigned CLK_FREQ    = 50_000_000,
  parameter int unsigned I2C_FREQ    = 40_000
) (
  input  logic        clk,
  input  logic        reset,
  // Avalon-MM agent
  input  logic [15:0] address,
  input  logic        chipselect,
  input  logic        read,
  input  logic        write,
  input  logic [15:0] writedata,
  output logic [15:0] readdata,
  // codec
  output logic        aud_xclk,
  input  logic        bclk,
  input  logic        daclrck,
  output logic        dacdat,
  input  logic        adclrck,
  input  logic        adcdat,
  output logic        sclk,
  output logic        sda_o,
  output logic        sda_oe,
  input  logic        sda_i,
  // board
  input  logic        swt,
  input  logic [9:0]  sw,
  output logic [7:0]  gpio
);
  localparam int unsigned AW = $clog2(DEPTH);

  // Avalon-MM rule: a host never reads and writes in the same transfer.
  a_rd_wr_excl: assert property (@(posedge clk) disable iff (reset)
                                 chipselect |-> !(read && write));

  logic codec_reset;
  assign codec_reset = reset || !swt;

  // ---- host registers -------------------------------------------------
  key_t live_keys [NUM_VOICES];
  key_t held_keys [NUM_VOICES];
  logic pressed;

  key_parser u_keys (
    .clk, .reset, .chipselect, .write, .address, .writedata,
    .keys(live_keys)
  );

  key_hold u_hold (
    .clk, .reset, .keys(live_keys), .held_keys, .pressed
  );

  // ---- address generation ---------------------------------------------
  step_t          step  [NUM_VOICES];
  logic [AW-1:0]  vaddr [NUM_VOICES];
  logic [AW+15:0] vpos  [NUM_VOICES];
  logic           frame_tick;

  for (genvar v = 0; v < NUM_VOICES; v++) begin : g_step
    pitch_step u_step (.key(held_keys[v]), .step(step[v]));
  end

  playback #(.DEPTH(DEPTH)) u_play (
    .clk, .reset, .tick(frame_tick), .hold(chipselect && write),
    .reverse(sw[0]), .step, .addr(vaddr), .pos(vpos)
  );

  // ---- sample storage -------------------------------------------------
  logic [SAMPLE_W-1:0] vdata [NUM_VOICES];
  logic                mem_sel;
  assign mem_sel = (address < 16'(DEPTH));

  sample_bank #(.DEPTH(DEPTH), .WIDTH(SAMPLE_W), .NUM_BANKS(NUM_VOICES)) u_mem (
    .clk,
    .wr_en(chipselect && write && mem_sel), .wr_addr(address[AW-1:0]),
    .wr_data(writedata),
    .rd_en(chipselect && read && mem_sel), .rd_addr(address[AW-1:0]),
    .rd_data(readdata),
    .voice_addr(vaddr), .voice_data(vdata)
  );

  // ---- mixing, envelope, output ---------------------------------------
  sample_t    voice [NUM_VOICES];
  sample_t    mix, shaped;
  logic [1:0] active;
  env_state_t env_state;
  logic [15:0] amplitude;
  logic        env_tick;

  for (genvar v = 0; v < NUM_VOICES; v++) begin : g_voice
    assign voice[v] = sample_t'(vdata[v]);
  end

  summer u_sum (.voice, .keys(held_keys), .mix, .active);

  asr_envelope #(.TICK_PERIOD(ENV_TICK)) u_env (
    .clk, .reset, .chipselect, .write, .address, .writedata,
    .pressed, .sample_in(mix), .sample_out(shaped),
    .state(env_state), .amplitude, .env_tick
  );

  serial_dac u_dac (
    .clk, .reset(codec_reset), .bclk, .daclrck, .sample(shaped),
    .dacdat, .frame_tick
  );

  // ---- codec control and clock ----------------------------------------
  logic        i2c_start, i2c_busy, i2c_done, i2c_nack, config_done;
  logic [23:0] i2c_data;
  logic [3:0]  cfg_index;

  i2c_av_cfg u_cfg (
    .clk, .reset(codec_reset), .start(i2c_start), .data(i2c_data),
    .busy(i2c_busy), .done(i2c_done), .nack(i2c_nack),
    .index(cfg_index), .config_done
  );

  i2c_master #(.CLK_FREQ(CLK_FREQ), .I2C_FREQ(I2C_FREQ)) u_i2c (
    .clk, .reset(codec_reset), .start(i2c_start), .data(i2c_data),
    .busy(i2c_busy), .done(i2c_done), .nack(i2c_nack),
    .scl(sclk), .sda_o, .sda_oe, .sda_i
  );

  mclk_div u_mclk (.clk, .reset, .aud_xclk);

  assign gpio = {write, chipselect, adclrck, adcdat, daclrck, dacdat, bclk, aud_xclk};
endmodule
