// tb_audio_sampler: end-to-end test of the sampler at its full size
// (32768-word table, 5001-clock envelope tick, 50 MHz / 40 kHz two-wire
// timing) against the WM8731 model.
//
// The host side loads the whole table with a pseudo-random recording, reads
// part of it back, then plays: a three-key chord (steps 1, 2 and 4), a
// two-key chord, a single non-integer-step key, the same key in reverse,
// each of the 31 notes in turn,
// a key release with the envelope tail, a re-press during the release,
// and host writes that land on a frame boundary. Every frame decoded by the
// codec model is compared with a value computed here from the voice
// addresses, the testbench's own copy of the table, the held keys and the
// envelope level: floor(amplitude * trunc(sum / voices) / 2^16). Voice
// addresses must advance by the integer step once per frame (exactly for
// steps 1, 2, 4, and by the step's integer part or one more otherwise),
// backwards in reverse, and not at all on a frame with a host write.
// The codec must receive the ten set-up words, one of them after a refused
// first attempt. Each mechanism is counted; one that never occurs fails.
module tb_audio_sampler;
  import audio_pkg::*;
  localparam int DEPTH = 32768;

  logic clk = 0, reset = 1;
  logic [15:0] address = 0, writedata = 0, readdata;
  logic chipselect = 0, read = 0, write = 0;
  logic aud_xclk, bclk, daclrck, dacdat, sclk, sda_o, sda_oe, sda_pull, sda_line;
  logic swt = 1;
  logic [9:0] sw = 0;
  logic [7:0] gpio;
  logic [15:0] left_word, right_word;
  int left_count, right_count, delay_bit_errors;

  audio_sampler dut (
    .clk, .reset, .address, .chipselect, .read, .write, .writedata, .readdata,
    .aud_xclk, .bclk, .daclrck, .dacdat, .adclrck(1'b0), .adcdat(1'b0),
    .sclk, .sda_o, .sda_oe, .sda_i(sda_line), .swt, .sw, .gpio
  );

  assign sda_line = (sda_oe ? sda_o : 1'b1) & !sda_pull;

  wm8731_model #(.NACK_FIRST(1)) codec (
    .mclk(aud_xclk), .bclk, .daclrck, .dacdat, .scl(sclk), .sda(sda_line), .sda_pull,
    .left_word, .right_word, .left_count, .right_count, .delay_bit_errors
  );

  always #10 clk = ~clk;   // 50 MHz

  int checks = 0, failures = 0;
  // mechanism counters
  int n_load = 0, n_readback = 0, n_voices [4], n_state [4], n_reverse = 0;
  int n_notes = 0;
  int n_wrap = 0, n_hold = 0, n_tail = 0, n_reattack = 0, n_frac = 0;

  initial begin
    #1s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] wave(int i);
    logic [31:0] x;
    x = 32'(i) * 32'h9E37_79B1;
    return x[31:16] ^ 16'(i);
  endfunction

  // ---- host bus -------------------------------------------------------
  task automatic av_write(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk);
    chipselect = 1; write = 1; address = a; writedata = d;
    @(negedge clk);
    chipselect = 0; write = 0;
  endtask

  key_t held [NUM_VOICES];
  logic live_pressed = 0;
  task automatic set_keys(input int k0, input int k1, input int k2);
    av_write(16'h8000, {1'b0, 5'(k2), 5'(k1), 5'(k0)});
    live_pressed = (k0 != 0 || k1 != 0 || k2 != 0);
    if (live_pressed) begin held[0] = 5'(k0); held[1] = 5'(k1); held[2] = 5'(k2); end
  endtask

  // ---- per-frame reference ------------------------------------------
  logic [15:0] expq [$];
  logic        checking = 0;
  int          prev_addr [NUM_VOICES];
  key_t        prev_held [NUM_VOICES];
  logic        have_prev = 0;
  logic        frame_had_write = 0;
  int          frames = 0;


  function automatic int step_int(key_t k);
    int  n;
    real r;
    if (k == 0) return 0;
    n = int'(k) - 1;
    r = 2.0 ** (n / 12.0);
    return $rtoi(r);
  endfunction
  function automatic bit step_exact(key_t k);
    return k == 1 || k == 13 || k == 25;
  endfunction

  always @(negedge clk) if (checking && dut.frame_tick) begin
    int sum, n, avg, d, si;
    longint p;
    frames++;
    sum = 0; n = 0;
    for (int v = 0; v < NUM_VOICES; v++)
      if (held[v] != 0) begin sum += int'($signed(wave(int'(dut.vaddr[v])))); n++; end
    avg = (n == 0) ? 0 : sum / n;
    p = longint'(dut.amplitude) * longint'(avg);
    expq.push_back(16'(p >>> 16));
    n_voices[n]++;
    n_state[dut.env_state]++;
    if (!live_pressed && dut.amplitude != 0) n_tail++;
    // address advance since the previous frame
    if (have_prev) begin
      for (int v = 0; v < NUM_VOICES; v++) begin
        si = step_int(prev_held[v]);
        d  = sw[0] ? (prev_addr[v] - int'(dut.vaddr[v]) + DEPTH) % DEPTH
                   : (int'(dut.vaddr[v]) - prev_addr[v] + DEPTH) % DEPTH;
        if (prev_held[v] != 0 && !sw[0] && int'(dut.vaddr[v]) < prev_addr[v]) n_wrap++;
        checks++;
        if (frame_had_write) begin
          if (d != 0) begin failures++; $display("voice %0d moved during host write", v); end
        end else if (step_exact(prev_held[v]) ? (d != si) : (d != si && d != si + 1)) begin
          failures++;
          if (failures < 20) $display("voice %0d key %0d advanced %0d", v, prev_held[v], d);
        end
        if (!frame_had_write && !step_exact(prev_held[v]) && prev_held[v] != 0 && d == si + 1) n_frac++;
      end
      if (frame_had_write) n_hold++;
      if (sw[0]) n_reverse++;
    end
    for (int v = 0; v < NUM_VOICES; v++) begin
      prev_addr[v] = int'(dut.vaddr[v]);
      prev_held[v] = held[v];
    end
    have_prev = 1;
    // a host write in the tick's clock holds this frame's advance
    frame_had_write = chipselect && write;
  end

  // compare every decoded left slot with the reference
  int lc_prev = 0;
  always @(left_count) if (checking) begin
    if (left_count > lc_prev && expq.size() > 0) begin
      logic [15:0] e;
      e = expq.pop_front();
      checks++;
      if (left_word !== e) begin
        failures++;
        if (failures < 20) $display("frame %0d: codec got %h expected %h", frames, left_word, e);
      end
    end
    lc_prev = left_count;
  end

  task automatic run_frames(input int n);
    repeat (n) @(posedge clk iff dut.frame_tick);
  endtask

  logic [15:0] setup [10] = '{16'h001A, 16'h021A, 16'h0479, 16'h0679, 16'h0810,
                              16'h0A06, 16'h0C00, 16'h0E42, 16'h1000, 16'h1201};

  initial begin
    env_state_t st;
    for (int v = 0; v < NUM_VOICES; v++) held[v] = '0;
    repeat (5) @(posedge clk);
    @(negedge clk) reset = 0;

    // load the recording, one word per clock
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      chipselect = 1; write = 1; address = 16'(i); writedata = wave(i);
      n_load++;
    end
    @(negedge clk) chipselect = 0; write = 0;
    // read back, one-clock latency
    for (int i = 0; i < 200; i++) begin
      int a;
      a = (i < 100) ? i : $urandom_range(DEPTH - 1);
      @(negedge clk);
      chipselect = 1; read = 1; address = 16'(a);
      @(negedge clk);
      chipselect = 0; read = 0;
      checks++;
      if (readdata !== wave(a)) begin failures++; $display("readback %0d got %h", a, readdata); end
      n_readback++;
    end

    // skip frames that started before the checker
    run_frames(2);
    @(negedge clk) checking = 1;
    // wait for the decoded-slot stream to line up with the queue
    @(left_count); expq.delete();

    // three voices from position 0: steps 1, 2 and 4, default envelope rates
    set_keys(1, 13, 25);
    while (dut.env_state != ENV_SUSTAIN) run_frames(1);
    run_frames(40);
    // two voices
    set_keys(1, 13, 0);
    run_frames(40);
    // two fast voices until both wrap around the table end
    set_keys(31, 25, 0);
    run_frames(6000);
    // one voice at a non-integer step, forward then reverse
    set_keys(8, 0, 0);
    run_frames(40);
    sw[0] = 1;
    run_frames(60);
    sw[0] = 0;
    run_frames(5);
    // every note of the range, voice 1 alone, eight frames each
    for (int k = 1; k <= 31; k++) begin
      set_keys(k, 0, 0);
      run_frames(8);
      n_notes++;
    end
    // host writes across a frame boundary freeze the voices
    for (int r = 0; r < 3; r++) begin
      @(negedge daclrck);
      // rewrite one word with its own value for eight clocks in a row
      @(negedge clk);
      chipselect = 1; write = 1; address = 16'(r); writedata = wave(r);
      repeat (8) @(negedge clk);
      chipselect = 0; write = 0;
      run_frames(3);
    end
    // faster envelope, then release with the held chord sounding
    av_write(16'h8800, {8'd255, 8'd255});
    set_keys(1, 13, 25);
    run_frames(20);
    set_keys(0, 0, 0);
    run_frames(1);
    while (dut.env_state == ENV_RELEASE && dut.amplitude > 16000) run_frames(1);
    // re-press during the release
    st = dut.env_state;
    set_keys(3, 0, 0);
    run_frames(2);
    if (st == ENV_RELEASE && dut.env_state != ENV_RELEASE) n_reattack++;
    run_frames(10);
    set_keys(0, 0, 0);
    while (dut.env_state != ENV_IDLE) run_frames(1);
    run_frames(10);

    // codec set-up over the control bus
    while (!dut.config_done) @(posedge clk);
    repeat (5000) @(posedge clk);
    checks++;
    if (codec.reg_count != 10) begin failures++; $display("codec got %0d words", codec.reg_count); end
    for (int i = 0; i < 10; i++) begin
      checks++;
      if (codec.reg_log[i] !== setup[i]) begin failures++; $display("setup %0d got %h", i, codec.reg_log[i]); end
    end
    checks++;
    if (codec.nacks_sent < 1 || codec.transfers != 11) begin
      failures++; $display("retry: nacks %0d transfers %0d", codec.nacks_sent, codec.transfers);
    end
    checks++;
    if (delay_bit_errors != 0) begin failures++; $display("I2S delay bit errors %0d", delay_bit_errors); end

    $display("mechanisms: load=%0d readback=%0d voices1=%0d voices2=%0d voices3=%0d",
             n_load, n_readback, n_voices[1], n_voices[2], n_voices[3]);
    $display("  idle=%0d attack=%0d sustain=%0d release=%0d tail=%0d reattack=%0d",
             n_state[0], n_state[1], n_state[2], n_state[3], n_tail, n_reattack);
    $display("  notes=%0d", n_notes);
    $display("  reverse=%0d wrap=%0d host_hold=%0d fractional=%0d nack_retry=%0d frames=%0d",
             n_reverse, n_wrap, n_hold, n_frac, codec.nacks_sent, frames);
    if (n_load == 0 || n_readback == 0 || n_voices[1] == 0 || n_voices[2] == 0 ||
        n_voices[3] == 0 || n_state[0] == 0 || n_state[1] == 0 || n_state[2] == 0 ||
        n_state[3] == 0 || n_tail == 0 || n_reattack == 0 || n_reverse == 0 ||
        n_wrap == 0 || n_hold == 0 || n_notes != 31 || n_frac == 0 || codec.nacks_sent == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
