// tb_asr_envelope: runs the envelope with a 10-clock tick through
// press / sustain / release / idle, a re-press during release, a release
// during attack, and a change of rates through the 0x8800 register.
// Checks: the number of ticks spent in attack and release against
// ceil(31743 / attack) and the first m with 31743 - m*release <= 1024; the
// sustain level 0x7BFF; amplitude 0 when idle; every output sample against
// floor(amplitude * sample / 2^16) including the logged pair
// (0x7BFF, 0xFBA3) -> 0xFDE2; and that every state was visited.
module tb_asr_envelope;
  import audio_pkg::*;
  localparam int TICK = 10;
  logic clk = 0, reset = 1, chipselect = 0, write = 0, pressed = 0;
  logic [15:0] address = 0, writedata = 0;
  sample_t sample_in = 0, sample_out;
  env_state_t state;
  logic [15:0] amplitude;
  logic env_tick;
  int checks = 0, failures = 0;
  int visits [4];
  int reattacks = 0, early_releases = 0;

  asr_envelope #(.TICK_PERIOD(TICK)) dut (
    .clk, .reset, .chipselect, .write, .address, .writedata,
    .pressed, .sample_in, .sample_out, .state, .amplitude, .env_tick
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output scaling and level rules, checked on every clock.
  always @(negedge clk) if (!reset) begin
    longint p;
    sample_in <= sample_t'($urandom);
    p = longint'(amplitude) * longint'(sample_in);
    checks++;
    if (longint'(sample_out) != (p >>> 16)) begin
      failures++;
      if (failures < 10) $display("amp %0d in %0d out %0d", amplitude, sample_in, sample_out);
    end
    visits[state]++;
    if (state == ENV_IDLE && amplitude != 0 && $past(state) == ENV_IDLE) begin
      failures++; $display("idle amplitude %0d", amplitude);
    end
    if (state == ENV_SUSTAIN && $past(state) == ENV_SUSTAIN && amplitude != 16'h7BFF) begin
      failures++; $display("sustain amplitude %h", amplitude);
    end
  end

  // Count envelope ticks spent in a given state.
  task automatic ticks_in(input env_state_t s, output int n);
    n = 0;
    while (state != s) @(posedge clk);
    while (state == s) begin
      @(posedge clk);
      if (env_tick && state == s) n++;
    end
  endtask

  task automatic set_rates(input int att, input int rel);
    @(negedge clk);
    chipselect = 1; write = 1; address = 16'h8800; writedata = {8'(rel), 8'(att)};
    @(negedge clk);
    chipselect = 0; write = 0;
  endtask

  function automatic int attack_ticks(int att);
    return (31743 + att - 1) / att;
  endfunction
  function automatic int release_ticks(int start, int rel);
    int m = 0;
    while (start - m * rel > 1024) m++;
    return m;
  endfunction

  task automatic full_note(input int att, input int rel);
    int n;
    @(negedge clk) pressed = 1;
    @(posedge clk); @(negedge clk);
    checks++; if (state != ENV_ATTACK) begin failures++; $display("no attack"); end
    ticks_in(ENV_ATTACK, n);
    checks++;
    if (n < attack_ticks(att) - 1 || n > attack_ticks(att)) begin
      failures++; $display("attack ticks %0d exp %0d", n, attack_ticks(att));
    end
    checks++; if (state != ENV_SUSTAIN) begin failures++; $display("no sustain"); end
    repeat (5 * TICK) @(posedge clk);
    @(negedge clk) pressed = 0;
    ticks_in(ENV_RELEASE, n);
    checks++;
    if (n != release_ticks(31743, rel)) begin
      failures++; $display("release ticks %0d exp %0d", n, release_ticks(31743, rel));
    end
    checks++; if (state != ENV_IDLE) begin failures++; $display("no idle"); end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    // fixed vector from a logged run, applied while still in reset
    force dut.amplitude = 16'h7BFF;
    sample_in = 16'hFBA3;
    #1;
    checks++;
    if (sample_out !== 16'hFDE2) begin failures++; $display("vector got %h", sample_out); end
    release dut.amplitude;
    @(posedge clk);
    @(negedge clk) reset = 0;
    @(negedge clk);

    full_note(64, 32);          // reset rates
    set_rates(200, 100);
    full_note(200, 100);

    // release during attack
    @(negedge clk) pressed = 1;
    repeat (20 * TICK) @(posedge clk);
    @(negedge clk) pressed = 0;
    @(posedge clk); @(negedge clk);
    checks++;
    if (state == ENV_RELEASE) early_releases++; else begin failures++; $display("attack->release"); end
    // re-press during release: back to attack from the current level
    repeat (2 * TICK) @(posedge clk);
    @(negedge clk) pressed = 1;
    @(posedge clk); @(negedge clk);
    checks++;
    if (state == ENV_ATTACK && amplitude > 1024) reattacks++;
    else begin failures++; $display("release->attack"); end
    @(negedge clk) pressed = 0;
    while (state != ENV_IDLE) @(posedge clk);

    for (int s = 0; s < 4; s++) if (visits[s] == 0) begin failures++; $display("state %0d unvisited", s); end
    if (reattacks == 0 || early_releases == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
