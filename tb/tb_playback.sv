// tb_playback: drives random pitch steps, frame ticks, host-write holds and
// the reverse switch into a 1024-word address generator and compares every
// voice position with an integer model: position += step (or -= in
// reverse) modulo 1024 * 2^16, only on unheld ticks. Also checks that
// key 1 (step 1.0) walks the addresses 0,1,2,... and wraps to 0.
module tb_playback;
  import audio_pkg::*;
  localparam int DEPTH = 1024, AW = $clog2(DEPTH);
  logic clk = 0, reset = 1, tick = 0, hold = 0, reverse = 0;
  step_t step [NUM_VOICES];
  logic [AW-1:0]  addr [NUM_VOICES];
  logic [AW+15:0] pos  [NUM_VOICES];
  longint model [NUM_VOICES];
  int checks = 0, failures = 0, wraps = 0, reversals = 0, holds = 0;

  playback #(.DEPTH(DEPTH)) dut (.clk, .reset, .tick, .hold, .reverse, .step, .addr, .pos);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int v = 0; v < NUM_VOICES; v++) begin
      checks++;
      if (pos[v] !== (AW+16)'(model[v]) || addr[v] !== AW'(model[v] >> 16)) begin
        failures++;
        if (failures < 10) $display("voice %0d pos %h exp %h", v, pos[v], model[v]);
      end
    end
  endtask

  initial begin
    longint mod;
    mod = longint'(DEPTH) << 16;
    for (int v = 0; v < NUM_VOICES; v++) begin step[v] = 32'h0001_0000; model[v] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    // step 1.0 from 0: addresses count up and wrap after DEPTH ticks
    for (int i = 1; i <= DEPTH + 5; i++) begin
      @(negedge clk) tick = 1;
      @(negedge clk) tick = 0;
      checks++;
      if (addr[0] !== AW'(i % DEPTH)) begin failures++; $display("walk %0d got %0d", i, addr[0]); end
      if (i % DEPTH == 0) wraps++;
    end
    for (int v = 0; v < NUM_VOICES; v++) model[v] = (longint'(DEPTH + 5) << 16) % mod;
    check_all();
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (i % 500 == 0) begin
        reverse = $urandom_range(1);
        reversals += reverse;
        for (int v = 0; v < NUM_VOICES; v++) step[v] = {13'd0, 19'($urandom)};
      end
      tick = ($urandom_range(2) == 0);
      hold = ($urandom_range(5) == 0);
      if (tick && hold) holds++;
      if (tick && !hold)
        for (int v = 0; v < NUM_VOICES; v++) begin
          if (reverse) model[v] = (model[v] - (longint'(step[v]) % mod) + mod) % mod;
          else         model[v] = (model[v] + longint'(step[v])) % mod;
        end
      @(negedge clk);
      tick = 0; hold = 0;
      check_all();
    end
    if (wraps == 0 || reversals == 0 || holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
