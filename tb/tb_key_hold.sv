// tb_key_hold: random key sets, one in four empty. "pressed" must follow
// the live keys at once; the held set must equal the last non-empty set one
// clock later and survive any run of empty sets.
module tb_key_hold;
  import audio_pkg::*;
  logic clk = 0, reset = 1;
  key_t keys [NUM_VOICES];
  key_t held_keys [NUM_VOICES];
  key_t last [NUM_VOICES];
  logic pressed;
  int checks = 0, failures = 0, empties = 0;

  key_hold dut (.clk, .reset, .keys, .held_keys, .pressed);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic any;
    for (int v = 0; v < NUM_VOICES; v++) begin keys[v] = '0; last[v] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      any = 0;
      if ($urandom_range(3) == 0) begin
        for (int v = 0; v < NUM_VOICES; v++) keys[v] = '0;
        empties++;
      end else begin
        for (int v = 0; v < NUM_VOICES; v++) begin
          keys[v] = ($urandom_range(2) == 0) ? key_t'(0) : key_t'($urandom_range(31, 1));
          any |= (keys[v] != 0);
        end
      end
      #1;
      checks++;
      if (pressed !== any) begin failures++; $display("pressed %b exp %b", pressed, any); end
      if (any) for (int v = 0; v < NUM_VOICES; v++) last[v] = keys[v];
      @(negedge clk);
      for (int v = 0; v < NUM_VOICES; v++) begin
        checks++;
        if (held_keys[v] !== last[v]) begin
          failures++;
          if (failures < 10) $display("held %0d got %0d exp %0d", v, held_keys[v], last[v]);
        end
      end
    end
    if (empties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
