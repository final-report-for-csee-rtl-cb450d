// tb_summer: random voice samples and key patterns (including extremes of
// the 16-bit range); the mix must be the truncated average of the voices
// whose key is non-zero, 0 with no key, and "active" their count.
module tb_summer;
  import audio_pkg::*;
  sample_t voice [NUM_VOICES];
  key_t    keys  [NUM_VOICES];
  sample_t mix;
  logic [1:0] active;
  int checks = 0, failures = 0;
  int seen [4];

  summer dut (.voice, .keys, .mix, .active);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum, n, expv;
    for (int i = 0; i < 20000; i++) begin
      sum = 0; n = 0;
      for (int v = 0; v < NUM_VOICES; v++) begin
        case ($urandom_range(5))
          0: voice[v] = 16'sh7FFF;
          1: voice[v] = -16'sh8000;
          default: voice[v] = sample_t'($urandom);
        endcase
        keys[v] = ($urandom_range(1) == 0) ? key_t'(0) : key_t'($urandom_range(31, 1));
        if (keys[v] != 0) begin sum += int'(voice[v]); n++; end
      end
      expv = (n == 0) ? 0 : sum / n;   // int division truncates toward zero
      seen[n]++;
      #1;
      checks++;
      if (int'(mix) != expv || int'(active) != n) begin
        failures++;
        if (failures < 10) $display("n=%0d sum=%0d mix=%0d exp=%0d", n, sum, mix, expv);
      end
    end
    for (int k = 0; k < 4; k++) if (seen[k] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
