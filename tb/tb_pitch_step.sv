// tb_pitch_step: checks the note-to-step conversion for all 32 note numbers
// against 2^((k-1)/12) * 65536 computed with real arithmetic, exact octave
// steps for keys 1, 13 and 25, a zero step for key 0, and key 16 within one
// LSB of the step 0x260DF seen between two logged hardware positions.
module tb_pitch_step;
  import audio_pkg::*;
  key_t  key;
  step_t step;
  int checks = 0, failures = 0;

  pitch_step dut (.key, .step);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ideal;
    int  diff;
    for (int k = 0; k < 32; k++) begin
      key = key_t'(k);
      #1;
      checks++;
      if (k == 0) begin
        if (step != 0) begin failures++; $display("key 0 step %h", step); end
      end else begin
        ideal = 65536.0 * (2.0 ** ((k - 1) / 12.0));
        diff  = int'(step) - int'(ideal + 0.5);
        // Table ratios are rounded to 6 decimals; allow up to 2 LSB at
        // the highest octave.
        if (diff > 2 || diff < -2) begin
          failures++;
          $display("key %0d step %h ideal %f", k, step, ideal);
        end
      end
    end
    key = 5'd1;  #1; checks++; if (step != 32'h0001_0000) failures++;
    key = 5'd13; #1; checks++; if (step != 32'h0002_0000) failures++;
    key = 5'd25; #1; checks++; if (step != 32'h0004_0000) failures++;
    // Semitone against the tabled value 1.059463 * 2^16
    key = 5'd2;  #1; checks++; if (step != 32'h0001_0F39) failures++;
    // Key 16 against a position step observed on hardware, 0x260DF
    key = 5'd16; #1; checks++;
    if (int'(step) - int'(32'h0002_60DF) > 1 || int'(32'h0002_60DF) - int'(step) > 1) begin
      failures++; $display("key 16 step %h", step);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
