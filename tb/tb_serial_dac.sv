// tb_serial_dac: the codec model acts as I2S master (bclk = mclk/4, 64 bit
// clocks per frame). The testbench presents a new random sample after every
// frame tick and checks that the codec decodes exactly that sample in the
// following left and right slots, that the I2S delay bit is 0, and that
// there is exactly one frame tick per frame (64 bit clocks).
module tb_serial_dac;
  import audio_pkg::*;
  logic clk = 0, reset = 1, mclk = 0;
  logic bclk, daclrck, dacdat, frame_tick;
  sample_t sample = 0;
  logic [15:0] left_word, right_word;
  int left_count, right_count, delay_bit_errors;
  int checks = 0, failures = 0, ticks = 0;
  sample_t sent [$];

  serial_dac dut (.clk, .reset, .bclk, .daclrck, .sample, .dacdat, .frame_tick);

  wm8731_model #(.NACK_FIRST(0)) codec (
    .mclk, .bclk, .daclrck, .dacdat, .scl(1'b1), .sda(1'b1), .sda_pull(),
    .left_word, .right_word, .left_count, .right_count, .delay_bit_errors
  );

  always #10 clk  = ~clk;     // 50 MHz
  always #40 mclk = ~mclk;    // 12.5 MHz

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // New sample after each tick; remember what was latched at each tick.
  always @(posedge clk) if (frame_tick) begin
    ticks++;
    sent.push_back(sample);
    sample <= sample_t'($urandom);
  end

  int lc_seen = 0;
  int rc_seen = 0;
  logic [15:0] exp_l;
  initial begin
    int bclk_edges;
    repeat (5) @(posedge clk);
    reset = 0;
    // discard the first (partial) frame
    wait (left_count >= 2);
    lc_seen = left_count;
    rc_seen = right_count;
    void'(sent.pop_front());
    for (int f = 0; f < 200; f++) begin
      wait (left_count > lc_seen);
      lc_seen = left_count;
      exp_l = sent.pop_front();
      checks++;
      if (left_word !== exp_l) begin
        failures++;
        if (failures < 10) $display("frame %0d left %h exp %h", f, left_word, exp_l);
      end
      rc_seen = right_count;
      wait (right_count > rc_seen);
      rc_seen = right_count;
      checks++;
      if (right_word !== exp_l) begin failures++; $display("right %h exp %h", right_word, exp_l); end
    end
    // one tick per 64 bit clocks
    @(posedge clk iff frame_tick);
    bclk_edges = 0;
    fork
      begin forever @(posedge bclk) bclk_edges++; end
      begin @(posedge clk); @(posedge clk iff frame_tick); end
    join_any
    disable fork;
    checks++;
    if (bclk_edges != 64) begin failures++; $display("bclk per frame %0d", bclk_edges); end
    checks++;
    if (delay_bit_errors != 0) begin failures++; $display("delay bit errors %0d", delay_bit_errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
