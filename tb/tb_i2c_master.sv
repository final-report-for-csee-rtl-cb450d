// tb_i2c_master: sends random 24-bit transfers (and the codec's own
// register writes) to the codec model over a wired-AND bus. Checks that each
// acknowledged transfer arrives as {0x34, data}, that nack is 0 then, that a
// transfer the model refuses reports nack = 1, that done pulses once per
// transfer, and the duration of a transfer: 1 start, 27 bit periods of four
// steps and a 4-step stop, 2 + 108 + 4 steps of 2*(CLK_FREQ/I2C_FREQ+1)
// clocks.
module tb_i2c_master;
  localparam int CLK_FREQ = 40, I2C_FREQ = 10;      // 10 clocks per step
  localparam int STEP = 2 * (CLK_FREQ / I2C_FREQ + 1);
  logic clk = 0, reset = 1, start = 0;
  logic [23:0] data = 0;
  logic busy, done, nack, scl, sda_o, sda_oe, sda_pull, sda_line;
  int checks = 0, failures = 0, nacks_seen = 0;

  i2c_master #(.CLK_FREQ(CLK_FREQ), .I2C_FREQ(I2C_FREQ)) dut (
    .clk, .reset, .start, .data, .busy, .done, .nack, .scl, .sda_o, .sda_oe,
    .sda_i(sda_line)
  );

  assign sda_line = (sda_oe ? sda_o : 1'b1) & !sda_pull;

  wm8731_model #(.NACK_FIRST(1)) codec (
    .mclk(1'b0), .bclk(), .daclrck(), .dacdat(1'b0), .scl, .sda(sda_line), .sda_pull,
    .left_word(), .right_word(), .left_count(), .right_count(), .delay_bit_errors()
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1, n_before;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      data  = {8'h34, 16'($urandom)};
      start = 1;
      t0 = $time;
      n_before = codec.reg_count;
      @(negedge clk) start = 0;
      @(posedge clk iff done);
      t1 = $time;
      @(negedge clk);
      checks++;
      if (i == 0) begin
        if (nack) nacks_seen++; else begin failures++; $display("nack not reported"); end
      end else begin
        if (nack || codec.reg_count != n_before + 1 ||
            codec.reg_log[(codec.reg_count - 1) % 64] != data[15:0]) begin
          failures++;
          $display("xfer %0d nack %b logged %h exp %h", i, nack,
                   codec.reg_log[(codec.reg_count - 1) % 64], data[15:0]);
        end
      end
      checks++;
      if ((t1 - t0) / 10 < 114 * STEP || (t1 - t0) / 10 > 114 * STEP + 3) begin
        failures++; $display("transfer took %0d clocks, exp about %0d", (t1 - t0) / 10, 114 * STEP);
      end
      checks++;
      if (busy) begin failures++; $display("busy after done"); end
    end
    if (nacks_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
