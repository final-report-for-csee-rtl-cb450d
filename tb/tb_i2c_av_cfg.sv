// tb_i2c_av_cfg: plays the bus master's side of the handshake with a
// random busy time and a refused transfer every few attempts. Checks that
// the sequencer sends the ten codec register words of the WM8731 set-up in
// order (0x001A 0x021A 0x0479 0x0679 0x0810 0x0A06 0x0C00 0x0E42 0x1000
// 0x1201), each prefixed with bus address 0x34, that a refused word is sent
// again, and that config_done rises after the tenth and nothing more is sent.
module tb_i2c_av_cfg;
  logic clk = 0, reset = 1;
  logic start, busy = 0, done = 0, nack = 0, config_done;
  logic [23:0] data;
  logic [3:0] index;
  int checks = 0, failures = 0, retries = 0, accepted = 0;
  logic [15:0] expected [10] = '{16'h001A, 16'h021A, 16'h0479, 16'h0679, 16'h0810,
                                 16'h0A06, 16'h0C00, 16'h0E42, 16'h1000, 16'h1201};

  i2c_av_cfg dut (.clk, .reset, .start, .data, .busy, .done, .nack, .index, .config_done);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic refuse;
    logic [23:0] got;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    while (accepted < 10) begin
      @(posedge clk iff start);
      got = data;
      refuse = ($urandom_range(2) == 0);
      @(negedge clk) busy = 1;
      repeat ($urandom_range(20, 2)) @(negedge clk);
      busy = 0; done = 1; nack = refuse;
      @(negedge clk) done = 0; nack = 0;
      checks++;
      if (got !== {8'h34, expected[accepted]}) begin
        failures++; $display("word %0d got %h", accepted, got);
      end
      if (refuse) retries++; else accepted++;
    end
    repeat (50) @(negedge clk) begin
      checks++;
      if (start) begin failures++; $display("start after the programme"); end
    end
    checks++;
    if (!config_done) begin failures++; $display("config_done low"); end
    if (retries == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
