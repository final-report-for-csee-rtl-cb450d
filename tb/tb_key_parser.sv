// tb_key_parser: random Avalon writes to random and to the key address;
// the three note fields must change only on a selected write to 0x8000 and
// must equal bits [4:0], [9:5], [14:10] of the written word.
module tb_key_parser;
  import audio_pkg::*;
  logic clk = 0, reset = 1, chipselect = 0, write = 0;
  logic [15:0] address = 0, writedata = 0;
  key_t keys [NUM_VOICES];
  key_t exp_keys [NUM_VOICES];
  int checks = 0, failures = 0;

  key_parser dut (.clk, .reset, .chipselect, .write, .address, .writedata, .keys);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < NUM_VOICES; v++) exp_keys[v] = '0;
    repeat (3) @(posedge clk);
    reset <= 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      chipselect = ($urandom_range(3) != 0);
      write      = ($urandom_range(1) != 0);
      address    = ($urandom_range(1) != 0) ? ADDR_KEYS : 16'($urandom);
      writedata  = 16'($urandom);
      if (chipselect && write && address == 16'h8000) begin
        exp_keys[0] = writedata[4:0];
        exp_keys[1] = writedata[9:5];
        exp_keys[2] = writedata[14:10];
      end
      @(negedge clk);
      chipselect = 0; write = 0;
      for (int v = 0; v < NUM_VOICES; v++) begin
        checks++;
        if (keys[v] !== exp_keys[v]) begin
          failures++;
          if (failures < 10) $display("voice %0d got %0d exp %0d", v, keys[v], exp_keys[v]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
