// tb_mclk_div: the codec master clock must have a period of exactly four
// system clocks and be high for two of them.
module tb_mclk_div;
  logic clk = 0, reset = 1, aud_xclk;
  int checks = 0, failures = 0;

  mclk_div dut (.clk, .reset, .aud_xclk);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic seq [$];
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    repeat (504) begin @(negedge clk); seq.push_back(aud_xclk); end
    // period 4, two clocks high and two low
    for (int i = 0; i < 500; i++) begin
      checks++;
      if (seq[i] == seq[i+2] || seq[i] != seq[i+4]) begin
        failures++;
        if (failures < 10) $display("bad pattern at %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
