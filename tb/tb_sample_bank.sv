// tb_sample_bank: fills a 256-word table through the host port, then reads
// it back through the host port and through all three voice ports at
// random addresses, with host reads interleaved. Checks one-clock read
// latency, that every copy holds the written data, and that voice 0 keeps
// its last value in the clock after a host read borrows its port.
module tb_sample_bank;
  localparam int DEPTH = 256, W = 16, NB = 3, AW = $clog2(DEPTH);
  logic clk = 0;
  logic wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = 0, rd_addr = 0;
  logic [W-1:0]  wr_data = 0, rd_data;
  logic [AW-1:0] voice_addr [NB];
  logic [W-1:0]  voice_data [NB];
  logic [W-1:0]  ref_mem [DEPTH];
  logic [W-1:0]  exp_voice [NB];
  int checks = 0, failures = 0, host_steals = 0;

  sample_bank #(.DEPTH(DEPTH), .WIDTH(W), .NUM_BANKS(NB)) dut (
    .clk, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data,
    .voice_addr, .voice_data
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic stole;
    logic [AW-1:0] ra;
    for (int b = 0; b < NB; b++) voice_addr[b] = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(i); wr_data = W'($urandom); ref_mem[i] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    @(negedge clk);
    for (int b = 0; b < NB; b++) exp_voice[b] = ref_mem[0];
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int b = 0; b < NB; b++) voice_addr[b] = AW'($urandom);
      stole = ($urandom_range(3) == 0);
      rd_en = stole;
      ra    = AW'($urandom);
      rd_addr = ra;
      @(negedge clk);
      // one clock after the address: data must be there
      if (stole) begin
        host_steals++;
        checks++;
        if (rd_data !== ref_mem[ra]) begin failures++; $display("host rd %0d", ra); end
        checks++;
        if (voice_data[0] !== exp_voice[0]) begin failures++; $display("voice0 not held"); end
      end
      for (int b = (stole ? 1 : 0); b < NB; b++) begin
        checks++;
        if (voice_data[b] !== ref_mem[voice_addr[b]]) begin
          failures++;
          if (failures < 10) $display("voice %0d addr %0d got %h exp %h", b, voice_addr[b], voice_data[b], ref_mem[voice_addr[b]]);
        end
      end
      rd_en = 0;
      // the voice port re-reads voice 0's address on the next clock
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (voice_data[b] !== ref_mem[voice_addr[b]]) failures++;
        exp_voice[b] = ref_mem[voice_addr[b]];
      end
    end
    if (host_steals == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
