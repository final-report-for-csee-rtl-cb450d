// wm8731_model: behavioural model of the WM8731 audio codec for testbenches
// (not synthesizable logic; the real part is an analogue/mixed-signal chip).
//
// It covers the two digital interfaces the sampler uses:
//  * Digital audio, codec as master in I2S mode: bclk = mclk / 4 and
//    daclrck toggles every 32 bclk periods (64 bit clocks per frame, so
//    48 kHz from 12.288 MHz). dacdat is sampled on bclk rising edges; bit 1
//    of each slot is the I2S delay bit, bits 2..17 the 16-bit sample. Each
//    finished left slot bumps left_count and leaves its word in left_word
//    (right likewise); delay_bit_errors counts delay bits that were not 0.
//  * Two-wire control port: detects START/STOP, shifts in bytes on SCL
//    rising edges and acknowledges each byte by pulling SDA low, except that
//    the first NACK_FIRST transfers are answered with no acknowledge on
//    their address byte (the rest of a refused transfer is ignored). Completed 3-byte writes to address 0x34 are logged
//    in reg_log[] (the 16-bit register word) and counted in reg_count.
module wm8731_model #(
  parameter int NACK_FIRST = 1
) (
  input  logic        mclk,
  output logic        bclk,
  output logic        daclrck,
  input  logic        dacdat,
  input  logic        scl,
  input  logic        sda,        // resolved bus line
  output logic        sda_pull,   // 1: codec pulls SDA low
  output logic [15:0] left_word,
  output logic [15:0] right_word,
  output int          left_count,
  output int          right_count,
  output int          delay_bit_errors
);
  // ---- audio clocks -----------------------------------------------------
  int mdiv = 0, bdiv = 0;
  initial begin
    bclk = 0; daclrck = 0; left_count = 0; right_count = 0; delay_bit_errors = 0;
    left_word = 0; right_word = 0;
  end
  always @(posedge mclk) begin
    mdiv <= (mdiv + 1) % 2;
    if (mdiv == 1) begin
      bclk <= ~bclk;
      if (bclk) begin           // falling edge of bclk
        if (bdiv == 31) begin daclrck <= ~daclrck; bdiv <= 0; end
        else bdiv <= bdiv + 1;
      end
    end
  end

  // ---- I2S receiver -----------------------------------------------------
  int   bitpos = 0;
  logic lr_seen = 0;
  logic [15:0] shift = 0;
  always @(posedge bclk) begin
    if (daclrck != lr_seen) begin
      // slot changed: the previous slot is complete
      if (lr_seen) begin right_word <= shift; right_count <= right_count + 1; end
      else         begin left_word  <= shift; left_count  <= left_count + 1; end
      lr_seen = daclrck;
      bitpos  = 1;
    end else begin
      bitpos++;
    end
    if (bitpos == 1 && dacdat) delay_bit_errors <= delay_bit_errors + 1;
    if (bitpos >= 2 && bitpos <= 17) shift <= {shift[14:0], dacdat};
  end

  // ---- two-wire slave ---------------------------------------------------
  logic [15:0] reg_log [64];
  int   reg_count = 0;
  int   nacks_sent = 0;
  int   transfers = 0;
  logic active = 0;
  logic refused = 0;
  int   nbits = 0, nbytes = 0;
  logic [7:0] cur = 0;
  logic [7:0] bytes [3];
  logic prev_sda = 1;
  initial sda_pull = 0;

  always @(sda) begin
    if (scl && prev_sda && !sda) begin        // START
      active = 1; nbits = 0; nbytes = 0; sda_pull = 0; refused = 0;
    end else if (scl && !prev_sda && sda && active) begin  // STOP
      if (nbytes == 3 && bytes[0] == 8'h34 && !refused) begin
        reg_log[reg_count % 64] = {bytes[1], bytes[2]};
        reg_count++;
      end
      active = 0;
      transfers++;
    end
    prev_sda = sda;
  end

  always @(posedge scl) if (active) begin
    if (nbits < 8) begin
      cur = {cur[6:0], sda};
      nbits++;
    end else begin
      nbits = 0;          // acknowledge clock
    end
  end

  always @(negedge scl) if (active) begin
    if (nbits == 8 && !sda_pull) begin
      // drive the acknowledge for the byte just received
      bytes[nbytes % 3] = cur;
      nbytes++;
      if (nbytes == 1 && transfers < NACK_FIRST) begin
        sda_pull = 0; nacks_sent++; refused = 1;
      end else begin
        sda_pull = 1;
      end
    end else if (nbits == 0 && sda_pull) begin
      sda_pull = 0;       // release after the acknowledge clock
    end
  end
endmodule
