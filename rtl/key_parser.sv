// key_parser: the "note receiver" register.
//
// The host packs the three currently held notes into one 16-bit word,
// bits [4:0] voice 1, [9:5] voice 2, [14:10] voice 3 (bit 15 unused), and
// writes it to word address 0x8000 of the Avalon-MM agent. This block
// decodes that address and holds the three note numbers until the next
// write. A note number of 0 means the voice has no key.
//
// Timing: the keys change on the clock edge on which chipselect and write are
// both high with address 0x8000. Reset (synchronous, active high) clears all
// three keys; the published design does not reset them.
module key_parser
  import audio_pkg::*;
(
  input  logic         clk,
  input  logic         reset,
  input  logic         chipselect,
  input  logic         write,
  input  logic [15:0]  address,
  input  logic [15:0]  writedata,
  output key_t         keys [NUM_VOICES]
);
  always_ff @(posedge clk) begin
    if (reset) begin
      for (int v = 0; v < NUM_VOICES; v++) keys[v] <= '0;
    end else if (chipselect && write && address == ADDR_KEYS) begin
      for (int v = 0; v < NUM_VOICES; v++) keys[v] <= writedata[5*v +: 5];
    end
  end
endmodule
