// sample_bank: three identical copies of the sample table in block RAM.
//
// Every voice must read the recording at its own address on every frame,
// and a block RAM offers at most two ports, so the table is stored once per
// voice (NUM_BANKS copies of DEPTH x WIDTH). A host write through the
// Avalon-MM agent updates the same word in all copies at once. Each copy has
// one read port owned by its voice. Host read-back is served by copy 0:
// in a cycle with a host read, copy 0's port takes the host address and
// voice 0's output keeps its previous value (voice data is re-read on every
// clock, so it recovers on the next one). Sharing copy 0 this way is this
// design's choice; the published design reads copy 0 for the host without
// saying how the port is shared.
//
// Interface: wr_en/wr_addr/wr_data write all copies; rd_en/rd_addr read
// copy 0 to rd_data; voice_addr[v] reads copy v to voice_data[v].
// Timing: synchronous RAM, one clock from address to data on every port.
module sample_bank #(
  parameter int unsigned DEPTH     = 32768,
  parameter int unsigned WIDTH     = 16,
  parameter int unsigned NUM_BANKS = 3,
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    wr_en,
  input  logic [AW-1:0]           wr_addr,
  input  logic [WIDTH-1:0]        wr_data,
  input  logic                    rd_en,
  input  logic [AW-1:0]           rd_addr,
  output logic [WIDTH-1:0]        rd_data,
  input  logic [AW-1:0]           voice_addr [NUM_BANKS],
  output logic [WIDTH-1:0]        voice_data [NUM_BANKS]
);
  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    logic [WIDTH-1:0] mem [DEPTH];
    logic [AW-1:0]    raddr;
    logic             host_rd;
    logic [WIDTH-1:0] q;

    assign host_rd = (b == 0) && rd_en;
    assign raddr   = host_rd ? rd_addr : voice_addr[b];

    always_ff @(posedge clk) begin
      if (wr_en) mem[wr_addr] <= wr_data;
      q <= mem[raddr];
    end

    // Port result is steered to the host or to the voice one clock later.
    logic host_rd_q;
    always_ff @(posedge clk) host_rd_q <= host_rd;

    logic [WIDTH-1:0] voice_q;
    always_ff @(posedge clk) begin
      if (!host_rd_q) voice_q <= q;
    end
    // voice_q is one clock behind q; expose q directly when the port was the
    // voice's, else the held copy.
    assign voice_data[b] = host_rd_q ? voice_q : q;
    if (b == 0) begin : g_host
      assign rd_data = q;
    end
  end
endmodule
