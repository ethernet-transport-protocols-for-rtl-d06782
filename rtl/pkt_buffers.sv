// pkt_buffers - the packet buffer memory: NBUF buffers of PKT_WORDS 64-bit
// words, one buffer per packet in flight.
//
// A simple dual-port RAM. The descriptor manager writes user data through the
// write port; the packet sender reads through the read port, whose data
// appears one clock after the address (a block-RAM style registered read).
// The address is {buffer number, word number}. With the defaults, 32 buffers
// of 1024 words, it holds 256 KiB. Buffer count and packet size follow the
// protocol description; the one-cycle read latency is a design choice.
module pkt_buffers #(
  parameter int NBUF      = 32,
  parameter int PKT_WORDS = 1024,
  localparam int AW       = $clog2(NBUF) + $clog2(PKT_WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [63:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [63:0]   rdata
);
  logic [63:0] mem [NBUF*PKT_WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
