// Video RAM: 16 KB held as one contiguous array of two 8 KB banks. The bank bit (VBK)
// is the top address bit, so bank switching costs no extra logic here.
//
// Port A is read/write and is shared, through the memory arbiter, by the CPU, the
// general-purpose VRAM DMA and the OAM DMA. Port B is read-only and belongs to the
// pixel pipeline alone, so the picture can be drawn while the CPU works.
// Both ports read synchronously: the data for an address presented in one cycle is
// available after the next clock edge. A write takes effect at the clock edge.
// The two-port split is the document's; the one-cycle read latency is this design's.
module gbc_vram #(
  parameter int AW = 14  // 2 banks x 8 KB
) (
  input  logic          clk,
  input  logic          a_en,     // port A access strobe
  input  logic          a_we,     // port A write
  input  logic [AW-1:0] a_addr,   // {bank, offset}
  input  logic [7:0]    a_wdata,  // port A write data
  output logic [7:0]    a_rdata,  // port A read data, one cycle after a_en
  input  logic [AW-1:0] b_addr,   // PPU read address {bank, offset}
  output logic [7:0]    b_rdata   // PPU read data, one cycle later
);
  logic [7:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
    b_rdata <= mem[b_addr];
  end
endmodule
