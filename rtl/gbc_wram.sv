// Work RAM: 32 KB held as one contiguous array of eight 4 KB banks. The memory
// decoder builds the address as {bank, offset}: bank 0 for C000-CFFF and the SVBK bank
// (1-7) for D000-DFFF, so bank switching needs no logic here.
//
// One synchronous read/write port, shared by the CPU and the two DMA engines through the
// memory arbiter: read data appears one cycle after the strobe; writes take effect at
// the clock edge. The contiguous-banks layout is the document's; the latency is this
// design's.
module gbc_wram #(
  parameter int AW = 15  // 8 banks x 4 KB
) (
  input  logic          clk,
  input  logic          en,     // access strobe
  input  logic          we,     // write
  input  logic [AW-1:0] addr,   // {bank, offset}
  input  logic [7:0]    wdata,  // write data
  output logic [7:0]    rdata   // read data, one cycle after en
);
  logic [7:0] mem [2**AW];

  always_ff @(posedge clk)
    if (en) begin
      if (we) mem[addr] <= wdata;
      rdata <= mem[addr];
    end
endmodule
