// Behavioural cartridge for testbenches: ROM contents are a function of bank and
// offset (rom_byte), a write to 2000-3FFF selects the bank seen at 4000-7FFF (0 acts as
// 1, as in MBC-type controllers), and 8 KB of RAM answers at A000-BFFF when CS is low.
// Reads are combinational while RD is low; writes take effect on the rising edge of WR.
module tb_cart_model (
  input  logic [15:0] a,      // address pins
  input  logic [7:0]  d_in,   // data driven by the reader
  output logic [7:0]  d_out,  // data driven by the cartridge
  input  logic        rd_n,
  input  logic        wr_n,
  input  logic        cs_n
);
  logic [6:0] bank = 7'd1;
  logic [7:0] ram [8192];
  int cs_seen = 0;
  function automatic logic [7:0] rom_byte(int b, logic [15:0] off);
    return 8'(off[7:0] ^ 8'(off[13:8]) ^ 8'(b * 29 + 5));
  endfunction
  always @(negedge cs_n) cs_seen++;
  always @(posedge wr_n) begin
    if (a >= 16'h2000 && a < 16'h4000) bank = (d_in[6:0] == 0) ? 7'd1 : d_in[6:0];
    if (!cs_n && a >= 16'hA000 && a < 16'hC000) ram[a[12:0]] = d_in;
  end
  always_comb begin
    d_out = 8'hFF;
    if (!rd_n) begin
      if (a < 16'h4000) d_out = rom_byte(0, a);
      else if (a < 16'h8000) d_out = rom_byte(int'(bank), {2'b00, a[13:0]});
      else if (!cs_n && a >= 16'hA000 && a < 16'hC000) d_out = ram[a[12:0]];
    end
  end
endmodule
