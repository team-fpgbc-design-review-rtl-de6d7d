// Tile pixel unit: the step shared by the background and sprite paths. Given a tile
// (character) code, its attribute byte and the position of a dot inside the tile, it
// reads the tile's row from VRAM and returns the dot's 2-bit colour number.
//
// A tile row is two bytes: the first holds bit 0 of each dot's colour, the second bit 1,
// with the leftmost dot in bit 7. The row is (yflip ? last - row : row), the bit is
// (xflip ? col : 7 - col). For 8x16 objects (tall) the row runs 0-15 and the tile pair
// is {code[7:1], row[3]}. Tile data lives in 8000-8FFF with unsigned codes (sel8000 = 1)
// or at 9000 with signed codes, i.e. 8800-97FF (sel8000 = 0); the bank comes from the
// attribute's bank bit.
// Timing: start with the inputs valid; the low byte's address is presented in the next
// cycle, the high byte's in the one after; done is high in the third cycle, together
// with dot, and the inputs may change after start. A new start is taken in the done
// cycle, so lookups can run back to back. The VRAM port has one cycle of
// read latency.
// Tile format, flips and addressing are the document's; the sequencing is this design's.
module gbc_tile_pixel
  import gbc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,      // begin a lookup
  input  logic [7:0]  code,       // tile code
  input  attr_t       attr,       // attributes (flips, bank)
  input  logic        sel8000,    // 1: unsigned codes from 8000, 0: signed from 9000
  input  logic        tall,       // 8x16 object
  input  logic [3:0]  row,        // row inside the object, before flipping
  input  logic [2:0]  col,        // column inside the tile, before flipping
  output logic [13:0] vram_addr,  // {bank, offset} to the VRAM read port
  input  logic [7:0]  vram_data,  // one cycle after vram_addr
  output logic        busy,       // a lookup is in progress
  output logic        done,       // dot is valid
  output logic [1:0]  dot         // colour number 0-3
);
  typedef enum logic [1:0] {IDLE, LO, HI, FIN} st_e;
  st_e         st;
  logic [12:0] base;   // offset of the row's low byte
  logic        bank;
  logic [2:0]  bit_i;
  logic [7:0]  lo;

  assign busy = (st != IDLE);
  assign done = (st == FIN);
  assign vram_addr = {bank, base[12:1], st == HI};
  assign dot = {vram_data[bit_i], lo[bit_i]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE;  base <= '0;  bank <= 1'b0;  bit_i <= '0;  lo <= '0;
    end else begin
      unique case (st)
        IDLE, FIN: if (start) begin
          logic [3:0] fr;
          logic [7:0] t;
          fr = attr.yflip ? ((tall ? 4'd15 : 4'd7) - row) : row;
          if (!tall) fr[3] = 1'b0;
          t  = tall ? {code[7:1], fr[3]} : code;
          base  <= sel8000 ? {1'b0, t, fr[2:0], 1'b0} : {~t[7], t[7], t[6:0], fr[2:0], 1'b0};
          bank  <= attr.bank;
          bit_i <= attr.xflip ? col : 3'd7 - col;
          st    <= LO;
        end else st <= IDLE;
        LO:  st <= HI;
        HI:  begin lo <= vram_data; st <= FIN; end
        default: ;
      endcase
    end
  end
endmodule
