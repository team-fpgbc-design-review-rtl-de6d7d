// Sprite selector: keeps the (at most) 10 sprites of the current scanline and finds the
// candidate sprite for each dot.
//
// Two buffers of MAX_PER_LINE entries. On scan_start the 40 OAM entries are examined in
// order for the map row scan_row, one per clock in a two-stage pipeline (stage 1 reads
// the entry, stage 2 tests whether its rows cover scan_row and appends it to the
// "next" buffer); entries beyond the tenth are dropped and counted by a pulse on
// dropped. On swap (the horizontal blank) the "next" buffer becomes the "current" one
// and "next" is cleared. The buffers keep OAM order, so for a query column mx the
// first current entry whose eight columns cover mx is the lowest-index sprite there:
// that one is the candidate (hit, spr), found combinationally.
// A sprite with bytes (y, x) covers map rows y-16 .. y-16+h-1 (h = 8 or 16) and map
// columns x-8 .. x-1, all modulo 256: positions are in background-map coordinates,
// so sprites move with the scroll registers.
// The 40/10 limits, the two buffers, the swap at horizontal blank and the lowest-index
// rule are the document's; the one-entry-per-clock scan is this design's.
module gbc_sprite_select
  import gbc_pkg::*;
#(
  parameter int NUM_SPRITES  = 40,
  parameter int MAX_PER_LINE = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scan_start,  // begin scanning OAM for scan_row
  input  logic [7:0] scan_row,    // map row of the next scanline
  input  logic       tall,        // LCDC bit 2: 8x16 sprites
  input  logic       swap,        // next buffer becomes current
  output logic [5:0] oam_idx,     // OAM entry being read
  input  sprite_t    oam_spr,     // its bytes
  output logic       scanning,    // scan in progress
  output logic       dropped,     // a covering sprite beyond the limit was skipped
  input  logic [7:0] mx,          // map column of the current dot
  output logic       hit,         // a current sprite covers mx
  output sprite_t    spr          // the lowest-index such sprite
);
  localparam int CW = $clog2(MAX_PER_LINE + 1);
  sprite_t       cur [MAX_PER_LINE];
  sprite_t       nxt [MAX_PER_LINE];
  logic [CW-1:0] cur_n, nxt_n;
  logic [7:0]    row_q;
  logic          s1_v;
  sprite_t       s1;
  logic [5:0]    idx;

  assign oam_idx  = idx;
  assign scanning = (idx < 6'(NUM_SPRITES)) || s1_v;

  logic [7:0] dy;
  logic       covers;
  assign dy     = row_q + 8'd16 - s1.y;
  assign covers = tall ? (dy < 8'd16) : (dy < 8'd8);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= 6'(NUM_SPRITES);  s1_v <= 1'b0;  s1 <= '0;  row_q <= '0;
      cur_n <= '0;  nxt_n <= '0;  dropped <= 1'b0;
    end else begin
      dropped <= 1'b0;
      // stage 1: read an entry
      s1_v <= (idx < 6'(NUM_SPRITES));
      s1   <= oam_spr;
      if (idx < 6'(NUM_SPRITES)) idx <= idx + 6'd1;
      if (scan_start) begin
        idx <= '0;  row_q <= scan_row;  nxt_n <= '0;  s1_v <= 1'b0;
      end
      // stage 2: test and append
      if (s1_v && covers && !scan_start) begin
        if (nxt_n < CW'(MAX_PER_LINE)) begin
          nxt[nxt_n] <= s1;
          nxt_n <= nxt_n + 1'b1;
        end else dropped <= 1'b1;
      end
      if (swap) begin
        cur   <= nxt;
        cur_n <= nxt_n;
        nxt_n <= '0;
      end
    end
  end

  always_comb begin
    hit = 1'b0;
    spr = '0;
    for (int i = MAX_PER_LINE - 1; i >= 0; i--) begin
      logic [7:0] dx;
      dx = mx + 8'd8 - cur[i].x;
      if (CW'(i) < cur_n && dx < 8'd8) begin
        hit = 1'b1;
        spr = cur[i];
      end
    end
  end
endmodule
