// Pixel processing unit, framebuffer-less: every screen dot's colour is computed on
// demand from VRAM, OAM and the palettes, just before it is shown.
//
// For a request (gx, gy) on the 160x144 screen the unit forms the background-map
// position (mx, my) = (gx + SCX, gy + SCY) mod 256 and then, sequentially over its one
// VRAM read port:
//   1. reads the map entry's tile code (bank 0) and attribute byte (bank 1) from the map
//      chosen by LCDC bit 3 (9800 or 9C00), index (my/8)*32 + mx/8;
//   2. runs the tile pixel unit on that tile (data area per LCDC bit 4) for the
//      background colour number;
//   3. takes the candidate sprite from the sprite selector and, if there is one and
//      sprites are on, runs the same tile pixel unit on the sprite's tile (always 8000
//      area, 8x16 per LCDC bit 2);
//   4. resolves the priority and looks the chosen colour up in its palette.
// done comes 10 clocks after req (7 without a sprite), with the 15-bit colour. With LCDC
// bit 7 clear the colour is white. The sprite selector is driven from outside through
// scan_start/scan_gy (sprites for the next line) and swap (horizontal blank).
// The lookup chain, the shared tile unit and the sequential reads are the document's;
// the exact cycle schedule is this design's.
module gbc_ppu
  import gbc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  lcdc,           // FF40
  input  logic [7:0]  scx,            // FF43
  input  logic [7:0]  scy,            // FF42
  input  logic        req,            // compute a dot
  input  logic [7:0]  gx,             // screen column 0-159
  input  logic [7:0]  gy,             // screen row 0-143
  output logic        done,           // rgb valid
  output rgb15_t      rgb,            // the dot's colour
  input  logic        scan_start,     // select sprites for screen row scan_gy
  input  logic [7:0]  scan_gy,        // next screen row
  input  logic        swap,           // horizontal blank: selected sprites become current
  output logic [13:0] vram_addr,      // VRAM read port {bank, offset}
  input  logic [7:0]  vram_data,      // one cycle later
  output logic [5:0]  oam_idx,        // OAM read port
  input  sprite_t     oam_spr,        // OAM entry
  output logic [2:0]  bg_pal,         // background palette lookup
  output logic [1:0]  bg_dot,
  input  rgb15_t      bg_rgb,
  output logic [2:0]  obj_pal,        // sprite palette lookup
  output logic [1:0]  obj_dot,
  input  rgb15_t      obj_rgb,
  output logic        ev_obj_shown,   // the dot shows a sprite
  output logic        ev_obj_hidden,  // an opaque sprite lost to the background
  output logic        ev_dropped      // an 11th sprite on a line was skipped
);
  typedef enum logic [2:0] {IDLE, MAP0, MAP1, ATR, BG, OBJ, OUT} st_e;
  st_e        st;
  logic [7:0] mx, my, code;
  attr_t      bg_attr;
  logic [1:0] bgd, objd;
  logic       obj_hit_q;
  sprite_t    spr_q;

  // sprite selector
  logic    s_hit;
  sprite_t s_spr;
  gbc_sprite_select u_sel (
    .clk, .rst_n, .scan_start, .scan_row(scan_gy + scy), .tall(lcdc[LCDC_OBJ16]), .swap,
    .oam_idx, .oam_spr, .scanning(), .dropped(ev_dropped), .mx, .hit(s_hit), .spr(s_spr)
  );

  // shared tile pixel unit
  logic        t_start, t_done;
  logic [7:0]  t_code;
  attr_t       t_attr;
  logic        t_sel, t_tall;
  logic [3:0]  t_row;
  logic [2:0]  t_col;
  logic [13:0] t_addr;
  logic [1:0]  t_dot;
  gbc_tile_pixel u_tile (
    .clk, .rst_n, .start(t_start), .code(t_code), .attr(t_attr), .sel8000(t_sel),
    .tall(t_tall), .row(t_row), .col(t_col), .vram_addr(t_addr), .vram_data,
    .busy(), .done(t_done), .dot(t_dot)
  );

  logic [7:0] sdy, sdx;
  assign sdy = my + 8'd16 - s_spr.y;
  assign sdx = mx + 8'd8 - s_spr.x;

  always_comb begin
    t_start = 1'b0;  t_code = code;  t_attr = bg_attr;  t_sel = lcdc[LCDC_TDATA];
    t_tall = 1'b0;  t_row = {1'b0, my[2:0]};  t_col = mx[2:0];
    if (st == ATR) t_start = 1'b1;  // attribute byte arrives now
    if (st == ATR) t_attr = attr_t'(vram_data);
    if (st == BG && t_done && s_hit && lcdc[LCDC_OBJEN]) begin
      t_start = 1'b1;  t_code = s_spr.tile;  t_attr = s_spr.attr;  t_sel = 1'b1;
      t_tall = lcdc[LCDC_OBJ16];  t_row = sdy[3:0];  t_col = sdx[2:0];
    end
  end

  logic [12:0] map_off;
  assign map_off = {lcdc[LCDC_BGMAP] ? 3'b111 : 3'b110, my[7:3], mx[7:3]};  // 1800/1C00 + ...
  always_comb begin
    unique case (st)
      MAP0:    vram_addr = {1'b0, map_off};  // tile code, bank 0
      MAP1:    vram_addr = {1'b1, map_off};  // attributes, bank 1
      default: vram_addr = t_addr;
    endcase
  end

  logic show_obj;
  gbc_pixel_mix u_mix (
    .bg_master(lcdc[LCDC_BGEN]), .obj_en(lcdc[LCDC_OBJEN]), .bg_dot(bgd),
    .bg_prio(bg_attr.prio), .obj_hit(obj_hit_q), .obj_dot(objd), .obj_prio(spr_q.attr.prio),
    .show_obj
  );
  assign bg_pal  = bg_attr.pal;
  assign bg_dot  = bgd;
  assign obj_pal = spr_q.attr.pal;
  assign obj_dot = objd;
  assign done    = (st == OUT);
  assign rgb     = !lcdc[LCDC_ON] ? rgb15_t'(15'h7FFF) : show_obj ? obj_rgb : bg_rgb;
  assign ev_obj_shown  = done && lcdc[LCDC_ON] && show_obj;
  assign ev_obj_hidden = done && lcdc[LCDC_ON] && !show_obj && obj_hit_q && objd != 2'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE;  mx <= '0;  my <= '0;  code <= '0;  bg_attr <= '0;  bgd <= '0;  objd <= '0;
      obj_hit_q <= 1'b0;  spr_q <= '0;
    end else begin
      unique case (st)
        IDLE: if (req) begin
          mx <= gx + scx;  my <= gy + scy;  st <= MAP0;
        end
        MAP0: st <= MAP1;
        MAP1: begin code <= vram_data; st <= ATR; end
        ATR:  begin bg_attr <= attr_t'(vram_data); st <= BG; end
        BG: if (t_done) begin
          bgd <= t_dot;  spr_q <= s_spr;  obj_hit_q <= s_hit && lcdc[LCDC_OBJEN];  objd <= '0;
          st  <= (s_hit && lcdc[LCDC_OBJEN]) ? OBJ : OUT;
        end
        OBJ: if (t_done) begin objd <= t_dot; st <= OUT; end
        default: st <= IDLE;  // OUT
      endcase
    end
  end
endmodule
