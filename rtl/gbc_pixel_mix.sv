// Pixel priority: decides whether a dot shows the background or the candidate sprite.
//
// A colour number of 0 is transparent: if the sprite's is 0 (or there is no sprite, or
// sprites are disabled) the background shows; otherwise if the background's is 0 the
// sprite shows. With both opaque the background wins when its attribute's priority bit
// is set ("highest priority to BG"), else the sprite's own priority bit decides (0:
// sprite, 1: background). When LCDC bit 0 is clear the background loses every
// priority and an opaque sprite always shows.
// Purely combinational. The priority table and transparency rule are the document's;
// the LCDC bit 0 behaviour follows the published colour-mode convention.
module gbc_pixel_mix (
  input  logic       bg_master,  // LCDC bit 0
  input  logic       obj_en,     // LCDC bit 1
  input  logic [1:0] bg_dot,     // background colour number
  input  logic       bg_prio,    // background attribute bit 7
  input  logic       obj_hit,    // a sprite covers this dot
  input  logic [1:0] obj_dot,    // its colour number
  input  logic       obj_prio,   // its attribute bit 7
  output logic       show_obj    // 1: sprite colour, 0: background colour
);
  always_comb begin
    if (!obj_en || !obj_hit || obj_dot == 2'd0) show_obj = 1'b0;
    else if (!bg_master || bg_dot == 2'd0)     show_obj = 1'b1;
    else if (bg_prio)                          show_obj = 1'b0;
    else                                       show_obj = !obj_prio;
  end
endmodule
