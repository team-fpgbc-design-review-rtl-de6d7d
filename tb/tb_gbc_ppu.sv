// Testbench for the pixel unit. Behavioural VRAM (one cycle read latency), OAM and
// palettes (a palette lookup returns a colour that encodes palette, colour number and
// layer). Random tile data, maps, attributes and sprites; for several LCDC settings and
// scroll values it selects the sprites of each tested screen row, swaps them in, asks
// for every dot of the row and compares the colour with a reference written from the
// document's rules: map entry at (gy+SCY, gx+SCX), tile format and flips, the first 10
// sprites of the row in OAM order, the lowest-index sprite covering the dot, the
// priority table. It also checks the latency (at most 10 clocks) and counts sprite
// shown / sprite hidden by priority / dropped events.
module tb_gbc_ppu;
  import gbc_pkg::*;
  logic clk = 0, rst_n = 0, req = 0, done, scan_start = 0, swap = 0;
  logic [7:0] lcdc = 8'h93, scx = 0, scy = 0, gx = 0, gy = 0, scan_gy = 0, vram_data;
  rgb15_t rgb, bg_rgb, obj_rgb;
  logic [13:0] vram_addr;
  logic [5:0] oam_idx;
  sprite_t oam_spr;
  logic [2:0] bg_pal, obj_pal;
  logic [1:0] bg_dot, obj_dot;
  logic ev_obj_shown, ev_obj_hidden, ev_dropped;
  logic [7:0] vram [16384];
  sprite_t oam [40];
  int checks = 0, failures = 0, n_shown = 0, n_hidden = 0, n_drop = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) vram_data <= vram[vram_addr];
  assign oam_spr = (oam_idx < 40) ? oam[oam_idx] : '0;
  assign bg_rgb  = '{b: 5'd0, g: {3'd0, bg_dot}, r: {2'd0, bg_pal}};
  assign obj_rgb = '{b: 5'd1, g: {3'd0, obj_dot}, r: {2'd0, obj_pal}};
  always @(posedge clk) begin
    if (ev_obj_shown) n_shown++;
    if (ev_obj_hidden) n_hidden++;
    if (ev_dropped) n_drop++;
  end
  gbc_ppu dut (.*);
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  initial begin repeat (2000000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [1:0] tdot(int code, attr_t a, bit s8, bit tl, int row, int col);
    int fr, t, ad, b;
    fr = a.yflip ? ((tl ? 15 : 7) - row) : row;
    t  = tl ? ((code & 'hFE) + fr / 8) : code;
    ad = s8 ? t * 16 : 'h1000 + (t >= 128 ? t - 256 : t) * 16;
    ad = ad + (fr % 8) * 2 + (a.bank ? 'h2000 : 0);
    b  = a.xflip ? col : 7 - col;
    return {vram[ad + 1][b], vram[ad][b]};
  endfunction

  function automatic rgb15_t ref_px(int x, int y);
    int mx, my, mapo, code, h, sel [$], cand;
    attr_t ba;
    logic [1:0] bd, od;
    bit show;
    if (!lcdc[7]) return rgb15_t'(15'h7FFF);
    mx = (x + scx) % 256; my = (y + scy) % 256;
    mapo = (lcdc[3] ? 'h1C00 : 'h1800) + (my / 8) * 32 + mx / 8;
    code = vram[mapo]; ba = attr_t'(vram['h2000 + mapo]);
    bd = tdot(code, ba, lcdc[4], 0, my % 8, mx % 8);
    h = lcdc[2] ? 16 : 8;
    foreach (oam[i]) if (((my + 16 - oam[i].y) & 255) < h && sel.size() < 10) sel.push_back(i);
    cand = -1;
    foreach (sel[j]) if (cand < 0 && ((mx + 8 - oam[sel[j]].x) & 255) < 8) cand = sel[j];
    od = 0;
    if (cand >= 0 && lcdc[1])
      od = tdot(oam[cand].tile, oam[cand].attr, 1, lcdc[2], (my + 16 - oam[cand].y) & 255,
                (mx + 8 - oam[cand].x) & 7);
    // priority table
    if (cand < 0 || !lcdc[1] || od == 0) show = 0;
    else if (bd == 0 || !lcdc[0]) show = 1;
    else if (ba.prio) show = 0;
    else show = !oam[cand].attr.prio;
    if (show) return '{b: 5'd1, g: {3'd0, od}, r: {2'd0, oam[cand].attr.pal}};
    return '{b: 5'd0, g: {3'd0, bd}, r: {2'd0, ba.pal}};
  endfunction

  initial begin
    logic [7:0] cfg [5] = '{8'h93, 8'h83, 8'h97, 8'h92, 8'h03};
    int worst = 0;
    foreach (vram[i]) vram[i] = 8'($urandom);
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (cfg[c]) begin
      lcdc = cfg[c]; scx = 8'($urandom); scy = 8'($urandom);
      foreach (oam[i]) begin
        oam[i] = sprite_t'($urandom);
        oam[i].y = 8'(int'(scy) + 16 + 20 + $urandom % 30);   // crowd rows 20..60
      end
      for (int y = 18; y < 66; y += 3) begin
        int bad, lat;
        @(negedge clk); scan_start = 1; scan_gy = 8'(y);
        @(negedge clk); scan_start = 0;
        repeat (45) @(negedge clk);
        swap = 1; @(negedge clk); swap = 0;
        bad = 0;
        for (int x = 0; x < 160; x++) begin
          rgb15_t e;
          @(negedge clk); req = 1; gx = 8'(x); gy = 8'(y);
          @(negedge clk); req = 0; lat = 1;
          while (!done && lat < 30) begin @(negedge clk); lat++; end
          if (lat > worst) worst = lat;
          e = ref_px(x, y);
          if (rgb != e) begin
            bad++;
            if (bad < 3) $display("row %0d col %0d lcdc %h got %h exp %h", y, x, lcdc, rgb, e);
          end
        end
        chk(bad == 0, $sformatf("lcdc %h row %0d: %0d dots wrong", lcdc, y, bad));
      end
    end
    chk(worst <= 10, $sformatf("latency %0d clocks", worst));
    chk(n_shown > 0, "sprites shown");
    chk(n_hidden > 0, "sprites hidden by priority");
    chk(n_drop > 0, "10-sprite limit reached");
    $display("latency %0d, shown %0d, hidden %0d, dropped %0d", worst, n_shown, n_hidden, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
