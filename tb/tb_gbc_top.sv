// End-to-end testbench of the whole console at its default parameters (100 MHz clock,
// real DMA rates, 640x480 raster, 16.67 ms pad poll). The testbench plays the CPU on the
// bus; a behavioural cartridge (ROM with bank register, RAM) sits on the connector
// pins and a behavioural SNES pad on the pad pins.
//
// The program: copy tile data, a background map and its attributes from cartridge ROM
// into both VRAM banks with the VRAM DMA (CPU stalled meanwhile); fill the BG and OBJ
// palettes with auto-increment; build 40 sprites in WRAM and move them to OAM with the
// OAM DMA (CPU restricted to HRAM meanwhile); scroll the background; switch the
// cartridge ROM bank; take V-Blank, LCD STAT (LY = LYC) and timer interrupts through the
// NMI and substituted jump; read the pad through FF00. Then a whole frame is taken
// from the DVI pins and each of the 160x144 dots is compared with a reference
// computed here from what was written (map, tiles, flips, sprites, 10-per-line limit,
// priorities, palettes). A second frame is checked the same way after switching to the
// other map, signed tile numbers (8800 mode), 8x16 sprites and LCDC bit 0 clear, with
// new scroll values that wrap around the map. Each mechanism is counted and must occur
// at least once.
module tb_gbc_top;
  import gbc_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_req_t cpu_req = '0;
  bus_rsp_t cpu_rsp;
  logic cpu_stall, cpu_ime = 0, cpu_nmi;
  logic [15:0] cart_a;
  logic [7:0] cart_dout, cart_din;
  logic cart_doe, cart_rd_n, cart_wr_n, cart_cs_n;
  logic snes_latch, snes_clk, snes_data;
  logic [11:0] dvi_d;
  logic dvi_xclk, dvi_xclk_n, dvi_de, dvi_h, dvi_v;
  logic [15:0] buttons_n = 16'hFFFF;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  gbc_top dut (.*);
  tb_cart_model cart (.a(cart_a), .d_in(cart_dout), .d_out(cart_din), .rd_n(cart_rd_n),
                      .wr_n(cart_wr_n), .cs_n(cart_cs_n));
  tb_snes_pad pad (.latch(snes_latch), .clk(snes_clk), .buttons_n, .data(snes_data));

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  initial begin repeat (16000000) @(posedge clk); failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_odma_reject = 0, n_nmi = 0, n_shown = 0, n_hidden = 0, n_drop = 0,
      n_late = 0, n_bank = 0, n_hdma = 0, n_odma = 0, n_autoinc = 0, n_pad = 0;
  logic nmi_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (cpu_stall) n_stall++;
    if (cpu_nmi && !nmi_q) n_nmi++;
    nmi_q <= cpu_nmi;
    if (dut.u_ppu.ev_obj_shown) n_shown++;
    if (dut.u_ppu.ev_obj_hidden) n_hidden++;
    if (dut.u_ppu.ev_dropped) n_drop++;
    if (dut.u_disp.late) n_late++;
    if (dut.u_snes.valid) n_pad++;
  end

  // ---------------- CPU bus ----------------
  task automatic cpu(logic w, logic [15:0] a, logic [7:0] d, output logic [7:0] q, output int lat);
    @(negedge clk); cpu_req = '{valid: 1, we: w, addr: a, wdata: d}; lat = 0;
    do begin @(negedge clk); lat++; end while (!cpu_rsp.ack);
    q = cpu_rsp.rdata;
    @(negedge clk); cpu_req = '0;
  endtask
  task automatic wr(logic [15:0] a, logic [7:0] d); logic [7:0] q; int l; cpu(1, a, d, q, l); endtask
  task automatic rd(logic [15:0] a, output logic [7:0] q); int l; cpu(0, a, 0, q, l); endtask

  // ---------------- shadow of what the picture is made of ----------------
  logic [7:0] vram [16384];
  sprite_t    oam [40];
  logic [7:0] bgp [64], obp [64];
  logic [7:0] lcdc_s, scx_s, scy_s;

  function automatic logic [1:0] tdot(int code, attr_t a, bit s8, bit tl, int row, int col);
    int fr, t, ad, b;
    fr = a.yflip ? ((tl ? 15 : 7) - row) : row;
    t  = tl ? ((code & 'hFE) + fr / 8) : code;
    ad = s8 ? t * 16 : 'h1000 + (t >= 128 ? t - 256 : t) * 16;
    ad = ad + (fr % 8) * 2 + (a.bank ? 'h2000 : 0);
    b  = a.xflip ? col : 7 - col;
    return {vram[ad + 1][b], vram[ad][b]};
  endfunction
  function automatic logic [23:0] rgb24(logic [7:0] l, logic [7:0] h);
    logic [4:0] r, g, b;
    r = l[4:0]; g = {h[1:0], l[7:5]}; b = h[6:2];
    return {r, r[4:2], g, g[4:2], b, b[4:2]};
  endfunction
  function automatic logic [23:0] ref_px(int x, int y);
    int mx, my, mapo, code, h, sel [$], cand, pi;
    attr_t ba;
    logic [1:0] bd, od;
    bit show;
    mx = (x + scx_s) % 256; my = (y + scy_s) % 256;
    mapo = (lcdc_s[3] ? 'h1C00 : 'h1800) + (my / 8) * 32 + mx / 8;
    code = vram[mapo]; ba = attr_t'(vram['h2000 + mapo]);
    bd = tdot(code, ba, lcdc_s[4], 0, my % 8, mx % 8);
    h = lcdc_s[2] ? 16 : 8;
    foreach (oam[i]) if (((my + 16 - oam[i].y) & 255) < h && sel.size() < 10) sel.push_back(i);
    cand = -1;
    foreach (sel[j]) if (cand < 0 && ((mx + 8 - oam[sel[j]].x) & 255) < 8) cand = sel[j];
    od = 0;
    if (cand >= 0 && lcdc_s[1])
      od = tdot(oam[cand].tile, oam[cand].attr, 1, lcdc_s[2], (my + 16 - oam[cand].y) & 255,
                (mx + 8 - oam[cand].x) & 7);
    if (cand < 0 || !lcdc_s[1] || od == 0) show = 0;
    else if (bd == 0 || !lcdc_s[0]) show = 1;
    else if (ba.prio) show = 0;
    else show = !oam[cand].attr.prio;
    if (show) begin pi = oam[cand].attr.pal * 8 + od * 2; return rgb24(obp[pi], obp[pi + 1]); end
    pi = ba.pal * 8 + bd * 2;
    return rgb24(bgp[pi], bgp[pi + 1]);
  endfunction

  // ---------------- helpers ----------------
  task automatic hdma(logic [15:0] src, logic [15:0] dst, int len, bit bank);
    logic [7:0] q; int lat;
    wr(16'hFF51, src[15:8]); wr(16'hFF52, src[7:0]);
    wr(16'hFF53, dst[15:8]); wr(16'hFF54, dst[7:0]);
    wr(16'hFF55, 8'(len / 16 - 1));
    cpu(0, 16'hFF55, 0, q, lat);       // the CPU is halted until the copy is over
    chk(q == 8'hFF, "HDMA5 reads FF after the copy");
    chk(lat > (len - 1) * 50, $sformatf("CPU halted %0d clocks for %0d bytes", lat, len));
    for (int i = 0; i < len; i++) vram[(bank ? 'h2000 : 0) + (dst & 'h1FF0) + i] = cart.rom_byte(0, src + 16'(i));
    n_hdma++;
  endtask

  task automatic take_irq(logic [7:0] vec);
    logic [7:0] b0, b1, b2; int w;
    w = 0;
    while (!cpu_nmi && w < 2000000) begin @(negedge clk); w++; end
    chk(cpu_nmi, $sformatf("NMI for vector %h", vec));
    cpu_ime = 0;                        // the CPU's own entry into the handler
    rd(16'h0066, b0); rd(16'h0067, b1); rd(16'h0068, b2);
    chk(b0 == 8'hC3 && b1 == vec && b2 == 8'h00, $sformatf("jump %h %h %h, vector %h", b0, b1, b2, vec));
  endtask

  // Takes one whole frame from the DVI pins and compares the centre pixel of every
  // 3x3 block with the reference dot; the border must be black.
  task automatic check_frame(string tag);
    int bad;
    begin
      int line, px, nb;
      logic [11:0] a;
      logic [23:0] p;
      logic in_de;
      @(posedge dvi_v); @(negedge dvi_v);
      line = 0; px = 0; in_de = 0; bad = 0; nb = 0;
      while (line < 480) begin
        @(posedge dvi_xclk); a = dvi_d;
        @(negedge dvi_xclk); p = {dvi_d, a};
        if (dvi_de) begin
          in_de = 1;
          if (px >= 80 && px < 560 && line >= 24 && line < 456) begin
            if ((px - 80) % 3 == 1 && (line - 24) % 3 == 1) begin
              logic [23:0] e;
              e = ref_px((px - 80) / 3, (line - 24) / 3);
              if (p != e) begin bad++;
                if (bad < 5) $display("dot (%0d,%0d) got %h exp %h", (px - 80) / 3, (line - 24) / 3, p, e);
              end
            end
          end else if (p != 0) nb++;
          px++;
        end else if (in_de) begin in_de = 0; px = 0; line++; end
      end
      chk(bad == 0, $sformatf("%s: %0d of 23040 dots wrong", tag, bad));
      chk(nb == 0, {tag, ": border black"});
    end
  endtask

  initial begin
    logic [7:0] q; int lat, bad;
    repeat (3) @(posedge clk); rst_n = 1;
    wr(16'hFF40, 8'h00);                                  // LCD off while loading
    lcdc_s = 8'h00;
    // ---- VRAM from cartridge ROM with the VRAM DMA (banks 0 and 1) ----
    wr(16'hFF4F, 8'h00);
    hdma(16'h0000, 16'h8000, 2048, 0);                    // tiles 0-127 (bank 0)
    hdma(16'h0800, 16'h9800, 1024, 0);                    // BG map 1, tile codes
    wr(16'hFF4F, 8'h01); n_bank++;
    hdma(16'h1000, 16'h8000, 2048, 1);                    // tiles 0-127 (bank 1)
    hdma(16'h2000, 16'h9800, 1024, 1);                    // BG map 1, attributes
    rd(16'h9800, q); chk(q == vram['h3800], "VRAM bank 1 read back");
    wr(16'hFF4F, 8'h00);
    rd(16'h9800, q); chk(q == vram['h1800], "VRAM bank 0 read back");
    // keep codes below 128 so that they point at the copied tiles
    for (int i = 0; i < 1024; i++) vram['h1800 + i] = vram['h1800 + i] & 8'h7F;
    for (int i = 0; i < 1024; i += 1) wr(16'h9800 + 16'(i), vram['h1800 + i]);
    // ---- palettes, auto-increment ----
    wr(16'hFF68, 8'h80); wr(16'hFF6A, 8'h80);
    for (int i = 0; i < 64; i++) begin
      bgp[i] = 8'($urandom); obp[i] = 8'($urandom);
      wr(16'hFF69, bgp[i]); wr(16'hFF6B, obp[i]);
    end
    rd(16'hFF68, q); chk(q[5:0] == 0, "BG palette index wrapped"); n_autoinc++;
    // ---- sprites: WRAM bank 2 staging is not used by DMA, bank 0 holds the table ----
    wr(16'hFF70, 8'h02); wr(16'hD000, 8'h5A); wr(16'hFF70, 8'h03); wr(16'hD000, 8'hA5);
    wr(16'hFF70, 8'h02); rd(16'hD000, q); chk(q == 8'h5A, "WRAM bank switching"); n_bank++;
    for (int i = 0; i < 40; i++) begin
      oam[i] = sprite_t'($urandom);
      oam[i].tile = oam[i].tile & 8'h7F;
      oam[i].y = (i < 14) ? 8'd60 : 8'(16 + $urandom % 150);   // 14 sprites on rows 44-51
      oam[i].x = (i < 14) ? 8'(8 + i * 11) : 8'(8 + $urandom % 168);
      wr(16'hC000 + 16'(i * 4), oam[i].y);     wr(16'hC001 + 16'(i * 4), oam[i].x);
      wr(16'hC002 + 16'(i * 4), oam[i].tile);  wr(16'hC003 + 16'(i * 4), oam[i].attr);
    end
    // ---- OAM DMA, CPU works from HRAM meanwhile ----
    wr(16'hFF80, 8'h3C);
    wr(16'hFF46, 8'hC0); n_odma++;
    cpu(0, 16'hC000, 0, q, lat); if (q == 8'hFF && dut.odma_active) n_odma_reject++; $display("reject latency %0d", lat);
    chk(q == 8'hFF, "WRAM not readable during OAM DMA");
    rd(16'hFF80, q); chk(q == 8'h3C, "HRAM readable during OAM DMA");
    repeat (16100) @(negedge clk);
    for (int i = 0; i < 160; i += 13) begin rd(16'hFE00 + 16'(i), q);
      chk(q == oam[i / 4][8 * (3 - i % 4) +: 8], $sformatf("OAM byte %0d", i)); end
    // ---- cartridge bank switching ----
    wr(16'h2000, 8'h05); n_bank++;
    rd(16'h4321, q); chk(q == cart.rom_byte(5, 16'h0321), "ROM bank 5 visible at 4000");
    // ---- picture on ----
    scx_s = 8'd5; scy_s = 8'd3; lcdc_s = 8'h93;
    wr(16'hFF43, scx_s); wr(16'hFF42, scy_s); wr(16'hFF40, lcdc_s);
    // ---- interrupts: V-Blank, STAT on LY = LYC, timer ----
    wr(16'hFFFF, 8'h01); cpu_ime = 1;
    take_irq(8'h40);
    rd(16'hFF44, q); chk(q >= 144 && q <= 153, $sformatf("LY %0d in V-Blank", q));
    wr(16'hFF0F, 8'h00); wr(16'hFF45, 8'd20); wr(16'hFF41, 8'h40); wr(16'hFFFF, 8'h02); cpu_ime = 1;
    take_irq(8'h48);
    rd(16'hFF44, q); chk(q == 8'd20, $sformatf("LY %0d at the LYC interrupt", q));
    wr(16'hFF0F, 8'h00); wr(16'hFF06, 8'hF8); wr(16'hFF05, 8'hF8); wr(16'hFF07, 8'h05);
    wr(16'hFFFF, 8'h04); cpu_ime = 1;
    take_irq(8'h50);
    rd(16'hFF05, q); chk(q >= 8'hF8, "TIMA reloaded from TMA");
    wr(16'hFFFF, 8'h00);
    // ---- pad ----
    buttons_n = 16'hFF7E;                                   // B (bit 0) and Right (bit 7) pressed
    lat = n_pad;
    while (n_pad < lat + 2) @(negedge clk);                 // two whole polls with the new buttons
    wr(16'hFF00, 8'h20); rd(16'hFF00, q); chk(q[3:0] == 4'b1101, $sformatf("buttons nibble %h", q));
    wr(16'hFF00, 8'h10); rd(16'hFF00, q); chk(q[3:0] == 4'b1110, $sformatf("directions nibble %h", q));
    // ---- one whole frame from the DVI pins ----
    check_frame("map 9800, tiles from 8000, 8x8 sprites");
    // ---- second picture: other map, signed tile numbers, 8x16 sprites, BG master off ----
    wr(16'hFF4F, 8'h01);
    hdma(16'h2800, 16'h9000, 2048, 1);                    // tiles 0-127 at 9000 (bank 1)
    hdma(16'h3000, 16'h9C00, 1024, 1);                    // BG map 2, attributes
    wr(16'hFF4F, 8'h00);
    hdma(16'h3800, 16'h9000, 2048, 0);                    // tiles 0-127 at 9000 (bank 0)
    hdma(16'h0400, 16'h9C00, 1024, 0);                    // BG map 2, tile codes
    for (int i = 0; i < 1024; i++) vram['h1C00 + i] = vram['h1C00 + i] & 8'h7F;
    for (int i = 0; i < 1024; i += 1) wr(16'h9C00 + 16'(i), vram['h1C00 + i]);
    scx_s = 8'd250; scy_s = 8'd200; lcdc_s = 8'h8E;
    wr(16'hFF43, scx_s); wr(16'hFF42, scy_s); wr(16'hFF40, lcdc_s);
    check_frame("map 9C00, signed tiles, 8x16 sprites, BG priority off");
    // ---- every mechanism happened ----
    chk(n_stall > 0,       $sformatf("CPU stall during VRAM DMA: %0d clocks", n_stall));
    chk(n_hdma > 0,        "VRAM DMA transfers");
    chk(n_odma > 0 && n_odma_reject > 0, "OAM DMA with CPU restricted to HRAM");
    chk(n_nmi >= 3,        $sformatf("interrupts delivered by NMI: %0d", n_nmi));
    chk(n_shown > 0,       $sformatf("sprite dots shown: %0d", n_shown));
    chk(n_hidden > 0,      $sformatf("sprite dots hidden by priority: %0d", n_hidden));
    chk(n_drop > 0,        $sformatf("sprites dropped by the 10-per-line limit: %0d", n_drop));
    chk(n_bank >= 3,       "VRAM, WRAM and ROM bank switches");
    chk(n_autoinc > 0,     "palette auto-increment");
    chk(n_pad >= 2,        "pad polls");
    chk(n_late == 0,       "every dot ready in time");
    $display("stall %0d nmi %0d shown %0d hidden %0d dropped %0d pad polls %0d",
             n_stall, n_nmi, n_shown, n_hidden, n_drop, n_pad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
