// Testbench for the display controller, at the default 640x480 raster and 3x scale,
// with a stand-in pixel unit that answers each request after 10 clocks with a colour
// encoding the requested (gx, gy). It decodes the DVI pins as the transmitter does
// (first half on the rising XCLK edge, second on the falling one) over one whole frame
// and checks every visible pixel: the Game Boy picture at (80..559, 24..455), each dot
// three pixels wide and three lines high, black elsewhere. It also checks 480 DE lines
// of 640 pixels, the horizontal sync width, no late colour, one sprite scan per picture
// line with the row of the following line, and one swap per line.
module tb_gbc_display;
  import gbc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ppu_req, ppu_done = 0, scan_start, swap, late, frame_start;
  logic [7:0] ppu_gx, ppu_gy, scan_gy;
  rgb15_t ppu_rgb = '0;
  logic [11:0] dvi_d;
  logic dvi_xclk, dvi_xclk_n, dvi_de, dvi_h, dvi_v;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  gbc_display dut (.*);
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  initial begin repeat (4000000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic rgb15_t colour(int x, int y);
    return '{r: 5'(x), g: 5'(x >> 5) ^ 5'(y), b: 5'(y >> 3)};
  endfunction

  // stand-in pixel unit: 10-clock latency
  initial begin
    forever begin
      @(posedge clk);
      if (ppu_req) begin
        int x, y;
        x = ppu_gx; y = ppu_gy;
        repeat (9) @(posedge clk);
        ppu_done <= 1; ppu_rgb <= colour(x, y);
        @(posedge clk); ppu_done <= 0;
      end
    end
  end

  int nlate = 0, nscan = 0, nswap = 0, bad_scan = 0;
  logic [7:0] last_scan = 0;
  always @(posedge clk) if (rst_n) begin
    if (late) nlate++;
    if (swap) nswap++;
    if (scan_start) begin
      if (nscan > 0 && !(scan_gy == last_scan || scan_gy == last_scan + 1)) bad_scan++;
      nscan++; last_scan <= scan_gy;
    end
  end

  initial begin
    int line, px, bad, bad_len, hs_w, hs_run;
    logic [11:0] a;
    logic [23:0] p;
    logic in_de;
    repeat (3) @(posedge clk); rst_n = 1;
    // wait for the end of the first vertical sync, then the first DE
    @(posedge dvi_v); @(negedge dvi_v);
    nscan = 0; nswap = 0; nlate = 0;
    line = 0; px = 0; bad = 0; bad_len = 0; in_de = 0; hs_w = 0; hs_run = 0;
    while (line < 480) begin
      @(posedge dvi_xclk); a = dvi_d;
      if (dvi_h) hs_run++;
      else if (hs_run != 0) begin
        if (hs_run != 96) hs_w++;
        hs_run = 0;
      end
      @(negedge dvi_xclk); p = {dvi_d, a};
      if (dvi_de) begin
        logic [23:0] e;
        if (!in_de && line == 0) begin nswap = 0; nscan = 0; end
        in_de = 1;
        if (px >= 80 && px < 560 && line >= 24 && line < 456) begin
          rgb15_t c;
          c = colour((px - 80) / 3, (line - 24) / 3);
          e = {c.r, c.r[4:2], c.g, c.g[4:2], c.b, c.b[4:2]};
        end else e = 0;
        if (p != e) begin
          bad++;
          if (bad < 4) $display("pixel (%0d,%0d) got %h exp %h", px, line, p, e);
        end
        px++;
      end else if (in_de) begin
        if (px != 640) bad_len++;
        in_de = 0; px = 0; line++;
      end
    end
    chk(bad == 0, $sformatf("%0d pixels wrong", bad));
    chk(bad_len == 0, "every DE line is 640 pixels");
    chk(hs_w == 0, $sformatf("%0d hsync pulses not 96 pixels wide", hs_w));
    chk(nlate == 0, "no colour late");
    chk(nscan == 432, $sformatf("%0d sprite scans", nscan));
    chk(bad_scan == 0, "scan rows advance by one every three lines");
    chk(nswap == 480 || nswap == 479, $sformatf("%0d swaps", nswap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
