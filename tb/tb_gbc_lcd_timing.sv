// Testbench for the LCD timing unit, at the default 456 dots x 154 lines and a dot
// every clock: checks the mode of every dot of two frames against the mode sequence
// (2, 3, 0 on lines 0-143, 1 on 144-153), one V-Blank request per frame at the start of
// line 144, STAT requests for LY = LYC and for mode 0 when enabled, the coincidence
// flag, and mode 1 / LY 0 while the LCD is off.
// Also: each STAT source alone and two together, no requests while the LCD is off, and
// the line length when the dot enable comes every third clock.
module tb_gbc_lcd_timing;
  logic clk = 0, rst_n = 0, dot_en = 1, lcd_on = 1;
  logic [7:0] lyc = 8'd50, ly;
  logic [3:0] stat_en = 4'b1000;
  logic [1:0] mode;
  logic coinc, irq_vblank, irq_stat;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  gbc_lcd_timing dut (.*);
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  initial begin repeat (1000000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int nvb = 0, nst = 0, vb_line = -1, bad = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int l = 0; l < 154; l++)
        for (int d = 0; d < 456; d++) begin
          int em;
          em = (l >= 144) ? 1 : (d < 80) ? 2 : (d < 252) ? 3 : 0;
          if (ly != 8'(l) || mode != 2'(em) || coinc != (l == 50)) bad++;
          if (irq_vblank) begin nvb++; vb_line = l; end
          if (irq_stat) nst++;
          @(negedge clk);
        end
    chk(bad == 0, $sformatf("%0d dots with wrong LY/mode/coincidence", bad));
    chk(nvb == 2 && vb_line == 144, $sformatf("vblank requests %0d line %0d", nvb, vb_line));
    chk(nst == 2, $sformatf("LYC stat requests %0d", nst));
    // mode 0 interrupt: one per visible line
    stat_en = 4'b0001; nst = 0;
    repeat (154 * 456) begin if (irq_stat) nst++; @(negedge clk); end
    chk(nst == 144, $sformatf("H-Blank stat requests %0d", nst));
    // mode 2 and mode 1 sources, then mode 2 and mode 0 together (two edges per line)
    stat_en = 4'b0100; nst = 0;
    repeat (154 * 456) begin if (irq_stat) nst++; @(negedge clk); end
    chk(nst == 144, $sformatf("OAM-search stat requests %0d", nst));
    stat_en = 4'b0010; nst = 0;
    repeat (154 * 456) begin if (irq_stat) nst++; @(negedge clk); end
    chk(nst == 1, $sformatf("V-Blank stat requests %0d", nst));
    stat_en = 4'b0101; nst = 0;
    repeat (154 * 456) begin if (irq_stat) nst++; @(negedge clk); end
    chk(nst >= 144 && nst <= 145, $sformatf("mode 2 + mode 0 stat requests %0d", nst));
    stat_en = 4'b0000; nst = 0;
    repeat (154 * 456) begin if (irq_stat) nst++; @(negedge clk); end
    chk(nst == 0, "no stat request with every source disabled");
    lcd_on = 0; repeat (3) @(negedge clk);
    chk(ly == 0 && mode == 1, "LCD off: LY 0, mode 1");
    stat_en = 4'b0010; nst = 0;
    repeat (1000) begin if (irq_stat || irq_vblank) nst++; @(negedge clk); end
    chk(nst == 0, "no requests while the LCD is off");
    // back on with a dot every third clock: line 0 starts in mode 2, a line lasts 3*456 clocks
    stat_en = 4'b0000;
    @(negedge clk); lcd_on = 1; dot_en = 0;
    begin
      int t0, t1, c;
      c = 0; t0 = -1; t1 = -1;
      for (int i = 0; i < 3 * 456 * 3; i++) begin
        dot_en = (i % 3 == 0);
        @(negedge clk); c++;
        if (ly == 1 && t0 < 0) t0 = c;
        if (ly == 2 && t1 < 0) t1 = c;
      end
      chk(t1 - t0 == 3 * 456, $sformatf("line length %0d clocks at a dot every 3 clocks", t1 - t0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
