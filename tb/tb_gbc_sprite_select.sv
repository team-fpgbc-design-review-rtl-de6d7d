// Testbench for the sprite selector with a behavioural OAM of 40 random sprites,
// biased so that many share rows. For random map rows and both sprite heights it
// compares, for every map column, the candidate (hit and sprite bytes) with a reference
// that keeps the first 10 covering sprites in OAM order and picks the lowest index
// covering the column. It also checks the number of dropped pulses, that the scan
// finishes within 42 clocks, and that the current buffer only changes on swap.
module tb_gbc_sprite_select;
  import gbc_pkg::*;
  logic clk = 0, rst_n = 0, scan_start = 0, tall = 0, swap = 0, scanning, dropped, hit;
  logic [7:0] scan_row = 0, mx = 0;
  logic [5:0] oam_idx;
  sprite_t oam [40];
  sprite_t oam_spr, spr;
  int checks = 0, failures = 0, ndrop = 0;
  always #5 clk = ~clk;
  assign oam_spr = (oam_idx < 40) ? oam[oam_idx] : '0;
  always @(posedge clk) if (dropped) ndrop++;
  gbc_sprite_select dut (.*);
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  initial begin repeat (400000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      int sel [$];
      int ncov, t, bad;
      logic [7:0] row;
      foreach (oam[i]) begin
        oam[i] = sprite_t'($urandom);
        oam[i].y = 8'(60 + $urandom % 24);
      end
      row = 8'(50 + $urandom % 40);
      tall = 1'($urandom);
      ncov = 0; sel.delete();
      foreach (oam[i]) begin
        logic [7:0] dy;
        dy = row + 8'd16 - oam[i].y;
        if (dy < (tall ? 16 : 8)) begin ncov++; if (sel.size() < 10) sel.push_back(i); end
      end
      @(negedge clk); scan_start = 1; scan_row = row; ndrop = 0;
      @(negedge clk); scan_start = 0; t = 1;
      while (scanning) begin @(negedge clk); t++; end
      chk(t <= 42, $sformatf("scan took %0d clocks", t));
      // before swap the old buffer is still current: mx query unchanged is not checked;
      @(negedge clk); swap = 1; @(negedge clk); swap = 0;
      chk(ndrop == (ncov > 10 ? ncov - 10 : 0), $sformatf("dropped %0d of %0d", ndrop, ncov));
      bad = 0;
      for (int x = 0; x < 256; x++) begin
        int want;
        want = -1;
        foreach (sel[j]) begin
          logic [7:0] dx;
          dx = 8'(x) + 8'd8 - oam[sel[j]].x;
          if (want < 0 && dx < 8) want = sel[j];
        end
        mx = 8'(x); #1;
        if (hit != (want >= 0) || (want >= 0 && spr != oam[want])) bad++;
      end
      chk(bad == 0, $sformatf("row %0d: %0d columns wrong", row, bad));
    end
    // next buffer does not disturb current until swap
    begin
      logic h0; sprite_t s0;
      mx = 8'h40; #1; h0 = hit; s0 = spr;
      foreach (oam[i]) oam[i] = '0;
      @(negedge clk); scan_start = 1; scan_row = 8'd0;
      @(negedge clk); scan_start = 0;
      repeat (45) @(negedge clk);
      chk(hit == h0 && spr == s0, "current buffer held until swap");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
