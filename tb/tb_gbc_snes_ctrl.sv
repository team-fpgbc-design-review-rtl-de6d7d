// Testbench for the SNES reader, with a behavioural pad (tb_snes_pad) and the
// microsecond shortened to 4 clocks and the idle time to 100 us. Checks the latch pulse
// width (12 us), the gap to the first falling clock edge (6 us), 16 falling clock
// edges per poll, the clock period (12 us), the idle time between polls and that the
// word read equals the pad's buttons.
module tb_gbc_snes_ctrl;
  localparam int US = 4;
  logic clk = 0, rst_n = 0, snes_latch, snes_clk, snes_data, valid;
  logic [15:0] pad_n, buttons_n;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  gbc_snes_ctrl #(.US_CYCLES(US), .IDLE_US(100)) dut (.*);
  tb_snes_pad pad (.latch(snes_latch), .clk(snes_clk), .buttons_n, .data(snes_data));
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int t_lr, t_lf, t_f1, t_f2, nfall, t_valid, t_prev_latch = -1;
    int cyc = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (4) begin
      buttons_n = {4'hF, 12'($urandom)};
      while (!snes_latch) begin @(posedge clk); cyc++; end
      t_lr = cyc;
      if (t_prev_latch >= 0) chk(t_lr - t_prev_latch > 100 * US, "idle time between polls");
      t_prev_latch = t_lr;
      while (snes_latch) begin @(posedge clk); cyc++; end
      t_lf = cyc;
      chk(t_lf - t_lr == 12 * US, $sformatf("latch width %0d", t_lf - t_lr));
      nfall = 0; t_f1 = -1; t_f2 = -1;
      while (!valid) begin
        logic c0;
        c0 = snes_clk; @(posedge clk); cyc++;
        if (c0 && !snes_clk) begin nfall++; if (t_f1 < 0) t_f1 = cyc; else if (t_f2 < 0) t_f2 = cyc; end
      end
      chk(t_f1 - t_lf == 6 * US, $sformatf("latch to first clock edge %0d", t_f1 - t_lf));
      chk(t_f2 - t_f1 == 12 * US, $sformatf("clock period %0d", t_f2 - t_f1));
      chk(nfall == 16, $sformatf("%0d falling clock edges", nfall));
      @(posedge clk); cyc++;
      chk(pad_n == buttons_n, $sformatf("word %h expected %h", pad_n, buttons_n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
