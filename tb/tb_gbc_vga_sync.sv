// Testbench for the raster generator: one full frame, counting visible pixels, sync
// pulse widths and their positions, and the 800 x 525 totals.
module tb_gbc_vga_sync;
  logic clk = 0, rst_n = 0, pix_en = 0;
  logic [9:0] x, y;
  logic de, hs, vs;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  gbc_vga_sync dut (.*);
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  initial begin repeat (2000000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int nde = 0, nhs = 0, nvs_lines = 0, hs_first = -1, n = 0, lines_de = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); pix_en = 1;
    for (n = 0; n < 800 * 525; n++) begin
      if (de) nde++;
      if (hs && y == 0) begin nhs++; if (hs_first < 0) hs_first = int'(x); end
      if (vs && x == 0) nvs_lines++;
      if (de && x == 0) lines_de++;
      @(negedge clk);
    end
    chk(nde == 640 * 480, $sformatf("visible pixels %0d", nde));
    chk(nhs == 96, $sformatf("hsync width %0d", nhs));
    chk(hs_first == 656, $sformatf("hsync start %0d", hs_first));
    chk(nvs_lines == 2, $sformatf("vsync lines %0d", nvs_lines));
    chk(lines_de == 480, $sformatf("visible lines %0d", lines_de));
    chk(x == 0 && y == 0, "wraps after 800x525");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
