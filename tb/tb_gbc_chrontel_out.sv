// Testbench for the DVI output stage: feeds random pixels once per four clocks and
// checks that the 12-bit pins carry {G[3:0], B} then {R, G[7:4]}, that XCLK changes in
// the middle of each half (high in the 2nd and 3rd clock of the pixel) and that DE/H/V
// travel with their pixel.
module tb_gbc_chrontel_out;
  logic clk = 0, rst_n = 0, de_in = 0, hs_in = 0, vs_in = 0;
  logic [1:0] phase = 0;
  logic [23:0] rgb = 0;
  logic [11:0] d;
  logic xclk, xclk_n, de, h, v;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  gbc_chrontel_out dut (.*);
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always_ff @(posedge clk) phase <= phase + 1;
  initial begin
    logic [23:0] p; logic e, hh, vv;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (500) begin
      while (phase != 3) @(negedge clk);
      p = 24'($urandom); e = 1'($urandom); hh = 1'($urandom); vv = 1'($urandom);
      rgb = p; de_in = e; hs_in = hh; vs_in = vv;
      @(negedge clk);                                      // output phase 0
      if (!e) p = 0;
      chk(d == {p[11:8], p[7:0]} && !xclk, "first half, phase 0");
      chk(de == e && h == hh && v == vv, "DE/H/V");
      @(negedge clk); chk(d == {p[11:8], p[7:0]} && xclk && !xclk_n, "first half, phase 1");
      @(negedge clk); chk(d == {p[23:16], p[15:12]} && xclk, "second half, phase 2");
      @(negedge clk); chk(d == {p[23:16], p[15:12]} && !xclk, "second half, phase 3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
