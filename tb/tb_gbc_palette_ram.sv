// Testbench for the palette memories: fills all 8 BG and 8 OBJ palettes through the
// specification/data registers with auto-increment, reads bytes back through the data
// register, checks a write without auto-increment stays in place, and compares every
// colour on the pixel-unit ports with the 15-bit layout (R = L[4:0], G = {H[1:0],
// L[7:5]}, B = H[6:2]).
module tb_gbc_palette_ram;
  import gbc_pkg::*;
  logic clk = 0, rst_n = 0;
  io_req_t io_req = '0;
  io_rsp_t io_rsp;
  logic [2:0] bg_pal = 0, obj_pal = 0;
  logic [1:0] bg_dot = 0, obj_dot = 0;
  rgb15_t bg_rgb, obj_rgb;
  logic [7:0] mb [64], mo [64];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  gbc_palette_ram dut (.*);
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  task automatic wr(logic [7:0] a, logic [7:0] d);
    @(negedge clk); io_req = '{wr: 1, rd: 0, addr: a, wdata: d};
    @(negedge clk); io_req = '0;
  endtask
  task automatic rd(logic [7:0] a, output logic [7:0] d);
    @(negedge clk); io_req = '{wr: 0, rd: 1, addr: a, wdata: 0}; #1;
    d = io_rsp.rdata; chk(io_rsp.hit, "hit");
    @(negedge clk); io_req = '0;
  endtask
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [7:0] d;
    repeat (2) @(posedge clk); rst_n = 1;
    wr(A_BCPS, 8'h80); wr(A_OCPS, 8'h80);
    for (int i = 0; i < 64; i++) begin
      mb[i] = 8'($urandom); mo[i] = 8'($urandom);
      wr(A_BCPD, mb[i]); wr(A_OCPD, mo[i]);
    end
    rd(A_BCPS, d); chk(d[5:0] == 0, "BCPS wrapped to 0");
    // no auto-increment: two writes to the same byte
    wr(A_BCPS, 8'h05); wr(A_BCPD, 8'h11); mb[5] = 8'h11; wr(A_BCPD, 8'h22); mb[5] = 8'h22;
    rd(A_BCPS, d); chk(d[5:0] == 5 && !d[7], "BCPS fixed");
    for (int i = 0; i < 64; i += 7) begin
      wr(A_OCPS, 8'(i)); rd(A_OCPD, d); chk(d == mo[i], $sformatf("OCPD[%0d]", i));
      wr(A_BCPS, 8'(i)); rd(A_BCPD, d); chk(d == mb[i], $sformatf("BCPD[%0d]", i));
    end
    for (int p = 0; p < 8; p++)
      for (int c = 0; c < 4; c++) begin
        logic [7:0] l, h;
        bg_pal = 3'(p); bg_dot = 2'(c); obj_pal = 3'(7 - p); obj_dot = 2'(c); #1;
        l = mb[p * 8 + c * 2]; h = mb[p * 8 + c * 2 + 1];
        chk(bg_rgb.r == l[4:0] && bg_rgb.g == {h[1:0], l[7:5]} && bg_rgb.b == h[6:2],
            $sformatf("bg colour %0d.%0d", p, c));
        l = mo[(7 - p) * 8 + c * 2]; h = mo[(7 - p) * 8 + c * 2 + 1];
        chk(obj_rgb.r == l[4:0] && obj_rgb.g == {h[1:0], l[7:5]} && obj_rgb.b == h[6:2],
            $sformatf("obj colour %0d.%0d", 7 - p, c));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
