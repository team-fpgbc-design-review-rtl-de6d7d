// Testbench for the tile pixel unit. A behavioural VRAM with one cycle of read latency
// holds random tile data; every lookup (random code, attributes, data area, 8x16 mode,
// row and column) is compared with a colour number computed here from the tile format:
// low-bit byte then high-bit byte, leftmost dot in bit 7. It also checks the documented
// example row (bytes 2A/32 give colours 0,0,3,2,1,0,3,0) and the three-cycle latency.
module tb_gbc_tile_pixel;
  import gbc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, sel8000 = 1, tall = 0, busy, done;
  logic [7:0] code = 0, vram_data;
  attr_t attr = '0;
  logic [3:0] row = 0;
  logic [2:0] col = 0;
  logic [13:0] vram_addr;
  logic [1:0] dot;
  logic [7:0] mem [16384];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) vram_data <= mem[vram_addr];
  gbc_tile_pixel dut (.*);
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [1:0] ref_dot(logic [7:0] c, attr_t a, logic s8, logic tl,
                                         logic [3:0] r, logic [2:0] cl);
    int fr, t, addr, b;
    fr = a.yflip ? ((tl ? 15 : 7) - int'(r)) : int'(r);
    if (!tl) fr = fr % 8;
    t  = tl ? ((int'(c) & 'hFE) + fr / 8) : int'(c);
    addr = s8 ? t * 16 : 'h1000 + (t >= 128 ? t - 256 : t) * 16;
    addr = addr + (fr % 8) * 2 + (a.bank ? 'h2000 : 0);
    b = a.xflip ? int'(cl) : 7 - int'(cl);
    return {mem[addr + 1][b], mem[addr][b]};
  endfunction

  task automatic look(output logic [1:0] d, output int lat);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    d = dot;
  endtask

  initial begin
    logic [1:0] d;
    int lat;
    logic [1:0] exp_row [8] = '{0, 0, 3, 2, 1, 0, 3, 0};
    foreach (mem[i]) mem[i] = 8'($urandom);
    mem[16'h0012] = 8'h2A; mem[16'h0013] = 8'h32;  // tile 1, row 1
    repeat (2) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 8; c++) begin
      code = 1; attr = '0; sel8000 = 1; tall = 0; row = 1; col = 3'(c);
      look(d, lat);
      chk(d == exp_row[c], $sformatf("example row dot %0d = %0d", c, d));
      chk(lat == 3, $sformatf("latency %0d", lat));
    end
    repeat (3000) begin
      code = 8'($urandom); attr = attr_t'($urandom); sel8000 = 1'($urandom);
      tall = 1'($urandom); row = 4'($urandom); col = 3'($urandom);
      if (tall) sel8000 = 1;
      look(d, lat);
      chk(d == ref_dot(code, attr, sel8000, tall, row, col),
          $sformatf("code %h attr %h s8 %b tall %b r %0d c %0d got %0d", code, attr, sel8000,
                    tall, row, col, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
