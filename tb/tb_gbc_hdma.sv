// Testbench for the VRAM DMA with a behavioural bus memory: random source and
// destination registers (low nibbles and top destination bits ignored), random
// lengths; checks the bytes copied, that nothing beyond the length is written, the
// duration of BYTE_CYCLES per byte (2 bytes per microsecond at the default), HDMA5
// reading the remaining blocks minus one while active and FF afterwards, and that a
// start with bit 7 set still runs as a general-purpose copy.
module tb_gbc_hdma;
  import gbc_pkg::*;
  localparam int BC = 16;
  logic clk = 0, rst_n = 0, active;
  io_req_t io_req = '0;
  io_rsp_t io_rsp;
  bus_req_t bus_req;
  bus_rsp_t bus_rsp = '0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  gbc_hdma #(.BYTE_CYCLES(BC)) dut (.*);
  tb_bus_mem mem (.clk, .req(bus_req), .rsp(bus_rsp));
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  task automatic wr(logic [7:0] a, logic [7:0] d);
    @(negedge clk); io_req = '{wr: 1, rd: 0, addr: a, wdata: d};
    @(negedge clk); io_req = '0;
  endtask
  initial begin repeat (400000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    foreach (mem.mem[i]) mem.mem[i] = 8'($urandom);
    repeat (2) @(posedge clk); rst_n = 1;
    mem.nwr = 0; mem.nrd = 0;                 // forget anything seen before reset
    for (int r = 0; r < 4; r++) begin
      logic [15:0] s, d, s0, d0;
      logic [6:0] n;
      int len, t, bad, mid_ok;
      logic [7:0] snap [65536];
      s = {r[0] ? 4'hA : 4'h3, 12'($urandom)};
      d = 16'($urandom);
      n = (r == 3) ? 7'd127 : 7'($urandom % 8);
      len = (int'(n) + 1) * 16;
      s0 = {s[15:4], 4'h0}; d0 = {3'b100, d[12:4], 4'h0};
      foreach (mem.mem[i]) snap[i] = mem.mem[i];
      wr(8'h51, s[15:8]); wr(8'h52, s[7:0]); wr(8'h53, d[15:8]); wr(8'h54, d[7:0]);
      wr(A_HDMA5, {r[1], n});
      t = 0; mid_ok = 1;
      while (active) begin
        io_req = '{wr: 0, rd: 1, addr: A_HDMA5, wdata: 0}; #1;
        if (io_rsp.rdata[7] || io_rsp.rdata[6:0] > n) mid_ok = 0;
        @(negedge clk); t++;
      end
      io_req = '{wr: 0, rd: 1, addr: A_HDMA5, wdata: 0}; #1;
      chk(io_rsp.rdata == 8'hFF, "HDMA5 reads FF when done");
      chk(mid_ok == 1, "HDMA5 counts down with bit 7 clear");
      io_req = '0;
      chk(t >= (len - 1) * BC && t <= len * BC, $sformatf("len %0d took %0d clocks", len, t));
      bad = 0;
      for (int i = 0; i < len; i++)
        if (mem.mem[{3'b100, 13'(d0[12:0] + 13'(i))}] != snap[16'(s0 + 16'(i))]) bad++;
      chk(bad == 0, $sformatf("%0d of %0d bytes wrong", bad, len));
      bad = 0;
      foreach (mem.mem[i])
        if (mem.mem[i] != snap[i] && !(i >= 'h8000 && i < 'hA000)) bad++;
      chk(bad == 0, "nothing written outside VRAM");
      chk(mem.nwr == len || r > 0, "write count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
