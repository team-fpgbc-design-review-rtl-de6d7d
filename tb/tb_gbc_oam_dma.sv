// Testbench for the OAM DMA with a behavioural bus memory: a write of XX to FF46 must
// copy XX00-XX9F to FE00-FE9F (160 reads, 160 writes), keep active high for
// 160 x BYTE_CYCLES clocks (the 160 us of the original at 1 us per byte), leave other
// bytes alone and read back XX from FF46. Runs two transfers.
module tb_gbc_oam_dma;
  import gbc_pkg::*;
  localparam int BC = 12;
  logic clk = 0, rst_n = 0, active;
  io_req_t io_req = '0;
  io_rsp_t io_rsp;
  bus_req_t bus_req;
  bus_rsp_t bus_rsp = '0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  gbc_oam_dma #(.BYTE_CYCLES(BC)) dut (.*);
  tb_bus_mem mem (.clk, .req(bus_req), .rsp(bus_rsp));
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    foreach (mem.mem[i]) mem.mem[i] = 8'($urandom);
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (mem.mem[i]) ;
    for (int r = 0; r < 2; r++) begin
      logic [7:0] src; int t, bad;
      logic [7:0] before_a0;
      src = (r == 0) ? 8'hC1 : 8'h12;
      before_a0 = mem.mem[16'hFEA0];
      mem.nrd = 0; mem.nwr = 0;
      @(negedge clk); io_req = '{wr: 1, rd: 0, addr: A_DMA, wdata: src};
      @(negedge clk); io_req = '{wr: 0, rd: 1, addr: A_DMA, wdata: 0}; #1;
      chk(io_rsp.hit && io_rsp.rdata == src, "FF46 reads back");
      io_req = '0; t = 1;
      chk(active, "active after start");
      while (active) begin @(negedge clk); t++; end
      chk(t >= 160 * BC && t <= 160 * BC + 8, $sformatf("duration %0d clocks", t));
      chk(mem.nrd == 160 && mem.nwr == 160, $sformatf("%0d reads %0d writes", mem.nrd, mem.nwr));
      bad = 0;
      for (int i = 0; i < 160; i++) if (mem.mem[16'hFE00 + i] != mem.mem[{src, 8'(i)}]) bad++;
      chk(bad == 0, $sformatf("%0d bytes wrong", bad));
      chk(mem.mem[16'hFEA0] == before_a0, "FEA0 untouched");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
