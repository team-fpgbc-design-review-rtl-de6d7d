// Testbench for the memory system. The cartridge is a behavioural bus memory; one
// stand-in peripheral claims register FF05. Playing the CPU and the DMA masters it
// checks: WRAM banking (C000 bank 0, D000 bank SVBK, SVBK 0 acting as 1, echo at
// E000), VRAM banking by VBK and the pixel-unit port, OAM and its sprite port, HRAM,
// the screen registers and STAT composition, register forwarding and the I/O array
// fallback, cartridge routing, the interrupt override, FEA0-FEFF reading FF, the
// access latency, CPU stall during VRAM DMA, CPU restriction to HRAM during OAM DMA,
// and DMA priority over the CPU.
module tb_gbc_memory;
  import gbc_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_req_t cpu_req = '0, odma_req = '0, hdma_req = '0, cart_req;
  bus_rsp_t cpu_rsp, odma_rsp, hdma_rsp, cart_rsp;
  logic odma_active = 0, hdma_active = 0, cpu_stall, fetch_done, ovr_en = 0;
  logic [15:0] fetch_addr;
  logic [7:0] ovr_data = 8'hC3, lcdc, scy, scx, lyc, ly = 8'd77, ppu_vram_data;
  logic [3:0] stat_en;
  logic [2:0] stat_ro = 3'b110;
  io_req_t io_req;
  io_rsp_t io_rsp;
  logic [13:0] ppu_vram_addr = '0;
  logic [5:0] ppu_oam_idx = '0;
  sprite_t ppu_oam_spr;
  logic [7:0] periph_reg = 8'h5A;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  assign io_rsp = (io_req.addr == 8'h05) ? '{hit: 1'b1, rdata: periph_reg} : '0;
  always @(posedge clk) if (io_req.wr && io_req.addr == 8'h05) periph_reg <= io_req.wdata;
  gbc_memory dut (.*);
  tb_bus_mem #(.MAXLAT(4)) cart (.clk, .req(cart_req), .rsp(cart_rsp));
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  task automatic cpu(logic w, logic [15:0] a, logic [7:0] d, output logic [7:0] q, output int lat);
    @(negedge clk); cpu_req = '{valid: 1, we: w, addr: a, wdata: d}; lat = 0;
    do begin @(negedge clk); lat++; end while (!cpu_rsp.ack && lat < 2000);
    q = cpu_rsp.rdata;
    @(negedge clk); cpu_req = '0;
  endtask
  task automatic wr(logic [15:0] a, logic [7:0] d); logic [7:0] q; int l; cpu(1, a, d, q, l); endtask
  task automatic rd(logic [15:0] a, output logic [7:0] q); int l; cpu(0, a, 0, q, l); endtask
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [7:0] q; int lat, n;
    foreach (cart.mem[i]) cart.mem[i] = 8'(i * 3 + 1);
    repeat (2) @(posedge clk); rst_n = 1;
    // WRAM banks
    wr(16'hC010, 8'hA0);
    for (int b = 1; b < 8; b++) begin wr(16'hFF70, 8'(b)); wr(16'hD010, 8'(8'hB0 + b)); end
    for (int b = 1; b < 8; b++) begin wr(16'hFF70, 8'(b)); rd(16'hD010, q);
      chk(q == 8'(8'hB0 + b), $sformatf("WRAM bank %0d", b)); end
    wr(16'hFF70, 8'h00); rd(16'hD010, q); chk(q == 8'hB1, "SVBK 0 selects bank 1");
    rd(16'hC010, q); chk(q == 8'hA0, "WRAM bank 0");
    rd(16'hE010, q); chk(q == 8'hA0, "echo of C000");
    cpu(0, 16'hC010, 0, q, lat); chk(lat == 2, $sformatf("internal latency %0d", lat));
    // VRAM banks and pixel port
    wr(16'hFF4F, 8'h00); wr(16'h9800, 8'h11);
    wr(16'hFF4F, 8'h01); wr(16'h9800, 8'h22);
    rd(16'h9800, q); chk(q == 8'h22, "VRAM bank 1");
    rd(16'hFF4F, q); chk(q == 8'hFF, "VBK reads 1 in bit 0");
    wr(16'hFF4F, 8'h00); rd(16'h9800, q); chk(q == 8'h11, "VRAM bank 0");
    ppu_vram_addr = 14'h1800; @(posedge clk); @(posedge clk); #1;
    chk(ppu_vram_data == 8'h11, "pixel port bank 0");
    ppu_vram_addr = 14'h3800; @(posedge clk); @(posedge clk); #1;
    chk(ppu_vram_data == 8'h22, "pixel port bank 1");
    // OAM
    for (int i = 0; i < 4; i++) wr(16'hFE08 + 16'(i), 8'(8'h30 + i));
    ppu_oam_idx = 2; #1;
    chk(ppu_oam_spr == {8'h30, 8'h31, 8'h32, 8'h33}, "sprite port");
    rd(16'hFE0A, q); chk(q == 8'h32, "OAM read");
    rd(16'hFEB0, q); chk(q == 8'hFF, "unusable area reads FF");
    // HRAM, registers
    wr(16'hFF90, 8'h77); rd(16'hFF90, q); chk(q == 8'h77, "HRAM");
    wr(16'hFF40, 8'h83); chk(lcdc == 8'h83, "LCDC");
    wr(16'hFF42, 8'h12); wr(16'hFF43, 8'h34); wr(16'hFF45, 8'h56); wr(16'hFF41, 8'hFF);
    chk(scy == 8'h12 && scx == 8'h34 && lyc == 8'h56 && stat_en == 4'hF, "SCY SCX LYC STAT");
    rd(16'hFF41, q); chk(q == 8'hFE, $sformatf("STAT reads %h", q));
    rd(16'hFF44, q); chk(q == 8'd77, "LY");
    rd(16'hFF05, q); chk(q == 8'h5A, "forwarded register read");
    wr(16'hFF05, 8'h66); rd(16'hFF05, q); chk(q == 8'h66, "forwarded register write");
    wr(16'hFF20, 8'h99); rd(16'hFF20, q); chk(q == 8'h99, "I/O array fallback");
    // cartridge
    rd(16'h1234, q); chk(q == 8'(16'h1234 * 3 + 1), "cartridge ROM read");
    wr(16'hA100, 8'h5C); chk(cart.mem[16'hA100] == 8'h5C, "cartridge RAM write");
    // interrupt override
    n = cart.nrd; ovr_en = 1; rd(16'h0066, q); ovr_en = 0;
    chk(q == 8'hC3 && cart.nrd == n, "override byte, no cartridge access");
    // OAM DMA restriction
    odma_active = 1;
    cpu(0, 16'hC010, 0, q, lat); chk(q == 8'hFF && lat == 1, "non-HRAM read during OAM DMA");
    wr(16'hC010, 8'h00);
    rd(16'hFF90, q); chk(q == 8'h77, "HRAM during OAM DMA");
    cpu(0, 16'hFE0A, 0, q, lat); chk(q == 8'hFF && lat == 1, "OAM not readable during OAM DMA");
    odma_active = 0; rd(16'hC010, q); chk(q == 8'hA0, "write during OAM DMA dropped");
    // VRAM DMA halts CPU and has priority
    hdma_active = 1;
    fork
      cpu(0, 16'hC010, 0, q, lat);
      begin
        repeat (5) @(negedge clk);
        chk(cpu_stall, "CPU stalled during VRAM DMA");
        hdma_req = '{valid: 1, we: 1, addr: 16'h8100, wdata: 8'h42};
        do @(negedge clk); while (!hdma_rsp.ack);
        @(negedge clk); hdma_req = '0;
        repeat (10) @(negedge clk); hdma_active = 0;
      end
    join
    chk(lat > 15 && q == 8'hA0, $sformatf("CPU served after VRAM DMA (%0d clocks)", lat));
    rd(16'h8100, q); chk(q == 8'h42, "DMA write landed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
