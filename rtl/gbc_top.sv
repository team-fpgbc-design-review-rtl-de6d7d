// Game Boy Color system on an FPGA: memory system, DMA engines, interrupt handler,
// timer, LCD timing, framebuffer-less pixel unit with colour palettes, DVI display
// controller, SNES pad reader and cartridge reader, all on one 100 MHz clock.
//
// The CPU (a Game Boy-mode Z80 core) is outside this module: its memory bus comes in as
// cpu_req/cpu_rsp (request held until ack; cpu_stall while a VRAM DMA owns the bus), and
// the interrupt handler drives its NMI, with ime telling whether the CPU accepts
// interrupts. Everything the CPU, the two DMA engines and the peripherals exchange goes
// through the memory system's address map; the pixel unit has its own VRAM and OAM
// ports. The LCD timing (LY, STAT, V-Blank/STAT interrupts) and the timer advance on a
// dot clock enable of 100 MHz / DOT_DIV (about 4.17 MHz for 24). The picture is drawn
// at 3x scale in the middle of a 640x480 raster sent to the DVI transmitter.
// The block split and the connections follow the document's system diagram; the clock
// plan, bus protocol and dot divider are this design's.
// Lint notes: the pixel unit's event pulses (sprite shown, hidden, dropped), the
// display's late and frame_start flags and the interrupt unit's vector output are
// observation points for simulation and are left open here; rst_n's synchronous use is
// the disable condition of the bus assertions in gbc_memory.
module gbc_top
  import gbc_pkg::*;
#(
  parameter int DOT_DIV         = 24,     // system clocks per LCD dot / CPU clock
  parameter int OAM_BYTE_CYCLES = 100,    // OAM DMA: 1 byte per microsecond
  parameter int HDMA_BYTE_CYCLES = 50,    // VRAM DMA: 2 bytes per microsecond
  parameter int CART_CYCLES     = 20,     // cartridge access strobe length
  parameter int SNES_US_CYCLES  = 100,    // clocks per microsecond for the pad timing
  parameter int SNES_IDLE_US    = 16670   // time between pad polls
) (
  input  logic        clk,          // 100 MHz
  input  logic        rst_n,
  // CPU bus
  input  bus_req_t    cpu_req,      // CPU memory access
  output bus_rsp_t    cpu_rsp,      // answer
  output logic        cpu_stall,    // CPU halted by VRAM DMA
  input  logic        cpu_ime,      // CPU interrupt master enable
  output logic        cpu_nmi,      // CPU NMI input
  // cartridge connector
  output logic [15:0] cart_a,
  output logic [7:0]  cart_dout,
  output logic        cart_doe,
  input  logic [7:0]  cart_din,
  output logic        cart_rd_n,
  output logic        cart_wr_n,
  output logic        cart_cs_n,
  // SNES pad
  output logic        snes_latch,
  output logic        snes_clk,
  input  logic        snes_data,
  // DVI transmitter
  output logic [11:0] dvi_d,
  output logic        dvi_xclk,
  output logic        dvi_xclk_n,
  output logic        dvi_de,
  output logic        dvi_h,
  output logic        dvi_v
);
  // ---- dot clock enable ----
  logic [$clog2(DOT_DIV)-1:0] dcnt;
  logic dot_en;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dcnt <= '0;
    else dcnt <= (dcnt == ($bits(dcnt))'(DOT_DIV - 1)) ? '0 : dcnt + 1'b1;
  assign dot_en = (dcnt == '0);

  // ---- buses ----
  bus_req_t odma_req, hdma_req, cart_req;
  bus_rsp_t odma_rsp, hdma_rsp, cart_rsp;
  logic     odma_active, hdma_active;
  io_req_t  io_req;
  io_rsp_t  rsp_int, rsp_tim, rsp_odma, rsp_hdma, rsp_joy, rsp_pal, io_rsp;
  assign io_rsp = rsp_int | rsp_tim | rsp_odma | rsp_hdma | rsp_joy | rsp_pal;

  logic [7:0]  lcdc, scx, scy, lyc, ly;
  logic [3:0]  stat_en;
  logic [1:0]  mode;
  logic        coinc;
  logic [15:0] fetch_addr;
  logic        fetch_done, ovr_en;
  logic [7:0]  ovr_data;
  logic [13:0] ppu_vram_addr;
  logic [7:0]  ppu_vram_data;
  logic [5:0]  ppu_oam_idx;
  sprite_t     ppu_oam_spr;

  gbc_memory u_mem (
    .clk, .rst_n, .cpu_req, .cpu_rsp, .odma_req, .odma_rsp, .odma_active,
    .hdma_req, .hdma_rsp, .hdma_active, .cpu_stall,
    .fetch_addr, .fetch_done, .ovr_en, .ovr_data, .cart_req, .cart_rsp,
    .io_req, .io_rsp, .lcdc, .scy, .scx, .lyc, .stat_en, .ly, .stat_ro({coinc, mode}),
    .ppu_vram_addr, .ppu_vram_data, .ppu_oam_idx, .ppu_oam_spr
  );

  // ---- interrupts and timer ----
  logic irq_vblank, irq_stat, irq_timer;
  logic [7:0] vector;
  gbc_interrupt u_int (
    .clk, .rst_n, .irq({2'b00, irq_timer, irq_stat, irq_vblank}), .ime(cpu_ime),
    .io_req, .io_rsp(rsp_int), .cpu_addr(cpu_req.addr), .fetch_addr, .fetch_done,
    .ovr_en, .ovr_data, .nmi(cpu_nmi), .vector
  );
  gbc_timer u_tim (.clk, .rst_n, .tick(dot_en), .io_req, .io_rsp(rsp_tim), .irq(irq_timer));

  // ---- DMA engines ----
  gbc_oam_dma #(.BYTE_CYCLES(OAM_BYTE_CYCLES)) u_odma (
    .clk, .rst_n, .io_req, .io_rsp(rsp_odma), .bus_req(odma_req), .bus_rsp(odma_rsp),
    .active(odma_active)
  );
  gbc_hdma #(.BYTE_CYCLES(HDMA_BYTE_CYCLES)) u_hdma (
    .clk, .rst_n, .io_req, .io_rsp(rsp_hdma), .bus_req(hdma_req), .bus_rsp(hdma_rsp),
    .active(hdma_active)
  );

  // ---- cartridge ----
  gbc_cart_if #(.ACCESS_CYCLES(CART_CYCLES)) u_cart (
    .clk, .rst_n, .req(cart_req), .rsp(cart_rsp), .cart_a, .cart_dout, .cart_doe,
    .cart_din, .cart_rd_n, .cart_wr_n, .cart_cs_n
  );

  // ---- SNES pad and JOYPAD register ----
  logic [15:0] pad_n;
  gbc_snes_ctrl #(.US_CYCLES(SNES_US_CYCLES), .IDLE_US(SNES_IDLE_US)) u_snes (
    .clk, .rst_n, .snes_latch, .snes_clk, .snes_data, .pad_n, .valid()
  );
  gbc_joypad u_joy (.clk, .rst_n, .pad_n, .io_req, .io_rsp(rsp_joy));

  // ---- LCD timing ----
  gbc_lcd_timing u_lcd (
    .clk, .rst_n, .dot_en, .lcd_on(lcdc[LCDC_ON]), .lyc, .stat_en, .ly, .mode, .coinc,
    .irq_vblank, .irq_stat
  );

  // ---- pixel unit, palettes, display ----
  logic       ppu_req, ppu_done, scan_start, swap;
  logic [7:0] ppu_gx, ppu_gy, scan_gy;
  rgb15_t     ppu_rgb, bg_rgb, obj_rgb;
  logic [2:0] bg_pal, obj_pal;
  logic [1:0] bg_dot, obj_dot;

  gbc_palette_ram u_pal (
    .clk, .rst_n, .io_req, .io_rsp(rsp_pal), .bg_pal, .bg_dot, .bg_rgb, .obj_pal, .obj_dot,
    .obj_rgb
  );
  gbc_ppu u_ppu (
    .clk, .rst_n, .lcdc, .scx, .scy, .req(ppu_req), .gx(ppu_gx), .gy(ppu_gy),
    .done(ppu_done), .rgb(ppu_rgb), .scan_start, .scan_gy, .swap,
    .vram_addr(ppu_vram_addr), .vram_data(ppu_vram_data), .oam_idx(ppu_oam_idx),
    .oam_spr(ppu_oam_spr), .bg_pal, .bg_dot, .bg_rgb, .obj_pal, .obj_dot, .obj_rgb,
    .ev_obj_shown(), .ev_obj_hidden(), .ev_dropped()
  );
  gbc_display u_disp (
    .clk, .rst_n, .ppu_req, .ppu_gx, .ppu_gy, .ppu_done, .ppu_rgb, .scan_start, .scan_gy,
    .swap, .late(), .frame_start(), .dvi_d, .dvi_xclk, .dvi_xclk_n, .dvi_de, .dvi_h, .dvi_v
  );
endmodule
