// Shared types and constants of the Game Boy Color system.
//
// The system bus is a simple request/acknowledge bus: a master holds a bus_req_t with
// valid set until the memory answers with ack (one cycle) and, for reads, rdata in that
// same cycle. Peripherals that own memory-mapped registers in FF00-FF7F and FFFF see
// every register access as an io_req_t and answer with an io_rsp_t (hit set when the
// address is theirs); the responses of all peripherals are ORed together.
// The bit layouts of the attribute bytes follow the register tables of the Game Boy
// Color; the bus protocol is this design's own choice.
package gbc_pkg;

  typedef struct packed {
    logic        valid;
    logic        we;
    logic [15:0] addr;
    logic [7:0]  wdata;
  } bus_req_t;

  typedef struct packed {
    logic       ack;
    logic [7:0] rdata;
  } bus_rsp_t;

  // Register access in the FFxx page: addr is the low byte of the address.
  typedef struct packed {
    logic       wr;
    logic       rd;
    logic [7:0] addr;
    logic [7:0] wdata;
  } io_req_t;

  typedef struct packed {
    logic       hit;
    logic [7:0] rdata;
  } io_rsp_t;

  // Attribute byte of a background map entry (VRAM bank 1) and of a sprite (OAM byte 3).
  typedef struct packed {
    logic       prio;     // bit 7: BG: highest priority to BG / OBJ: priority to BG
    logic       yflip;    // bit 6
    logic       xflip;    // bit 5
    logic       dmg_pal;  // bit 4: DMG palette (OBJ only, unused in colour mode)
    logic       bank;     // bit 3: character bank
    logic [2:0] pal;      // bits 2-0: colour palette
  } attr_t;

  typedef struct packed {
    logic [7:0] y;
    logic [7:0] x;
    logic [7:0] tile;
    attr_t      attr;
  } sprite_t;

  typedef struct packed {
    logic [4:0] b;
    logic [4:0] g;
    logic [4:0] r;
  } rgb15_t;

  // Register addresses (low byte, page FF)
  localparam logic [7:0] A_JOYP = 8'h00, A_DIV = 8'h04, A_TIMA = 8'h05, A_TMA = 8'h06,
                         A_TAC = 8'h07, A_IF = 8'h0F, A_LCDC = 8'h40, A_STAT = 8'h41,
                         A_SCY = 8'h42, A_SCX = 8'h43, A_LY = 8'h44, A_LYC = 8'h45,
                         A_DMA = 8'h46, A_VBK = 8'h4F, A_HDMA1 = 8'h51, A_HDMA5 = 8'h55,
                         A_BCPS = 8'h68, A_BCPD = 8'h69, A_OCPS = 8'h6A, A_OCPD = 8'h6B,
                         A_SVBK = 8'h70, A_IE = 8'hFF;

  // Interrupt request bits (IF / IE)
  localparam int IRQ_VBLANK = 0, IRQ_STAT = 1, IRQ_TIMER = 2, IRQ_SERIAL = 3, IRQ_JOYPAD = 4;

  // LCDC bits
  localparam int LCDC_ON = 7, LCDC_TDATA = 4, LCDC_BGMAP = 3, LCDC_OBJ16 = 2,
                 LCDC_OBJEN = 1, LCDC_BGEN = 0;

endpackage
