// Memory system: the address decoder and arbiter through which every part of the
// console communicates.
//
// Three bus masters share one port into the memories: the general-purpose VRAM DMA
// (highest priority), the OAM DMA, and the CPU. While the VRAM DMA runs the CPU is
// stalled; while the OAM DMA runs the CPU may only use high RAM (FF80-FFFE): its other
// reads return FF and its other writes are dropped. The second VRAM port and a
// combinational OAM read port serve the pixel pipeline.
//
// Address map: 0000-7FFF and A000-BFFF go to the cartridge interface; 8000-9FFF to VRAM
// (bank from VBK, FF4F); C000-CFFF to WRAM bank 0 and D000-DFFF to the WRAM bank in SVBK
// (FF70, value 0 selects bank 1); E000-FDFF echoes C000-DDFF; FE00-FE9F is OAM; FEA0-FEFF
// reads FF; FF00-FF7F are I/O registers and FFFF is IE; FF80-FFFE is high RAM.
// VRAM and WRAM are contiguous arrays addressed {bank, offset}. OAM, high RAM and the
// I/O page are plain register arrays. VBK, SVBK and the screen registers (LCDC, STAT
// enables, SCY, SCX, LYC) live here; LY and the STAT mode/coincidence bits come from
// the LCD timing unit. Any other register is offered to the peripherals on io_req;
// addresses no peripheral claims fall back to the I/O array, which therefore also holds
// the sound registers FF10-FF3F.
// When the interrupt unit signals an override, a CPU read from the cartridge range
// returns the override byte instead (the jump the CPU executes at 0x0066).
//
// Timing: a request is taken in one cycle and answered two cycles later with ack (and
// rdata for reads); cartridge accesses take as long as the cartridge interface needs.
// The map, banking and DMA sharing rules are the document's; the bus protocol, the
// latencies and the reset values are this design's.
// Lint note: rst_n shows up as used both asynchronously and synchronously; the
// synchronous use is only the disable condition of the request-hold assertions at the
// end, not a flip-flop.
module gbc_memory
  import gbc_pkg::*;
#(
  parameter logic [7:0] LCDC_RESET = 8'h91
) (
  input  logic        clk,
  input  logic        rst_n,
  // masters
  input  bus_req_t    cpu_req,        // CPU access
  output bus_rsp_t    cpu_rsp,        // CPU answer
  input  bus_req_t    odma_req,       // OAM DMA access
  output bus_rsp_t    odma_rsp,       // OAM DMA answer
  input  logic        odma_active,    // OAM DMA in progress: CPU limited to HRAM
  input  bus_req_t    hdma_req,       // VRAM DMA access
  output bus_rsp_t    hdma_rsp,       // VRAM DMA answer
  input  logic        hdma_active,    // VRAM DMA in progress: CPU halted
  output logic        cpu_stall,      // CPU request waiting because a DMA owns the bus
  // interrupt vector substitution
  output logic [15:0] fetch_addr,     // address of the CPU read being served
  output logic        fetch_done,     // a CPU read completed this cycle
  input  logic        ovr_en,         // substitute the read data at fetch_addr
  input  logic [7:0]  ovr_data,       // substitute byte
  // cartridge interface
  output bus_req_t    cart_req,       // access to the cartridge
  input  bus_rsp_t    cart_rsp,       // cartridge answer
  // register bus to the peripherals
  output io_req_t     io_req,         // register access in page FF
  input  io_rsp_t     io_rsp,         // OR of the peripherals' answers
  // screen registers and status
  output logic [7:0]  lcdc,           // FF40
  output logic [7:0]  scy,            // FF42
  output logic [7:0]  scx,            // FF43
  output logic [7:0]  lyc,            // FF45
  output logic [3:0]  stat_en,        // STAT bits 6-3 (LYC, mode 2, mode 1, mode 0 interrupt enables)
  input  logic [7:0]  ly,             // current line
  input  logic [2:0]  stat_ro,        // STAT bits 2-0: coincidence, mode
  // pixel pipeline ports
  input  logic [13:0] ppu_vram_addr,  // {bank, offset}
  output logic [7:0]  ppu_vram_data,  // one cycle later
  input  logic [5:0]  ppu_oam_idx,    // sprite number 0..39
  output sprite_t     ppu_oam_spr     // that sprite's four bytes
);
  typedef enum logic [2:0] {T_CART, T_VRAM, T_WRAM, T_OAM, T_NONE, T_IO, T_HRAM} tgt_e;
  typedef enum logic [1:0] {M_CPU, M_ODMA, M_HDMA} mst_e;
  typedef enum logic [1:0] {S_IDLE, S_PH0, S_PH1, S_CART} st_e;

  function automatic tgt_e decode(logic [15:0] a);
    if (a < 16'h8000)       return T_CART;
    else if (a < 16'hA000)  return T_VRAM;
    else if (a < 16'hC000)  return T_CART;
    else if (a < 16'hFE00)  return T_WRAM;
    else if (a < 16'hFEA0)  return T_OAM;
    else if (a < 16'hFF00)  return T_NONE;
    else if (a < 16'hFF80 || a == 16'hFFFF) return T_IO;
    else                    return T_HRAM;
  endfunction

  st_e         st;
  mst_e        m;
  tgt_e        tgt;
  logic [15:0] addr;
  logic        we;
  logic [7:0]  wdata;
  logic        ovr;       // this access is served by the interrupt override
  logic [7:0]  ovr_byte;

  logic [7:0] oam  [160];
  logic [7:0] hram [127];
  logic [7:0] iomem[128];
  logic       vbk;
  logic [2:0] svbk;

  // ---------------- arbitration ----------------
  logic cpu_ok, cpu_blocked;
  assign cpu_ok      = !hdma_active && (!odma_active ||
                       (cpu_req.addr >= 16'hFF80 && cpu_req.addr != 16'hFFFF));
  assign cpu_blocked = cpu_req.valid && hdma_active;
  assign cpu_stall   = cpu_blocked;

  // CPU access outside HRAM during OAM DMA: answered at once, FF / dropped
  logic cpu_reject;
  assign cpu_reject = (st == S_IDLE) && !hdma_req.valid && !odma_req.valid &&
                      cpu_req.valid && !hdma_active && !cpu_ok;

  // ---------------- RAM ports ----------------
  logic       v_en, w_en, ph0;
  logic [7:0] v_rdata, w_rdata;
  logic [2:0] wbank;
  assign ph0   = (st == S_PH0);
  assign v_en  = ph0 && tgt == T_VRAM;
  assign w_en  = ph0 && tgt == T_WRAM;
  assign wbank = addr[12] ? ((svbk == 3'd0) ? 3'd1 : svbk) : 3'd0;

  gbc_vram u_vram (
    .clk, .a_en(v_en), .a_we(we), .a_addr({vbk, addr[12:0]}), .a_wdata(wdata),
    .a_rdata(v_rdata), .b_addr(ppu_vram_addr), .b_rdata(ppu_vram_data)
  );
  gbc_wram u_wram (
    .clk, .en(w_en), .we, .addr({wbank, addr[11:0]}), .wdata, .rdata(w_rdata)
  );

  // ---------------- register page ----------------
  logic ph1, io_int;
  assign ph1 = (st == S_PH1);
  always_comb begin
    unique case (addr[7:0])
      A_LCDC, A_STAT, A_SCY, A_SCX, A_LY, A_LYC, A_VBK, A_SVBK: io_int = (addr[15:8] == 8'hFF);
      default: io_int = 1'b0;
    endcase
  end
  assign io_req.wr    = ph1 && tgt == T_IO && we && !io_int;
  assign io_req.rd    = ph1 && tgt == T_IO && !we && !io_int;
  assign io_req.addr  = addr[7:0];
  assign io_req.wdata = wdata;

  logic [7:0] io_rdata;
  always_comb begin
    unique case (addr[7:0])
      A_LCDC:  io_rdata = lcdc;
      A_STAT:  io_rdata = {1'b1, stat_en, stat_ro};
      A_SCY:   io_rdata = scy;
      A_SCX:   io_rdata = scx;
      A_LY:    io_rdata = ly;
      A_LYC:   io_rdata = lyc;
      A_VBK:   io_rdata = {7'h7F, vbk};
      A_SVBK:  io_rdata = {5'h1F, svbk};
      default: io_rdata = io_rsp.hit ? io_rsp.rdata : iomem[addr[6:0]];
    endcase
  end

  // ---------------- read data ----------------
  logic [7:0] rdata;
  always_comb begin
    unique case (tgt)
      T_VRAM:  rdata = v_rdata;
      T_WRAM:  rdata = w_rdata;
      T_OAM:   rdata = oam[addr[7:0]];
      T_IO:    rdata = io_rdata;
      T_HRAM:  rdata = hram[addr[6:0]];
      T_CART:  rdata = ovr ? ovr_byte : cart_rsp.rdata;
      default: rdata = 8'hFF;
    endcase
  end

  logic done;
  assign done = ph1 || (st == S_CART && cart_rsp.ack);

  assign cart_req.valid = (st == S_CART);
  assign cart_req.we    = we;
  assign cart_req.addr  = addr;
  assign cart_req.wdata = wdata;

  always_comb begin
    cpu_rsp  = '0;
    odma_rsp = '0;
    hdma_rsp = '0;
    if (done) begin
      unique case (m)
        M_CPU:   cpu_rsp  = '{ack: 1'b1, rdata: rdata};
        M_ODMA:  odma_rsp = '{ack: 1'b1, rdata: rdata};
        default: hdma_rsp = '{ack: 1'b1, rdata: rdata};
      endcase
    end else if (cpu_reject) begin
      cpu_rsp = '{ack: 1'b1, rdata: 8'hFF};
    end
  end

  assign fetch_addr = addr;
  assign fetch_done = done && m == M_CPU && !we;

  // ---------------- sequencing and writes ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;  m <= M_CPU;  tgt <= T_NONE;
      addr <= '0;  we <= 1'b0;  wdata <= '0;  ovr <= 1'b0;  ovr_byte <= '0;
      vbk <= 1'b0;  svbk <= '0;
      lcdc <= LCDC_RESET;  scy <= '0;  scx <= '0;  lyc <= '0;  stat_en <= '0;
    end else begin
      unique case (st)
        S_IDLE: begin
          bus_req_t r;
          logic     go;
          go = 1'b1;
          if (hdma_req.valid)                 begin r = hdma_req; m <= M_HDMA; end
          else if (odma_req.valid)            begin r = odma_req; m <= M_ODMA; end
          else if (cpu_req.valid && cpu_ok)   begin r = cpu_req;  m <= M_CPU;  end
          else                                begin r = cpu_req;  go = 1'b0;   end
          if (go) begin
            addr  <= r.addr;  we <= r.we;  wdata <= r.wdata;
            tgt   <= decode(r.addr);
            ovr   <= !hdma_req.valid && !odma_req.valid && !r.we && ovr_en;
            ovr_byte <= ovr_data;
            st    <= (decode(r.addr) == T_CART &&
                      !(!hdma_req.valid && !odma_req.valid && !r.we && ovr_en)) ? S_CART : S_PH0;
          end
        end
        S_PH0: st <= S_PH1;
        S_CART: if (cart_rsp.ack) st <= S_IDLE;
        default: begin  // S_PH1: register writes land here
          st <= S_IDLE;
          if (we && tgt == T_IO && addr[15:8] == 8'hFF) begin
            unique case (addr[7:0])
              A_LCDC: lcdc    <= wdata;
              A_STAT: stat_en <= wdata[6:3];
              A_SCY:  scy     <= wdata;
              A_SCX:  scx     <= wdata;
              A_LYC:  lyc     <= wdata;
              A_VBK:  vbk     <= wdata[0];
              A_SVBK: svbk    <= wdata[2:0];
              default: ;
            endcase
          end
        end
      endcase
    end
  end

  // Arrays: written in the answer cycle, no reset (contents are undefined at power-up).
  always_ff @(posedge clk) begin
    if (ph1 && we) begin
      if (tgt == T_OAM)  oam[addr[7:0]]  <= wdata;
      if (tgt == T_HRAM) hram[addr[6:0]] <= wdata;
      if (tgt == T_IO && !io_int && !io_rsp.hit && !addr[7]) iomem[addr[6:0]] <= wdata;
    end
  end

  assign ppu_oam_spr = '{y: oam[{ppu_oam_idx, 2'd0}], x: oam[{ppu_oam_idx, 2'd1}],
                         tile: oam[{ppu_oam_idx, 2'd2}], attr: attr_t'(oam[{ppu_oam_idx, 2'd3}])};

`ifndef SYNTHESIS
  // A master keeps its request steady until it is answered.
  property p_hold(bus_req_t q, logic a);
    @(posedge clk) disable iff (!rst_n) (q.valid && !a) |=> q.valid;
  endproperty
  a_cpu_hold:  assert property (p_hold(cpu_req, cpu_rsp.ack));
  a_hdma_hold: assert property (p_hold(hdma_req, hdma_rsp.ack));
`endif
endmodule
