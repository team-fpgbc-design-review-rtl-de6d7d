// Interrupt handler. The CPU core has no usable Game Boy interrupt logic, so interrupts
// are delivered through its non-maskable interrupt and a jump substituted into the
// instruction stream.
//
// IF (FF0F) collects requests: V-Blank (bit 0), LCD STAT (1) and timer (2); serial (3)
// and joypad (4) have no source in this system but the bits are writable. IE is FFFF.
// When the CPU's interrupt master enable (ime) is set and an enabled request is
// pending, the lowest-numbered one is taken: its IF bit is cleared, the vector
// 0x40 + 8*n is loaded, nmi is raised, and the override is armed. The CPU's NMI jumps to
// 0x0066; while the override is armed, reads of 0x0066, 0x0067 and 0x0068 return
// C3 vv 00 (JP 00vv) instead of ROM bytes, so the CPU continues at the vector. nmi drops
// once 0x0066 has been fetched and the override is disarmed after 0x0068.
// The NMI-plus-substituted-jump mechanism is the document's; the priority order, the
// JP encoding of the "jump to a register value" and the ime input are this design's.
module gbc_interrupt
  import gbc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  irq,         // request pulses, IF bit positions
  input  logic        ime,         // CPU interrupt master enable
  input  io_req_t     io_req,      // register bus
  output io_rsp_t     io_rsp,      // IF / IE read data
  input  logic [15:0] cpu_addr,    // address the CPU is requesting
  input  logic [15:0] fetch_addr,  // address of the completed CPU read
  input  logic        fetch_done,  // a CPU read completed
  output logic        ovr_en,      // replace the data of the CPU read at cpu_addr
  output logic [7:0]  ovr_data,    // replacement byte
  output logic        nmi,         // to the CPU's NMI input
  output logic [7:0]  vector       // vector being delivered
);
  logic [4:0] if_r, ie_r, pend;
  logic       armed;

  assign pend = if_r & ie_r;

  always_comb begin
    io_rsp = '0;
    if (io_req.addr == A_IF) io_rsp = '{hit: 1'b1, rdata: {3'b111, if_r}};
    if (io_req.addr == A_IE) io_rsp = '{hit: 1'b1, rdata: {3'b111, ie_r}};
  end

  assign ovr_en = armed && cpu_addr >= 16'h0066 && cpu_addr <= 16'h0068;
  always_comb begin
    unique case (cpu_addr[1:0])
      2'b10:   ovr_data = 8'hC3;   // 0x0066: JP nn
      2'b11:   ovr_data = vector;  // 0x0067: low byte
      default: ovr_data = 8'h00;   // 0x0068: high byte
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      if_r <= '0;  ie_r <= '0;  armed <= 1'b0;  nmi <= 1'b0;  vector <= 8'h40;
    end else begin
      logic [4:0] nxt;
      nxt = if_r | irq;
      if (io_req.wr && io_req.addr == A_IF) nxt = io_req.wdata[4:0] | irq;
      if (io_req.wr && io_req.addr == A_IE) ie_r <= io_req.wdata[4:0];
      if (!armed && ime && pend != '0) begin
        for (int n = 4; n >= 0; n--)
          if (pend[n]) begin
            vector <= 8'h40 + 8'(n * 8);
          end
        for (int n = 0; n < 5; n++)
          if (pend[n] && (pend & ((5'd1 << n) - 5'd1)) == '0) nxt[n] = 1'b0;
        armed <= 1'b1;
        nmi   <= 1'b1;
      end
      if (armed && fetch_done && fetch_addr == 16'h0066) nmi <= 1'b0;
      if (armed && fetch_done && fetch_addr == 16'h0068) armed <= 1'b0;
      if_r <= nxt;
    end
  end
endmodule
