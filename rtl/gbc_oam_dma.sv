// OAM DMA: a write of XX to FF46 copies the 160 bytes XX00-XX9F to the sprite attribute
// table FE00-FE9F.
//
// Each byte is a bus read followed by a bus write through the memory arbiter; a new
// byte is started every BYTE_CYCLES clocks, so at 100 MHz the default of 100 gives the
// 160 microseconds per transfer of the original console. active is high from the cycle
// after the FF46 write until the last byte is written; the memory system restricts the
// CPU to high RAM meanwhile. FF46 reads back the last value written.
// Source, destination, length and duration are the document's; the pacing by a byte
// timer and the 100 MHz clock are this design's.
module gbc_oam_dma
  import gbc_pkg::*;
#(
  parameter int BYTE_CYCLES = 100
) (
  input  logic     clk,
  input  logic     rst_n,
  input  io_req_t  io_req,   // register bus
  output io_rsp_t  io_rsp,   // FF46 read data
  output bus_req_t bus_req,  // bus master port
  input  bus_rsp_t bus_rsp,  // bus answer
  output logic     active    // transfer in progress
);
  typedef enum logic [1:0] {IDLE, RD, WR, PACE} st_e;
  st_e        st;
  logic [7:0] src, idx, data;
  localparam int CW = $clog2(BYTE_CYCLES+1);
  logic [CW-1:0] cnt;

  assign io_rsp = (io_req.addr == A_DMA) ? '{hit: 1'b1, rdata: src} : '0;
  assign active = (st != IDLE);

  always_comb begin
    bus_req = '0;
    if (st == RD) bus_req = '{valid: 1'b1, we: 1'b0, addr: {src, idx}, wdata: 8'h00};
    if (st == WR) bus_req = '{valid: 1'b1, we: 1'b1, addr: {8'hFE, idx}, wdata: data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE;  src <= '0;  idx <= '0;  data <= '0;  cnt <= '0;
    end else begin
      if (cnt != '0) cnt <= cnt - 1'b1;
      unique case (st)
        IDLE: if (io_req.wr && io_req.addr == A_DMA) begin
          src <= io_req.wdata;  idx <= '0;  st <= RD;  cnt <= CW'(BYTE_CYCLES - 1);
        end
        RD: if (bus_rsp.ack) begin data <= bus_rsp.rdata; st <= WR; end
        WR: if (bus_rsp.ack) st <= PACE;
        default: if (cnt == '0) begin
          if (idx == 8'd159) st <= IDLE;
          else begin idx <= idx + 8'd1; st <= RD; cnt <= CW'(BYTE_CYCLES - 1); end
        end
      endcase
    end
  end
endmodule
