// VRAM DMA (general-purpose mode): copies 16 to 2048 bytes from ROM or RAM into VRAM
// while the CPU is halted.
//
// HDMA1/HDMA2 (FF51/FF52) hold the source, HDMA3/HDMA4 (FF53/FF54) the destination; the
// low four address bits are ignored, and the destination keeps only bits 12-4 so it
// always lies in 8000-9FF0. Writing n to HDMA5 (FF55) starts a copy of (n[6:0]+1)*16
// bytes. Bit 7 of the written value would select the H-Blank mode; it is ignored and
// every transfer runs in general-purpose mode. While the copy runs, active halts the
// CPU and HDMA5 reads as the number of 16-byte blocks left minus one with bit 7 clear;
// afterwards it reads FF. A byte is started every BYTE_CYCLES clocks: 50 at 100 MHz is
// the 2 bytes per microsecond of the original. HDMA1-4 read FF.
// The register layout, the always-general-purpose choice and the rate are the
// document's; the pacing logic and the 100 MHz clock are this design's.
module gbc_hdma
  import gbc_pkg::*;
#(
  parameter int BYTE_CYCLES = 50
) (
  input  logic     clk,
  input  logic     rst_n,
  input  io_req_t  io_req,   // register bus
  output io_rsp_t  io_rsp,   // HDMA1-5 read data
  output bus_req_t bus_req,  // bus master port
  input  bus_rsp_t bus_rsp,  // bus answer
  output logic     active    // transfer in progress, CPU halted
);
  typedef enum logic [1:0] {IDLE, RD, WR, PACE} st_e;
  st_e         st;
  logic [7:0]  h1, h2, h3, h4, data;
  logic [15:0] src, dst;
  logic [11:0] left;   // bytes still to copy
  localparam int CW = $clog2(BYTE_CYCLES+1);
  logic [CW-1:0] cnt;

  always_comb begin
    io_rsp = '0;
    if (io_req.addr >= A_HDMA1 && io_req.addr < A_HDMA5) io_rsp = '{hit: 1'b1, rdata: 8'hFF};
    if (io_req.addr == A_HDMA5)
      io_rsp = '{hit: 1'b1, rdata: active ? {1'b0, 7'((left - 12'd1) >> 4)} : 8'hFF};
  end

  assign active = (st != IDLE);

  always_comb begin
    bus_req = '0;
    if (st == RD) bus_req = '{valid: 1'b1, we: 1'b0, addr: src, wdata: 8'h00};
    if (st == WR) bus_req = '{valid: 1'b1, we: 1'b1, addr: dst, wdata: data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE;  h1 <= '0;  h2 <= '0;  h3 <= '0;  h4 <= '0;  data <= '0;
      src <= '0;  dst <= '0;  left <= '0;  cnt <= '0;
    end else begin
      if (cnt != '0) cnt <= cnt - 1'b1;
      if (io_req.wr && st == IDLE) begin
        unique case (io_req.addr)
          8'h51: h1 <= io_req.wdata;
          8'h52: h2 <= io_req.wdata;
          8'h53: h3 <= io_req.wdata;
          8'h54: h4 <= io_req.wdata;
          A_HDMA5: begin
            src  <= {h1, h2[7:4], 4'h0};
            dst  <= {3'b100, h3[4:0], h4[7:4], 4'h0};
            left <= {1'b0, io_req.wdata[6:0], 4'h0} + 12'd16;
            cnt  <= CW'(BYTE_CYCLES - 1);
            st   <= RD;
          end
          default: ;
        endcase
      end
      unique case (st)
        RD: if (bus_rsp.ack) begin data <= bus_rsp.rdata; st <= WR; end
        WR: if (bus_rsp.ack) begin
          st <= (left == 12'd1) ? IDLE : PACE;  left <= left - 12'd1;  src <= src + 16'd1;
          dst <= {3'b100, 13'(dst[12:0] + 13'd1)};
        end
        PACE: if (cnt == '0) begin
          st <= RD;  cnt <= CW'(BYTE_CYCLES - 1);
        end
        default: ;
      endcase
    end
  end
endmodule
