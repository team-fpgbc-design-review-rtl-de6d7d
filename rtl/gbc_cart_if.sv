// Cartridge reader interface: turns one bus access into the connector's pin sequence.
//
// For a read, RD is driven low (WR high) for ACCESS_CYCLES clocks after one clock of
// address setup, and the data pins are sampled in the last of them. For a write, WR is
// driven low (RD high) and the data pins are driven for the same time. CS goes low for
// the external RAM window A000-BFFF. A write into 2000-3FFF is how software selects the
// ROM bank; the bank logic itself is inside the cartridge. ack answers in the clock
// after the strobe ends, with the sampled byte.
// The pin set and the RD/WR levels are the document's (its remark that a bank-select
// write holds both RD and WR low conflicts with its own read/write description; the
// write levels above are used for every write). Access time, setup and CS decoding are
// this design's.
module gbc_cart_if
  import gbc_pkg::*;
#(
  parameter int ACCESS_CYCLES = 20  // 200 ns at 100 MHz
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    req,        // access from the memory system
  output bus_rsp_t    rsp,        // answer
  output logic [15:0] cart_a,     // address pins
  output logic [7:0]  cart_dout,  // data pins, driven when cart_doe
  output logic        cart_doe,   // drive the data pins
  input  logic [7:0]  cart_din,   // data pins as read
  output logic        cart_rd_n,  // read strobe
  output logic        cart_wr_n,  // write strobe
  output logic        cart_cs_n   // external RAM select
);
  localparam int CW = $clog2(ACCESS_CYCLES + 2);
  logic [CW-1:0] cnt;
  logic          busy, done;
  logic [7:0]    q;

  assign cart_a    = req.addr;
  assign cart_dout = req.wdata;
  assign cart_cs_n = !(req.valid && req.addr >= 16'hA000 && req.addr < 16'hC000);
  assign cart_rd_n = !(busy && cnt != '0 && !req.we);
  assign cart_wr_n = !(busy && cnt != '0 && req.we);
  assign cart_doe  = req.valid && req.we;
  assign rsp       = '{ack: done, rdata: q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;  cnt <= '0;  done <= 1'b0;  q <= '0;
    end else begin
      done <= 1'b0;
      if (!busy && req.valid && !done) begin
        busy <= 1'b1;  cnt <= '0;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
        if (cnt == CW'(ACCESS_CYCLES)) begin
          q <= cart_din;  busy <= 1'b0;  done <= 1'b1;
        end
      end
    end
  end
endmodule
