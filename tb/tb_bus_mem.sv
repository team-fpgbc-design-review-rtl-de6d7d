// Behavioural bus slave for testbenches: a 64 KB byte memory on the request/acknowledge
// bus, answering each request after 1 to MAXLAT clocks. It counts reads and writes.
module tb_bus_mem
  import gbc_pkg::*;
#(
  parameter int MAXLAT = 3
) (
  input  logic     clk,
  input  bus_req_t req,  // request, held until ack
  output bus_rsp_t rsp   // answer
);
  logic [7:0] mem [65536];
  int nrd = 0, nwr = 0, wait_n = 0;
  always @(posedge clk) begin
    rsp.ack <= 1'b0;
    if (req.valid && !rsp.ack) begin
      if (wait_n == 0) wait_n = 1 + int'($urandom % MAXLAT);
      wait_n--;
      if (wait_n == 0) begin
        rsp.ack <= 1'b1;
        if (req.we) begin mem[req.addr] = req.wdata; nwr++; end
        else begin rsp.rdata <= mem[req.addr]; nrd++; end
      end
    end
  end
endmodule
