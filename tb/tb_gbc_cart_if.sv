// Testbench for the cartridge interface with a behavioural cartridge (tb_cart_model:
// ROM with an MBC-style bank register and 8 KB of RAM). Checks read strobes (RD low, WR
// high, ACCESS_CYCLES long), write strobes, CS for A000-BFFF only, data on reads,
// bank switching by a write to 2000-3FFF, RAM write/read back, and the answer latency.
module tb_gbc_cart_if;
  import gbc_pkg::*;
  localparam int AC = 6;
  logic clk = 0, rst_n = 0;
  bus_req_t req = '0;
  bus_rsp_t rsp;
  logic [15:0] cart_a;
  logic [7:0] cart_dout, cart_din;
  logic cart_doe, cart_rd_n, cart_wr_n, cart_cs_n;
  int checks = 0, failures = 0, rd_low = 0, wr_low = 0, both = 0;
  always #5 clk = ~clk;
  gbc_cart_if #(.ACCESS_CYCLES(AC)) dut (.*);
  tb_cart_model cart (.a(cart_a), .d_in(cart_dout), .d_out(cart_din), .rd_n(cart_rd_n),
                      .wr_n(cart_wr_n), .cs_n(cart_cs_n));
  always @(posedge clk) begin
    if (!cart_rd_n) rd_low++;
    if (!cart_wr_n) wr_low++;
    if (!cart_rd_n && !cart_wr_n) both++;
  end
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  task automatic acc(logic w, logic [15:0] a, logic [7:0] wd, output logic [7:0] rd, output int lat);
    @(negedge clk); req = '{valid: 1, we: w, addr: a, wdata: wd}; lat = 0;
    do begin @(posedge clk); lat++; #1; end while (!rsp.ack);
    rd = rsp.rdata;
    @(negedge clk); req = '0;
  endtask
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [7:0] d; int lat;
    repeat (2) @(posedge clk); rst_n = 1;
    rd_low = 0;
    acc(0, 16'h0123, 0, d, lat);
    chk(d == cart.rom_byte(0, 16'h0123), "bank 0 read");
    chk(rd_low == AC, $sformatf("RD low %0d clocks", rd_low));
    chk(lat == AC + 2, $sformatf("latency %0d", lat));
    acc(0, 16'h4567, 0, d, lat); chk(d == cart.rom_byte(1, 16'h0567), "bank 1 read");
    wr_low = 0;
    acc(1, 16'h2100, 8'h03, d, lat); chk(wr_low == AC, "WR low for a write");
    acc(0, 16'h4567, 0, d, lat); chk(d == cart.rom_byte(3, 16'h0567), "bank 3 read");
    chk(cart.cs_seen == 0, "no CS outside A000-BFFF");
    for (int i = 0; i < 8; i++) acc(1, 16'hA000 + 16'(i * 37), 8'(i * 11 + 1), d, lat);
    for (int i = 0; i < 8; i++) begin
      acc(0, 16'hA000 + 16'(i * 37), 0, d, lat);
      chk(d == 8'(i * 11 + 1), $sformatf("cart RAM %0d", i));
    end
    acc(1, 16'hBFF0, 8'h6C, d, lat); acc(0, 16'hBFF0, 0, d, lat);
    chk(d == 8'h6C, "cart RAM at the top of A000-BFFF");
    chk(cart.cs_seen > 0, "CS used for A000-BFFF");
    chk(both == 0, "RD and WR never low together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
