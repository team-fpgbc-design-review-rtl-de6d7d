// Testbench for the JOYPAD register: for random SNES button words and every group
// selection, FF00 must return the Game Boy nibble (Start/Select/B/A when bit 5 is set,
// Down/Up/Left/Right when bit 4 is set, active low, both groups combined, F when none).
module tb_gbc_joypad;
  import gbc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] pad_n = '1;
  io_req_t io_req = '0;
  io_rsp_t io_rsp;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  gbc_joypad dut (.*);
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (200) begin
      logic [1:0] s;
      logic [3:0] e, btn, dir;
      s = 2'($urandom); pad_n = 16'($urandom);
      @(negedge clk); io_req = '{wr: 1, rd: 0, addr: A_JOYP, wdata: {2'b00, s, 4'h0}};
      @(negedge clk); io_req = '{wr: 0, rd: 1, addr: A_JOYP, wdata: 0}; #1;
      // SNES order: 0 B, 1 Y, 2 Select, 3 Start, 4 Up, 5 Down, 6 Left, 7 Right, 8 A
      btn = {pad_n[3], pad_n[2], pad_n[0], pad_n[8]};
      dir = {pad_n[5], pad_n[4], pad_n[6], pad_n[7]};
      e = (s[1] ? btn : 4'hF) & (s[0] ? dir : 4'hF);
      checks++;
      if (!(io_rsp.hit && io_rsp.rdata == {2'b11, s, e})) begin failures++;
        $display("FAIL sel %b pad %h got %h", s, pad_n, io_rsp.rdata); end
      @(negedge clk); io_req = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
