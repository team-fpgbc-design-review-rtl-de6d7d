// Testbench for the video RAM: writes random bytes to both banks through port A,
// reads them back through port A and through the pixel-unit port B, and checks the
// one-cycle read latency and that the two banks are distinct storage.
module tb_gbc_vram;
  logic clk = 0, a_en = 0, a_we = 0;
  logic [13:0] a_addr = '0, b_addr = '0;
  logic [7:0]  a_wdata = '0, a_rdata, b_rdata;
  int checks = 0, failures = 0;
  logic [7:0] model [logic [13:0]];
  always #5 clk = ~clk;
  gbc_vram dut (.*);
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [13:0] ad [64];
    for (int i = 0; i < 64; i++) begin
      ad[i] = 14'($urandom);
      if (i >= 32) ad[i] = {~ad[i-32][13], ad[i-32][12:0]};  // same offset, other bank
    end
    foreach (ad[i]) begin
      @(negedge clk); a_en = 1; a_we = 1; a_addr = ad[i]; a_wdata = 8'($urandom);
      model[ad[i]] = a_wdata;
    end
    @(negedge clk); a_en = 0; a_we = 0;
    foreach (ad[i]) begin
      @(negedge clk); a_en = 1; a_addr = ad[i]; b_addr = ad[63 - i];
      @(negedge clk); a_en = 0;
      chk(a_rdata == model[ad[i]], $sformatf("port A %h", ad[i]));
      chk(b_rdata == model[ad[63 - i]], $sformatf("port B %h", ad[63 - i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
