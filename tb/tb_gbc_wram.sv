// Testbench for the work RAM: random writes over all eight banks, read back with the
// one-cycle latency; the same offset in different banks must hold different bytes.
module tb_gbc_wram;
  logic clk = 0, en = 0, we = 0;
  logic [14:0] addr = '0;
  logic [7:0]  wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [7:0] model [logic [14:0]];
  always #5 clk = ~clk;
  gbc_wram dut (.*);
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [14:0] ad [64];
    for (int i = 0; i < 64; i++) ad[i] = (i < 8) ? {3'(i), 12'h5A5} : 15'($urandom);
    foreach (ad[i]) begin
      @(negedge clk); en = 1; we = 1; addr = ad[i]; wdata = 8'(i * 7 + 3);
      model[ad[i]] = wdata;
    end
    @(negedge clk); en = 0; we = 0;
    foreach (ad[i]) begin
      @(negedge clk); en = 1; addr = ad[i];
      @(negedge clk); en = 0;
      chk(rdata == model[ad[i]], $sformatf("read %h got %h", ad[i], rdata));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
