// Testbench for the timer: at each TAC rate TIMA must advance once per 1024/16/64/256
// ticks, reload from TMA on overflow and raise exactly one interrupt pulse per overflow;
// DIV is the upper prescaler byte and clears on write; with TAC bit 2 clear TIMA holds.
module tb_gbc_timer;
  import gbc_pkg::*;
  logic clk = 0, rst_n = 0, tick = 1, irq;
  io_req_t io_req = '0;
  io_rsp_t io_rsp;
  int checks = 0, failures = 0, nirq = 0;
  always #5 clk = ~clk;
  always @(posedge clk) if (irq) nirq++;
  gbc_timer dut (.*);
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  task automatic wr(logic [7:0] a, logic [7:0] d);
    @(negedge clk); io_req = '{wr: 1, rd: 0, addr: a, wdata: d};
    @(negedge clk); io_req = '0;
  endtask
  task automatic rd(logic [7:0] a, output logic [7:0] d);
    @(negedge clk); io_req = '{wr: 0, rd: 1, addr: a, wdata: 0}; #1; d = io_rsp.rdata;
    @(negedge clk); io_req = '0;
  endtask
  initial begin repeat (300000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int per [4] = '{1024, 16, 64, 256};
    logic [7:0] d, d2;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      tick = 0;
      wr(A_DIV, 0); wr(A_TMA, 8'hF0); wr(A_TIMA, 8'hF0); wr(A_TAC, 8'(4 | s));
      nirq = 0; tick = 1;
      repeat (per[s] * 20) @(negedge clk);
      tick = 0; repeat (3) @(negedge clk);
      rd(A_TIMA, d);
      // 20 increments from F0: overflow after 16, then 4 more from F0
      chk(d == 8'hF4, $sformatf("rate %0d: TIMA %h", s, d));
      chk(nirq == 1, $sformatf("rate %0d: %0d interrupts", s, nirq));
    end
    tick = 0; wr(A_DIV, 0); tick = 1; repeat (512) @(negedge clk); tick = 0;
    rd(A_DIV, d); chk(d == 2, $sformatf("DIV %h", d));
    wr(A_DIV, 8'h55); rd(A_DIV, d); chk(d == 0, "DIV clears on write");
    wr(A_TAC, 8'h01); rd(A_TIMA, d); tick = 1; repeat (200) @(negedge clk); tick = 0;
    rd(A_TIMA, d2); chk(d == d2, "stopped timer holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
