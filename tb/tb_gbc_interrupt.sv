// Testbench for the interrupt handler, playing the CPU side: raises requests, enables
// them in IE, and when nmi rises fetches 0x0066-0x0068 as the CPU would. Checks the
// substituted bytes C3 vv 00 with vv = 40/48/50 for V-Blank/STAT/timer, the order of
// several pending requests (lowest bit first), that the taken IF bit is cleared, that
// IE masks a request and that nothing is taken while ime is low. Reads and writes of
// IF and IE go over the register bus.
module tb_gbc_interrupt;
  import gbc_pkg::*;
  logic clk = 0, rst_n = 0, ime = 0, fetch_done = 0, ovr_en, nmi;
  logic [4:0] irq = '0;
  logic [15:0] cpu_addr = '0, fetch_addr = '0;
  logic [7:0] ovr_data, vector;
  io_req_t io_req = '0;
  io_rsp_t io_rsp;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  gbc_interrupt dut (.*);
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
  task automatic fetch(logic [15:0] a, output logic [7:0] d, output logic en);
    @(negedge clk); cpu_addr = a; #1; d = ovr_data; en = ovr_en;
    @(negedge clk); fetch_addr = a; fetch_done = 1;
    @(negedge clk); fetch_done = 0; cpu_addr = 16'h1234;
  endtask
  task automatic take(logic [7:0] exp_vec);
    logic [7:0] b0, b1, b2; logic e0, e1, e2; int w;
    w = 0; while (!nmi && w < 20) begin @(negedge clk); w++; end
    chk(nmi, $sformatf("nmi for vector %h", exp_vec));
    fetch(16'h0066, b0, e0);
    chk(!nmi, "nmi released after 0066 fetched");
    fetch(16'h0067, b1, e1); fetch(16'h0068, b2, e2);
    chk(e0 && e1 && e2, "override active for 0066-0068");
    chk(b0 == 8'hC3 && b1 == exp_vec && b2 == 8'h00,
        $sformatf("bytes %h %h %h for vector %h", b0, b1, b2, exp_vec));
  endtask
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [7:0] d; logic e;
    repeat (2) @(posedge clk); rst_n = 1;
    wr(A_IE, 8'h07);
    // ime low: request stays pending
    @(negedge clk); irq = 5'b00001; @(negedge clk); irq = '0;
    repeat (5) @(negedge clk); chk(!nmi, "no NMI while ime is low");
    rd(A_IF, d); chk(d[4:0] == 5'b00001, "IF holds V-Blank");
    ime = 1;
    take(8'h40);
    rd(A_IF, d); chk(d[0] == 0, "IF bit 0 cleared when taken");
    // three at once: V-Blank, STAT, timer are taken in that order
    ime = 0;
    @(negedge clk); irq = 5'b00110; @(negedge clk); irq = '0;
    wr(A_IF, 8'h07);
    ime = 1;
    take(8'h40); take(8'h48); take(8'h50);
    rd(A_IF, d); chk(d[4:0] == 0, "IF empty");
    // masked by IE
    wr(A_IE, 8'h01); @(negedge clk); irq = 5'b00100; @(negedge clk); irq = '0;
    repeat (5) @(negedge clk); chk(!nmi, "timer masked by IE");
    rd(A_IE, d); chk(d[4:0] == 5'b00001, "IE read back");
    fetch(16'h0066, d, e); chk(!e, "no override when not armed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
