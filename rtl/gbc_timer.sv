// Timer: the TIMA counter (FF05) whose overflow raises the timer interrupt.
//
// A free-running 16-bit prescaler advances once per CPU clock tick (tick input: about
// 4.17 MHz in this system against the console's 4.19 MHz, so every rate below is 0.5%
// slow). DIV (FF04) is its upper byte; writing DIV clears the prescaler. When TAC
// (FF07) bit 2 is set, TIMA advances on each falling edge of the prescaler bit chosen by
// TAC bits 1-0 (bit 9, 3, 5, 7: 4096, 262144, 65536, 16384 Hz). When TIMA overflows it is
// reloaded from TMA (FF06) and irq pulses for one clock.
// Only "the interrupt occurs when TIMA overflows" is from the document; DIV, TMA, TAC
// and the rates follow the published Game Boy register conventions.
module gbc_timer
  import gbc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    tick,    // CPU clock enable
  input  io_req_t io_req,  // register bus
  output io_rsp_t io_rsp,  // DIV/TIMA/TMA/TAC read data
  output logic    irq      // timer interrupt request pulse
);
  logic [15:0] pre;
  logic [7:0]  tima, tma;
  logic [2:0]  tac;
  logic        sel_bit, sel_q;

  always_comb begin
    unique case (tac[1:0])
      2'd0: sel_bit = pre[9];
      2'd1: sel_bit = pre[3];
      2'd2: sel_bit = pre[5];
      default: sel_bit = pre[7];
    endcase
  end

  always_comb begin
    io_rsp = '0;
    unique case (io_req.addr)
      A_DIV:  io_rsp = '{hit: 1'b1, rdata: pre[15:8]};
      A_TIMA: io_rsp = '{hit: 1'b1, rdata: tima};
      A_TMA:  io_rsp = '{hit: 1'b1, rdata: tma};
      A_TAC:  io_rsp = '{hit: 1'b1, rdata: {5'h1F, tac}};
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre <= '0;  tima <= '0;  tma <= '0;  tac <= '0;  sel_q <= 1'b0;  irq <= 1'b0;
    end else begin
      irq   <= 1'b0;
      sel_q <= sel_bit & tac[2];
      if (tick) pre <= pre + 16'd1;
      if (sel_q && !(sel_bit & tac[2])) begin
        if (tima == 8'hFF) begin
          tima <= tma;
          irq  <= 1'b1;
        end else tima <= tima + 8'd1;
      end
      if (io_req.wr) begin
        unique case (io_req.addr)
          A_DIV:  pre  <= '0;
          A_TIMA: tima <= io_req.wdata;
          A_TMA:  tma  <= io_req.wdata;
          A_TAC:  tac  <= io_req.wdata[2:0];
          default: ;
        endcase
      end
    end
  end
endmodule
