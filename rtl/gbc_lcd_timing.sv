// LCD timing: the scanline and mode sequencer that software sees through LY (FF44) and
// the STAT register (FF41), and the source of the V-Blank and LCD STAT interrupts.
//
// One line is DOTS_PER_LINE dot enables (dot_en, about 4.17 MHz here, the console uses
// 4.19 MHz); a frame is 154 lines.
// On lines 0-143 the mode is 2 (OAM search) for MODE2_DOTS, then 3 (transfer to the LCD)
// for MODE3_DOTS, then 0 (H-Blank); lines 144-153 are mode 1 (V-Blank). With LCDC bit 7
// clear the sequencer is held at line 0, dot 0, and reports mode 1. irq_vblank pulses
// when line 144 begins. irq_stat pulses on the rising edge of the OR of the enabled
// STAT conditions: coincidence (LY = LYC, STAT bit 6), mode 2 (bit 5), mode 1 (bit 4),
// mode 0 (bit 3).
// The mode order, the mode meanings, the 144 visible of 154 lines and the STAT bit
// layout are the document's; the dot counts are the published Game Boy numbers.
module gbc_lcd_timing #(
  parameter int DOTS_PER_LINE = 456,
  parameter int MODE2_DOTS    = 80,
  parameter int MODE3_DOTS    = 172
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dot_en,      // one LCD dot
  input  logic       lcd_on,      // LCDC bit 7
  input  logic [7:0] lyc,         // FF45
  input  logic [3:0] stat_en,     // STAT bits 6-3
  output logic [7:0] ly,          // FF44
  output logic [1:0] mode,        // STAT bits 1-0
  output logic       coinc,       // STAT bit 2
  output logic       irq_vblank,  // V-Blank request pulse
  output logic       irq_stat     // LCD STAT request pulse
);
  logic [8:0] dot;
  logic       stat_line, stat_q;

  always_comb begin
    if (!lcd_on || ly >= 8'd144)           mode = 2'd1;
    else if (dot < 9'(MODE2_DOTS))           mode = 2'd2;
    else if (dot < 9'(MODE2_DOTS + MODE3_DOTS)) mode = 2'd3;
    else                                     mode = 2'd0;
  end
  assign coinc     = (ly == lyc);
  assign stat_line = lcd_on && ((stat_en[3] && coinc) || (stat_en[2] && mode == 2'd2) ||
                                (stat_en[1] && mode == 2'd1) || (stat_en[0] && mode == 2'd0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dot <= '0;  ly <= '0;  stat_q <= 1'b0;  irq_vblank <= 1'b0;  irq_stat <= 1'b0;
    end else begin
      irq_vblank <= 1'b0;
      stat_q     <= stat_line;
      irq_stat   <= stat_line && !stat_q;
      if (!lcd_on) begin
        dot <= '0;  ly <= '0;
      end else if (dot_en) begin
        if (dot == 9'(DOTS_PER_LINE - 1)) begin
          dot <= '0;
          ly  <= (ly == 8'd153) ? 8'd0 : ly + 8'd1;
          if (ly == 8'd143) irq_vblank <= 1'b1;
        end else dot <= dot + 9'd1;
      end
    end
  end
endmodule
