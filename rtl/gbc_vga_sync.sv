// Raster generator for the 640x480 monitor mode.
//
// Counts pixels (x) and lines (y) on every pixel enable (25 MHz): H_ACTIVE visible
// pixels, then front porch, sync pulse and back porch; likewise for lines. de is high for
// visible pixels. hs and vs are active-high pulses (the polarity the DVI transmitter is
// programmed for). All outputs are registered and change only on a pixel enable.
// The 640x480 resolution is the document's; the porch and pulse lengths are the usual
// 640x480 @ 60 Hz numbers (800 x 525 totals), this design's choice.
module gbc_vga_sync #(
  parameter int H_ACTIVE = 640, H_FP = 16, H_SYNC = 96, H_BP = 48,
  parameter int V_ACTIVE = 480, V_FP = 10, V_SYNC = 2,  V_BP = 33
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pix_en,  // one pixel period
  output logic [9:0] x,       // pixel in line, 0 .. H total - 1
  output logic [9:0] y,       // line in frame, 0 .. V total - 1
  output logic       de,      // visible pixel
  output logic       hs,      // horizontal sync
  output logic       vs       // vertical sync
);
  localparam int HT = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int VT = V_ACTIVE + V_FP + V_SYNC + V_BP;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0;  y <= '0;
    end else if (pix_en) begin
      if (x == 10'(HT - 1)) begin
        x <= '0;
        y <= (y == 10'(VT - 1)) ? '0 : y + 10'd1;
      end else x <= x + 10'd1;
    end
  end

  assign de = (x < 10'(H_ACTIVE)) && (y < 10'(V_ACTIVE));
  assign hs = (x >= 10'(H_ACTIVE + H_FP)) && (x < 10'(H_ACTIVE + H_FP + H_SYNC));
  assign vs = (y >= 10'(V_ACTIVE + V_FP)) && (y < 10'(V_ACTIVE + V_FP + V_SYNC));
endmodule
