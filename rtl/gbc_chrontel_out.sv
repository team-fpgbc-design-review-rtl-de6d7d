// Output stage to the DVI transmitter (CH7301C, clock-slave mode): each 24-bit pixel is
// sent as two 12-bit halves, one per edge of the pixel clock XCLK.
//
// The system clock runs at four times the pixel rate; phase counts 0-3 within a pixel.
// In phases 0-1 the pins carry the first half {G[3:0], B[7:0]}, in phases 2-3 the second
// half {R[7:0], G[7:4]}. XCLK is high in phases 1-2, so each of its edges falls in the
// middle of a half and the data is stable around it. DE, H and V are registered with
// the pixel they belong to.
// The two-halves-per-clock link, the 12-bit bus and the DE/H/V signals are from the
// document's timing figure; the bit order within the halves and the four-phase
// generation are this design's.
module gbc_chrontel_out (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  phase,   // position within the pixel, 3 = last
  input  logic [23:0] rgb,     // {R, G, B} of the next pixel, taken at phase 3
  input  logic        de_in,   // its data enable
  input  logic        hs_in,   // its horizontal sync
  input  logic        vs_in,   // its vertical sync
  output logic [11:0] d,       // data pins
  output logic        xclk,    // pixel clock pins (XCLK, XCLK* is its complement)
  output logic        xclk_n,
  output logic        de,      // data enable pin
  output logic        h,       // horizontal sync pin
  output logic        v        // vertical sync pin
);
  logic [23:0] px;
  logic [1:0]  ph;
  logic        xc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      px <= '0;  ph <= '0;  xc <= 1'b0;  de <= 1'b0;  h <= 1'b0;  v <= 1'b0;
    end else begin
      ph <= phase + 2'd1;
      xc <= (phase == 2'd0) || (phase == 2'd1);  // ph becomes 1 or 2
      if (phase == 2'd3) begin
        px <= de_in ? rgb : 24'h0;
        de <= de_in;  h <= hs_in;  v <= vs_in;
      end
    end
  end

  assign d      = ph[1] ? {px[23:16], px[15:12]} : {px[11:8], px[7:0]};
  assign xclk   = xc;
  assign xclk_n = !xc;
endmodule
