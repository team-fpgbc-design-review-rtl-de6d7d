// Display controller: shows the 160x144 Game Boy screen on a 640x480 DVI monitor without
// a framebuffer, asking the pixel unit for each dot just before it is needed.
//
// The system clock is four times the 25 MHz pixel rate; phase counts the four clocks of
// a pixel. Each Game Boy dot is drawn as a SCALE x SCALE block (480x432 for SCALE = 3),
// placed at (HOFF, VOFF) so that it is centred; the border is black. On a line inside
// the picture, the dot gx is requested from the pixel unit (ppu_req, one clock) when
// the raster reaches the start of dot gx-1's block, and its colour is shown from the
// start of its own block: the pixel unit has SCALE pixel periods (12 clocks) for each
// dot. late pulses if a colour was not ready in time.
// For the sprite selector, scan_start pulses at the start of every line with the
// screen row of the line that follows (when that line is in the picture), and swap
// pulses when the horizontal blank begins, so the sprites found during a line are used
// on the next.
// The 640x480 mode, the framebuffer-less on-the-fly colour, the faster clock for the
// sequential reads and the sprite swap at horizontal blank are the document's; the
// scaling, placement, border and the one-dot-ahead schedule are this design's.
module gbc_display
  import gbc_pkg::*;
#(
  parameter int SCALE = 3,
  parameter int HOFF  = 80,
  parameter int VOFF  = 24,
  parameter int GB_W  = 160,
  parameter int GB_H  = 144,
  parameter int H_ACTIVE = 640, H_FP = 16, H_SYNC = 96, H_BP = 48,
  parameter int V_ACTIVE = 480, V_FP = 10, V_SYNC = 2,  V_BP = 33
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        ppu_req,     // compute dot (ppu_gx, ppu_gy)
  output logic [7:0]  ppu_gx,
  output logic [7:0]  ppu_gy,
  input  logic        ppu_done,    // colour ready
  input  rgb15_t      ppu_rgb,
  output logic        scan_start,  // select sprites for screen row scan_gy
  output logic [7:0]  scan_gy,
  output logic        swap,        // horizontal blank begins
  output logic        late,        // a dot's colour was not ready in time
  output logic        frame_start, // first pixel of a frame
  output logic [11:0] dvi_d,       // to the DVI transmitter
  output logic        dvi_xclk,
  output logic        dvi_xclk_n,
  output logic        dvi_de,
  output logic        dvi_h,
  output logic        dvi_v
);
  localparam int HT = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int VT = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int SW = $clog2(SCALE + 1);

  logic [1:0] phase;
  logic       pix_en;
  logic [9:0] x, y;
  logic       de, hs, vs;

  assign pix_en = (phase == 2'd3);

  gbc_vga_sync #(.H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
                 .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)) u_sync (
    .clk, .rst_n, .pix_en, .x, .y, .de, .hs, .vs
  );

  // ---- picture rows ----
  logic          row_in, n_in;
  logic [7:0]    gy, n_gy;
  logic [SW-1:0] suby, n_suby;
  logic [9:0]    ny;
  always_comb begin
    ny = (y == 10'(VT - 1)) ? '0 : y + 10'd1;
    n_in = 1'b0;  n_gy = gy;  n_suby = suby;
    if (ny == 10'(VOFF)) begin
      n_in = 1'b1;  n_gy = '0;  n_suby = '0;
    end else if (row_in) begin
      if (suby == SW'(SCALE - 1)) begin
        n_suby = '0;
        n_gy   = gy + 8'd1;
        n_in   = (gy != 8'(GB_H - 1));
      end else begin
        n_suby = suby + 1'b1;
        n_in   = 1'b1;
      end
    end
  end

  // ---- dots along a line ----
  logic          run, event_now, pend;
  logic [8:0]    k;
  logic [SW-1:0] subx;
  rgb15_t        cur, nxt;
  assign event_now = pix_en && run && subx == SW'(SCALE - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;  row_in <= 1'b0;  gy <= '0;  suby <= '0;
      run <= 1'b0;  k <= '0;  subx <= '0;  cur <= '0;  nxt <= '0;  pend <= 1'b0;
      ppu_req <= 1'b0;  ppu_gx <= '0;  ppu_gy <= '0;
      scan_start <= 1'b0;  scan_gy <= '0;  swap <= 1'b0;  late <= 1'b0;
    end else begin
      phase <= phase + 2'd1;
      ppu_req <= 1'b0;  scan_start <= 1'b0;  swap <= 1'b0;  late <= 1'b0;
      if (ppu_done) begin nxt <= ppu_rgb; pend <= 1'b0; end
      if (pix_en) begin
        if (x == 10'(HT - 1)) begin
          row_in <= n_in;  gy <= n_gy;  suby <= n_suby;
        end
        if (x == '0 && n_in) begin
          scan_start <= 1'b1;  scan_gy <= n_gy;
        end
        if (x == 10'(H_ACTIVE)) swap <= 1'b1;
        if (row_in && x == 10'(HOFF - SCALE)) begin
          run <= 1'b1;  k <= 9'd1;  subx <= '0;
          ppu_req <= 1'b1;  ppu_gx <= '0;  ppu_gy <= gy;  pend <= 1'b1;
        end else if (run) begin
          if (subx == SW'(SCALE - 1)) begin
            subx <= '0;
            cur  <= nxt;
            if (pend && !ppu_done) late <= 1'b1;
            if (k < 9'(GB_W)) begin
              ppu_req <= 1'b1;  ppu_gx <= 8'(k);  pend <= 1'b1;
            end
            if (k == 9'(GB_W)) run <= 1'b0;
            k <= k + 9'd1;
          end else subx <= subx + 1'b1;
        end
      end
    end
  end

  // ---- colour of the pixel at x ----
  rgb15_t shown;
  logic   in_pic;
  assign shown  = event_now ? (ppu_done ? ppu_rgb : nxt) : cur;
  assign in_pic = row_in && x >= 10'(HOFF) && x < 10'(HOFF + SCALE * GB_W);

  logic [23:0] rgb24;
  assign rgb24 = in_pic ? {shown.r, shown.r[4:2], shown.g, shown.g[4:2], shown.b, shown.b[4:2]}
                        : 24'h000000;

  assign frame_start = pix_en && x == '0 && y == '0;

  gbc_chrontel_out u_out (
    .clk, .rst_n, .phase, .rgb(rgb24), .de_in(de), .hs_in(hs), .vs_in(vs),
    .d(dvi_d), .xclk(dvi_xclk), .xclk_n(dvi_xclk_n), .de(dvi_de), .h(dvi_h), .v(dvi_v)
  );
endmodule
