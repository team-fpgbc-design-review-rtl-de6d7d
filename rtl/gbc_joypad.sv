// JOYPAD register (FF00): presents the SNES pad's buttons to the CPU in the Game Boy
// layout, four at a time.
//
// The CPU writes bits 5 and 4 to choose the group: bit 5 set reads the push buttons
// (bit 3 Start, 2 Select, 1 B, 0 A), bit 4 set reads the directions (bit 3 Down, 2 Up,
// 1 Left, 0 Right). A pressed button reads 0; with both groups chosen the two are
// combined, with none the low nibble reads F. Bits 7 and 6 read 1.
// The button word comes from the SNES reader, active low, in the pad's shift order
// (bit 0 B, 1 Y, 2 Select, 3 Start, 4 Up, 5 Down, 6 Left, 7 Right, 8 A, 9 X, 10 L, 11 R).
// The group-select polarity and the nibble order are the document's; the choice of SNES
// A/B for Game Boy A/B (Y, X, L, R unused) is this design's.
module gbc_joypad
  import gbc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] pad_n,   // SNES button word, 0 = pressed
  input  io_req_t     io_req,  // register bus
  output io_rsp_t     io_rsp   // FF00 read data
);
  logic [1:0] sel;  // {buttons, directions}
  logic [3:0] btn_n, dir_n, low;

  assign btn_n = {pad_n[3], pad_n[2], pad_n[0], pad_n[8]};  // Start, Select, B, A
  assign dir_n = {pad_n[5], pad_n[4], pad_n[6], pad_n[7]};  // Down, Up, Left, Right
  assign low   = (sel[1] ? btn_n : 4'hF) & (sel[0] ? dir_n : 4'hF);
  assign io_rsp = (io_req.addr == A_JOYP) ? '{hit: 1'b1, rdata: {2'b11, sel, low}} : '0;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sel <= '0;
    else if (io_req.wr && io_req.addr == A_JOYP) sel <= io_req.wdata[5:4];
endmodule
