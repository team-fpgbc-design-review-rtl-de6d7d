// Behavioural model of the SNES game pad's shift register, for testbenches: the latch
// loads the buttons (bit 0 appears on data at once), each rising clock edge shifts the
// next bit out; after the 16th bit data stays low.
module tb_snes_pad (
  input  logic        latch,      // from the reader
  input  logic        clk,        // from the reader
  input  logic [15:0] buttons_n,  // buttons, 0 = pressed, bit 0 shifted first
  output logic        data        // to the reader
);
  logic [15:0] sr = '1;
  always @(posedge latch) sr = buttons_n;
  always @(posedge clk) if (!latch) sr = {1'b0, sr[15:1]};
  assign data = sr[0];
endmodule
