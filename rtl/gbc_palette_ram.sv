// Colour palette memories for the background and for sprites: each holds 8 palettes of
// 4 colours, a colour being a 15-bit word stored as two bytes (L at even, H at odd index).
//
// The CPU reaches them only through the specification and data registers: BCPS (FF68)
// and BCPD (FF69) for the background, OCPS (FF6A) and OCPD (FF6B) for sprites. Bits 5-0 of
// the specification register address a byte ({palette, colour, H/L}); when its bit 7 is
// set, every write to the data register advances bits 5-0 by one (wrapping at 63).
// Reading the data register returns the addressed byte. The pixel pipeline reads whole
// colours combinationally: colour word {H, L} gives red = L[4:0], green = {H[1:0], L[7:5]},
// blue = H[6:2].
// Everything here is the document's except the reset value of the specification
// registers (0) and the read-back of unused bit 6 as 1.
module gbc_palette_ram
  import gbc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  io_req_t    io_req,   // register bus
  output io_rsp_t    io_rsp,   // BCPS/BCPD/OCPS/OCPD read data
  input  logic [2:0] bg_pal,   // background palette number
  input  logic [1:0] bg_dot,   // colour within it
  output rgb15_t     bg_rgb,   // its colour
  input  logic [2:0] obj_pal,  // sprite palette number
  input  logic [1:0] obj_dot,  // colour within it
  output rgb15_t     obj_rgb   // its colour
);
  logic [7:0] bg_mem [64];
  logic [7:0] obj_mem[64];
  logic [7:0] bcps, ocps;

  function automatic rgb15_t word(logic [7:0] h, logic [7:0] l);
    return '{b: h[6:2], g: {h[1:0], l[7:5]}, r: l[4:0]};
  endfunction

  assign bg_rgb  = word(bg_mem[{bg_pal, bg_dot, 1'b1}],   bg_mem[{bg_pal, bg_dot, 1'b0}]);
  assign obj_rgb = word(obj_mem[{obj_pal, obj_dot, 1'b1}], obj_mem[{obj_pal, obj_dot, 1'b0}]);

  always_comb begin
    unique case (io_req.addr)
      A_BCPS:  io_rsp = '{hit: 1'b1, rdata: {bcps[7], 1'b1, bcps[5:0]}};
      A_BCPD:  io_rsp = '{hit: 1'b1, rdata: bg_mem[bcps[5:0]]};
      A_OCPS:  io_rsp = '{hit: 1'b1, rdata: {ocps[7], 1'b1, ocps[5:0]}};
      A_OCPD:  io_rsp = '{hit: 1'b1, rdata: obj_mem[ocps[5:0]]};
      default: io_rsp = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcps <= '0;  ocps <= '0;
    end else if (io_req.wr) begin
      unique case (io_req.addr)
        A_BCPS: bcps <= io_req.wdata;
        A_OCPS: ocps <= io_req.wdata;
        A_BCPD: if (bcps[7]) bcps[5:0] <= bcps[5:0] + 6'd1;
        A_OCPD: if (ocps[7]) ocps[5:0] <= ocps[5:0] + 6'd1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (io_req.wr && io_req.addr == A_BCPD) bg_mem[bcps[5:0]]  <= io_req.wdata;
    if (io_req.wr && io_req.addr == A_OCPD) obj_mem[ocps[5:0]] <= io_req.wdata;
  end
endmodule
