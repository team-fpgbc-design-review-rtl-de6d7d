// SNES controller reader. The pad is a 16-bit parallel-in shift register: a latch pulse
// loads the buttons and each clock pulse shifts the next one out on the data line.
//
// Sequence, in microsecond steps of US_CYCLES clocks: latch high for 12 us; then 16 clock
// periods of 12 us (6 us low, 6 us high), the first falling clock edge 6 us after the
// latch falls; the data line is sampled at every falling clock edge, giving B, Y,
// Select, Start, Up, Down, Left, Right, A, X, L, R and four bits that are always high.
// Then the reader waits IDLE_US (16.67 ms) before the next poll. Buttons are active low
// on the wire and are kept so: pad_n bit i is the i-th bit read, updated with a one-clock
// valid pulse at the end of each poll. The data input passes two flip-flops first.
// The pulse widths, edge count, bit order and idle time are the document's; the
// 100 MHz clock and the idle clock level (high) are this design's.
module gbc_snes_ctrl #(
  parameter int US_CYCLES = 100,   // clocks per microsecond
  parameter int IDLE_US   = 16670  // time between polls
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        snes_latch,  // to the pad
  output logic        snes_clk,    // to the pad
  input  logic        snes_data,   // from the pad, active low
  output logic [15:0] pad_n,       // last word read, 0 = pressed
  output logic        valid        // pad_n updated
);
  typedef enum logic [1:0] {LATCH, GAP, SHIFT, WAIT} st_e;
  st_e         st;
  logic [$clog2(US_CYCLES+1)-1:0] us_cnt;
  logic        us_tick;
  logic [14:0] t;        // microseconds in the current state
  logic [4:0]  nbit;
  logic [15:0] sh;
  logic [1:0]  sync;

  assign us_tick = (us_cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= WAIT;  us_cnt <= '0;  t <= '0;  nbit <= '0;  sh <= '1;  sync <= '1;
      pad_n <= '1;  valid <= 1'b0;  snes_latch <= 1'b0;  snes_clk <= 1'b1;
    end else begin
      sync  <= {sync[0], snes_data};
      valid <= 1'b0;
      us_cnt <= us_tick ? ($bits(us_cnt))'(US_CYCLES - 1) : us_cnt - 1'b1;
      if (us_tick) begin
        t <= t + 15'd1;
        unique case (st)
          WAIT:  if (t >= 15'(IDLE_US - 1)) begin st <= LATCH; t <= '0; snes_latch <= 1'b1; end
          LATCH: if (t == 15'd11) begin st <= GAP; t <= '0; snes_latch <= 1'b0; end
          GAP:   if (t == 15'd5) begin
                   st <= SHIFT;  t <= '0;  nbit <= '0;  snes_clk <= 1'b0;
                   sh <= {sync[1], sh[15:1]};           // falling edge: sample bit 0
                 end
          default: begin                                 // SHIFT
            if (t == 15'd5) snes_clk <= 1'b1;
            if (t == 15'd11) begin
              t <= '0;
              if (nbit == 5'd15) begin
                st <= WAIT;  pad_n <= sh;  valid <= 1'b1;
              end else begin
                nbit <= nbit + 5'd1;  snes_clk <= 1'b0;
                sh <= {sync[1], sh[15:1]};
              end
            end
          end
        endcase
      end
    end
  end
endmodule
