// Testbench for the priority mixer: every input combination is compared with the
// display priority table (transparent colour 0, BG attribute priority, OBJ priority,
// LCDC bit 0 master priority, sprites disabled).
module tb_gbc_pixel_mix;
  logic bg_master, obj_en, bg_prio, obj_hit, obj_prio, show_obj;
  logic [1:0] bg_dot, obj_dot;
  int checks = 0, failures = 0;
  gbc_pixel_mix dut (.*);
  initial begin #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int v = 0; v < 512; v++) begin
      logic exp;
      {bg_master, obj_en, bg_prio, obj_hit, obj_prio} = 5'(v >> 4);
      bg_dot = 2'(v >> 2);  obj_dot = 2'(v);
      #1;
      // expected, written as the table reads
      if (!(obj_en && obj_hit) || obj_dot == 0) exp = 0;       // no or transparent sprite
      else if (bg_dot == 0) exp = 1;                            // transparent background
      else if (!bg_master) exp = 1;                             // background lost priority
      else if (bg_prio == 1) exp = 0;                           // "highest priority to BG"
      else exp = (obj_prio == 0);                               // OBJ flag decides
      checks++;
      if (show_obj !== exp) begin failures++;
        $display("FAIL v=%0d show=%b exp=%b", v, show_obj, exp); end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
