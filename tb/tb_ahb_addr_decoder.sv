// tb_ahb_addr_decoder: exhaustive check of the address decoder.
// Every combination of address (16), size (8) and direction (2) is compared
// with a reference table built here from the register map: which register an
// address falls in, which byte lanes it touches and whether it must be
// answered with an error.
module tb_ahb_addr_decoder;
  import conv_pkg::*;

  logic [ADDR_W-1:0] haddr;
  logic [2:0] hsize;
  logic hwrite;
  reg_sel_t sel;
  logic [1:0] lanes;
  logic bad;
  int checks = 0, failures = 0;

  ahb_addr_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reg_sel_t e_sel;
    logic [1:0] e_lanes;
    logic e_bad;
    for (int a = 0; a < 16; a++)
      for (int s = 0; s < 8; s++)
        for (int w = 0; w < 2; w++) begin
          haddr = 4'(a); hsize = 3'(s); hwrite = 1'(w);
          #1;
          // register from the map (two bytes per register, 0xC one byte)
          if      (a <= 1)  e_sel = REG_STATUS;
          else if (a <= 3)  e_sel = REG_RESULT;
          else if (a <= 5)  e_sel = REG_SAMPLE;
          else if (a <= 7)  e_sel = REG_COEF0;
          else if (a <= 9)  e_sel = REG_COEF1;
          else if (a <= 11) e_sel = REG_COEF2;
          else if (a == 12) e_sel = REG_CMD;
          else if (a == 13) e_sel = (s == 0) ? REG_NONE : REG_CMD;
          else              e_sel = REG_NONE;
          e_bad = (s > 1) || (s == 1 && a % 2 == 1) || e_sel == REG_NONE ||
                  (w == 1 && a <= 3);
          e_lanes = (s == 0) ? ((a % 2 == 1) ? 2'b10 : 2'b01) : 2'b11;
          if (e_sel == REG_CMD) e_lanes = 2'b01;
          checks++;
          if (bad !== e_bad) begin
            failures++;
            $display("FAIL bad a=%h s=%0d w=%0d: got %b", a, s, w, bad);
          end
          if (!e_bad) begin
            checks++;
            if (sel !== e_sel || lanes !== e_lanes) begin
              failures++;
              $display("FAIL a=%h s=%0d w=%0d: sel %s lanes %b", a, s, w, sel.name(), lanes);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
