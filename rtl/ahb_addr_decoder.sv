// ahb_addr_decoder: address decoder of the AHB-Lite slave interface.
//
// Purely combinational. From the address-phase HADDR, HSIZE and HWRITE it
// works out which register of the map is addressed (sel), which byte lanes of
// the 16-bit data bus the access touches (lanes[0] = bits 7:0 at the even
// address, lanes[1] = bits 15:8 at the odd address, little-endian), and
// whether the access must be answered with an error (bad). An access is bad
// when it
//   * is wider than the 16-bit bus (HSIZE above 1),
//   * is a half-word at an odd address,
//   * falls outside the map (0xE, 0xF) or on the missing upper byte of the
//     one-byte command register (0xD),
//   * writes the read-only status (0x0-0x1) or result (0x2-0x3) register.
// The map and the read-only rule follow the peripheral's address map; the
// size and alignment checks are this design's choice. A half-word access to
// the command register touches only its low byte.
module ahb_addr_decoder
  import conv_pkg::*;
(
  input  logic [ADDR_W-1:0] haddr,
  input  logic [2:0]        hsize,
  input  logic              hwrite,
  output reg_sel_t          sel,
  output logic [1:0]        lanes,
  output logic              bad
);

  logic size_bad;
  logic read_only;

  always_comb begin
    unique case (haddr[3:1])
      3'd0:    sel = REG_STATUS;
      3'd1:    sel = REG_RESULT;
      3'd2:    sel = REG_SAMPLE;
      3'd3:    sel = REG_COEF0;
      3'd4:    sel = REG_COEF1;
      3'd5:    sel = REG_COEF2;
      3'd6:    sel = haddr[0] && hsize == 3'd0 ? REG_NONE : REG_CMD;
      default: sel = REG_NONE;
    endcase

    if (hsize == 3'd0) lanes = haddr[0] ? 2'b10 : 2'b01;
    else               lanes = 2'b11;
    if (sel == REG_CMD) lanes[1] = 1'b0;

    size_bad  = (hsize > 3'd1) || (hsize == 3'd1 && haddr[0]);
    read_only = (sel == REG_STATUS) || (sel == REG_RESULT);
    bad       = size_bad || (sel == REG_NONE) || (hwrite && read_only);
  end

endmodule
