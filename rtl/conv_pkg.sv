// conv_pkg: types and constants shared by the 2D convolver peripheral.
//
// The convolver multiplies a 3x3 kernel of 4-bit unsigned coefficients with a
// 3x3 window of 4-bit unsigned samples and sums the nine products. Samples and
// coefficients travel as 12-bit columns of three 4-bit values (row 0 in bits
// 3:0, row 1 in bits 7:4, row 2 in bits 11:8); a 36-bit kernel or window holds
// column 0 (left-most) in bits 11:0, column 1 in 23:12 and column 2 in 35:24.
// The register map, the status bits and the command bits follow the
// peripheral's published address map; the row order inside a column and the
// column order inside the 36-bit word are this design's own choice.
package conv_pkg;

  localparam int unsigned ADDR_W  = 4;   // HADDR width
  localparam int unsigned DATA_W  = 16;  // HWDATA / HRDATA width
  localparam int unsigned PIX_W   = 4;   // one sample or coefficient
  localparam int unsigned COL_W   = 3 * PIX_W;  // one column: 12 bits
  localparam int unsigned WIN_W   = 3 * COL_W;  // whole 3x3 window: 36 bits
  localparam int unsigned RES_W   = 16;  // result word stored in the FIFO

  // AHB-Lite HTRANS encoding
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'd0,
    HTRANS_BUSY   = 2'd1,
    HTRANS_NONSEQ = 2'd2,
    HTRANS_SEQ    = 2'd3
  } htrans_t;

  // Register selected by an address (one per 16-bit word of the map):
  // status 0x0, result 0x2, sample column 0x4, coefficient columns R0-R2
  // 0x6/0x8/0xA, command byte 0xC
  typedef enum logic [2:0] {
    REG_STATUS = 3'd0,
    REG_RESULT = 3'd1,
    REG_SAMPLE = 3'd2,
    REG_COEF0  = 3'd3,
    REG_COEF1  = 3'd4,
    REG_COEF2  = 3'd5,
    REG_CMD    = 3'd6,
    REG_NONE   = 3'd7
  } reg_sel_t;

  // Status register bits
  localparam int unsigned ST_MODWAIT = 0;
  localparam int unsigned ST_EMPTY   = 7;
  localparam int unsigned ST_STREAM  = 8;
  localparam int unsigned ST_FULL    = 9;   // optional full flag, this design's addition

  // Command register bits (bits 1 and 2 together mean "sample complete")
  localparam int unsigned CMD_LOAD_COEF = 0;
  localparam int unsigned CMD_LOAD_SAMP = 1;
  localparam int unsigned CMD_NEW_ROW   = 2;

  // Controller states
  typedef enum logic [2:0] {
    S_IDLE    = 3'd0,
    S_LOAD_C0 = 3'd1,
    S_LOAD_C1 = 3'd2,
    S_LOAD_C2 = 3'd3,
    S_SHIFT   = 3'd4,
    S_CONV    = 3'd5,
    S_STORE   = 3'd6
  } ctrl_state_t;

endpackage
