// ahb_lite_slave: AHB-Lite slave interface of the 2D convolver.
//
// Holds the bus-visible value registers (new sample column 0x4, coefficient
// columns R0-R2 at 0x6/0x8/0xA, command byte 0xC), builds the read-only status
// word (0x0) and pops the result FIFO on reads of 0x2. An AHB-Lite transfer has
// an address phase and a data phase one cycle later:
//   * Address phase. The address decoder checks the request. A good request
//     is accepted at the rising edge that ends the phase; its register select,
//     byte lanes and direction are kept for the data phase. A read also
//     captures its data in the HRDATA register at that edge, so HRDATA is
//     valid, from a flip-flop, throughout the data phase; a read of 0x2 pulses
//     read_enable in the same cycle so that the FIFO advances to its next word.
//   * Data phase of a write. HWDATA is written into the selected register at
//     the edge that ends the data phase, through its byte lanes.
// A read in the address phase that overlaps the data phase of a write to the
// same register returns the value being written (the read mux looks at the
// register's next value).
// Error response: a bad request (see ahb_addr_decoder) gets HRESP high and
// HREADY low in its first cycle, which holds the address phase for a second
// cycle, then HRESP high with HREADY high. The bad transfer is never carried
// out; a master normally replaces it with IDLE in the second cycle. HREADY is
// low in no other case: every good transfer completes in one address and one
// data cycle. There is no HREADY input: the slave treats its own HREADYOUT as
// the bus HREADY, as it is the only slave the top-level ports provide for.
// Commands: a write to 0xC stores the byte; while it is non-zero its bits 0, 1
// and 2 drive coeff_load_en, sample_load_en and new_row. The byte clears
// itself in the first cycle in which the controller is idle (modwait low),
// which is the cycle in which the controller takes the command. The busy bit of
// the status word is modwait or a pending or just-written command, so software
// polling right after writing a command never sees a false "not busy".
// Status word: bit 0 busy, bit 7 FIFO empty, bit 8 sample streaming, bit 9 FIFO
// full (the last one is this design's addition). The register map, the
// registered HRDATA, the value registers, the automatic FIFO read pulse and the
// error handshake follow the peripheral's specification; the self-clearing
// command byte, the busy extension, the read-after-write forwarding and the
// size checks are this design's choices.
module ahb_lite_slave
  import conv_pkg::*;
(
  input  logic              clk,
  input  logic              n_rst,
  // AHB-Lite
  input  logic              hsel,
  input  logic [ADDR_W-1:0] haddr,
  input  logic [1:0]        htrans,
  input  logic [2:0]        hsize,
  input  logic              hwrite,
  input  logic [DATA_W-1:0] hwdata,
  output logic [DATA_W-1:0] hrdata,
  output logic              hready,
  output logic              hresp,
  // to the sample shift register
  output logic [DATA_W-1:0] col_out,
  // to the coefficient register, column chosen by the controller
  output logic [DATA_W-1:0] coeff_out,
  input  logic [1:0]        coeff_sel,
  // controller
  output logic              coeff_load_en,
  output logic              sample_load_en,
  output logic              new_row,
  input  logic              modwait,
  input  logic              sample_stream,
  // result FIFO
  input  logic              empty,
  input  logic              full,
  input  logic [RES_W-1:0]  result_in,
  output logic              read_enable
);

  // ---------------- address phase ----------------
  reg_sel_t   a_sel;
  logic [1:0] a_lanes;
  logic       a_bad;
  logic       a_valid;      // an active transfer is being requested
  logic       err_first;    // first cycle of an error response
  logic       err_q;        // second cycle of an error response
  logic       accept;       // a good address phase completes this cycle

  ahb_addr_decoder u_dec (
    .haddr (haddr),
    .hsize (hsize),
    .hwrite(hwrite),
    .sel   (a_sel),
    .lanes (a_lanes),
    .bad   (a_bad)
  );

  assign a_valid   = hsel && (htrans == HTRANS_NONSEQ || htrans == HTRANS_SEQ);
  assign err_first = a_valid && a_bad && !err_q;
  assign hready    = !err_first;
  assign hresp     = err_first || err_q;
  assign accept    = hready && a_valid && !a_bad;

  // ---------------- data phase ----------------
  logic       d_write;      // a write is in its data phase
  reg_sel_t   d_sel;
  logic [1:0] d_lanes;
  logic       do_write;

  assign do_write = d_write && hready;

  always_ff @(posedge clk or negedge n_rst) begin
    if (!n_rst) begin
      err_q   <= 1'b0;
      d_write <= 1'b0;
      d_sel   <= REG_NONE;
      d_lanes <= '0;
    end else begin
      err_q <= err_first;
      if (hready) begin
        d_write <= accept && hwrite;
        d_sel   <= a_sel;
        d_lanes <= a_lanes;
      end
    end
  end

  // ---------------- value registers ----------------
  logic [DATA_W-1:0] sample_q, coef_q [3];
  logic [7:0]        cmd_q;
  logic [DATA_W-1:0] sample_n, coef_n [3];
  logic [7:0]        cmd_n;
  logic              cmd_written;

  function automatic logic [DATA_W-1:0] merge(input logic [DATA_W-1:0] old,
                                              input logic [DATA_W-1:0] wd,
                                              input logic [1:0]        ln);
    merge = old;
    if (ln[0]) merge[7:0]  = wd[7:0];
    if (ln[1]) merge[15:8] = wd[15:8];
  endfunction

  always_comb begin
    sample_n    = sample_q;
    coef_n[0]   = coef_q[0];
    coef_n[1]   = coef_q[1];
    coef_n[2]   = coef_q[2];
    cmd_written = do_write && d_sel == REG_CMD;
    // a pending command is taken by the controller while it is idle
    cmd_n       = (cmd_q != '0 && !modwait) ? '0 : cmd_q;
    if (do_write) begin
      unique case (d_sel)
        REG_SAMPLE: sample_n  = merge(sample_q,  hwdata, d_lanes);
        REG_COEF0:  coef_n[0] = merge(coef_q[0], hwdata, d_lanes);
        REG_COEF1:  coef_n[1] = merge(coef_q[1], hwdata, d_lanes);
        REG_COEF2:  coef_n[2] = merge(coef_q[2], hwdata, d_lanes);
        REG_CMD:    if (d_lanes[0]) cmd_n = hwdata[7:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge n_rst) begin
    if (!n_rst) begin
      sample_q <= '0;
      coef_q[0] <= '0;
      coef_q[1] <= '0;
      coef_q[2] <= '0;
      cmd_q    <= '0;
    end else begin
      sample_q  <= sample_n;
      coef_q[0] <= coef_n[0];
      coef_q[1] <= coef_n[1];
      coef_q[2] <= coef_n[2];
      cmd_q     <= cmd_n;
    end
  end

  assign col_out        = sample_q;
  assign coeff_out      = (coeff_sel == 2'd3) ? '0 : coef_q[coeff_sel];
  assign coeff_load_en  = cmd_q[CMD_LOAD_COEF];
  assign sample_load_en = cmd_q[CMD_LOAD_SAMP];
  assign new_row        = cmd_q[CMD_NEW_ROW];

  // ---------------- read path and HRDATA register ----------------
  logic              busy;
  logic [DATA_W-1:0] status;
  logic [DATA_W-1:0] rd_val;
  logic              rd_fifo;

  assign busy = modwait || (cmd_q != '0) || (cmd_written && hwdata[7:0] != '0);

  always_comb begin
    status             = '0;
    status[ST_MODWAIT] = busy;
    status[ST_EMPTY]   = empty;
    status[ST_STREAM]  = sample_stream;
    status[ST_FULL]    = full;
    unique case (a_sel)
      REG_STATUS: rd_val = status;
      REG_RESULT: rd_val = empty ? '0 : DATA_W'(result_in);
      REG_SAMPLE: rd_val = sample_n;
      REG_COEF0:  rd_val = coef_n[0];
      REG_COEF1:  rd_val = coef_n[1];
      REG_COEF2:  rd_val = coef_n[2];
      REG_CMD:    rd_val = {8'h00, cmd_n};
      default:    rd_val = '0;
    endcase
  end

  assign rd_fifo     = accept && !hwrite && a_sel == REG_RESULT;
  assign read_enable = rd_fifo && !empty;

  always_ff @(posedge clk or negedge n_rst) begin
    if (!n_rst)                  hrdata <= '0;
    else if (accept && !hwrite)  hrdata <= rd_val;
  end

  // ---------------- protocol rules ----------------
  // HREADY is only pulled low as the first cycle of an error response ...
  a_stall_is_error: assert property (@(posedge clk) disable iff (!n_rst) !hready |-> hresp);
  // ... which is always followed by the second, HREADY-high, error cycle.
  a_error_two_cycles: assert property (@(posedge clk) disable iff (!n_rst)
                                       (hresp && !hready) |=> (hresp && hready));

endmodule
