// result_fifo: first-in-first-out buffer for convolution results.
//
// DEPTH words of WIDTH bits (1352 x 16 by default) sit in a memory array
// addressed by a write pointer and a read pointer that each wrap from DEPTH-1
// back to 0; an occupancy counter gives the empty and full flags. Both sides
// run on the one clock. A write (wenable high at a rising edge) stores
// result_in and advances the write pointer; a read (renable high) advances the
// read pointer. result_out always shows the oldest stored word (show-ahead), so
// a reader samples result_out in the same cycle as it raises renable. A read
// of an empty buffer is ignored; a write to a full buffer is dropped unless a
// read in the same cycle frees a place. The size, the two enables, the
// pointers and the empty flag follow the reference architecture; the full flag,
// the show-ahead output and the behaviour at the limits are this design's.
module result_fifo
  import conv_pkg::*;
#(
  parameter int unsigned DEPTH = 1352,
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             n_rst,
  input  logic             wenable,
  input  logic [WIDTH-1:0] result_in,
  input  logic             renable,
  output logic [WIDTH-1:0] result_out,
  output logic             empty,
  output logic             full
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);
  localparam logic [PTR_W-1:0] LAST = PTR_W'(DEPTH - 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wptr, rptr;
  logic [CNT_W-1:0] count;
  logic             do_write, do_read;

  assign empty    = (count == '0);
  assign full     = (count == CNT_W'(DEPTH));
  assign do_read  = renable && !empty;
  assign do_write = wenable && (!full || do_read);

  always_ff @(posedge clk) begin
    if (do_write) mem[wptr] <= result_in;
  end

  always_ff @(posedge clk or negedge n_rst) begin
    if (!n_rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_write) wptr <= (wptr == LAST) ? '0 : wptr + 1'b1;
      if (do_read)  rptr <= (rptr == LAST) ? '0 : rptr + 1'b1;
      case ({do_write, do_read})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // An empty buffer shows zero rather than a stale word.
  assign result_out = empty ? '0 : mem[rptr];

  // The occupancy can never leave 0..DEPTH.
  a_count_range: assert property (@(posedge clk) disable iff (!n_rst) count <= CNT_W'(DEPTH));

endmodule
