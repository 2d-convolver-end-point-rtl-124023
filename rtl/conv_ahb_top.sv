// conv_ahb_top: 2D convolver end-point peripheral for an AHB-Lite SoC.
//
// A CPU on the AHB-Lite bus writes three 12-bit coefficient columns and a load
// command, then streams 12-bit sample columns, one command per column. Once a
// 3x3 window is full, every further column produces one 3x3 multiply-add
// result, which is queued in a 1352-entry result FIFO that the CPU drains by
// reading one address. The blocks and the nets between them follow the
// reference architecture:
//   ahb_lite_slave   bus protocol, value registers, status and command bytes
//   conv_controller  state machine (modwait, sample_stream, shift, convolve,
//                    coefficient load sequencing)
//   sample_shift_reg 3 x 12-bit sample window
//   coeff_reg        3 x 12-bit coefficient kernel
//   mult_adder_tree  nine multipliers, adder tree and result register
//   result_fifo      FIFO_DEPTH x 16-bit result buffer
// Ports: clk (100 MHz target), asynchronous active-low n_rst, and the AHB-Lite
// slave signals with a 4-bit byte address and 16-bit data buses. hready is the
// slave's ready output; see ahb_lite_slave for the transfer timing. The FIFO
// full flag, which the reference architecture leaves optional, is wired to
// status bit 9.
module conv_ahb_top
  import conv_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 1352
) (
  input  logic              clk,
  input  logic              n_rst,
  input  logic              hsel,
  input  logic [ADDR_W-1:0] haddr,
  input  logic [1:0]        htrans,
  input  logic [2:0]        hsize,
  input  logic              hwrite,
  input  logic [DATA_W-1:0] hwdata,
  output logic [DATA_W-1:0] hrdata,
  output logic              hready,
  output logic              hresp
);

  logic [DATA_W-1:0] col_out, coeff_col;
  logic [1:0]        coeff_sel;
  logic              coeff_load_en, sample_load_en, new_row;
  logic              modwait, sample_stream;
  logic              sample_shift, convolve_en, coeff_ld;
  logic [WIN_W-1:0]  sample_out, coeff_out;
  logic [RES_W-1:0]  result, result_out;
  logic              result_ready;
  logic              read_enable, empty, full;

  ahb_lite_slave u_slave (
    .clk           (clk),
    .n_rst         (n_rst),
    .hsel          (hsel),
    .haddr         (haddr),
    .htrans        (htrans),
    .hsize         (hsize),
    .hwrite        (hwrite),
    .hwdata        (hwdata),
    .hrdata        (hrdata),
    .hready        (hready),
    .hresp         (hresp),
    .col_out       (col_out),
    .coeff_out     (coeff_col),
    .coeff_sel     (coeff_sel),
    .coeff_load_en (coeff_load_en),
    .sample_load_en(sample_load_en),
    .new_row       (new_row),
    .modwait       (modwait),
    .sample_stream (sample_stream),
    .empty         (empty),
    .full          (full),
    .result_in     (result_out),
    .read_enable   (read_enable)
  );

  conv_controller u_ctrl (
    .clk           (clk),
    .n_rst         (n_rst),
    .coeff_load_en (coeff_load_en),
    .sample_load_en(sample_load_en),
    .new_row       (new_row),
    .modwait       (modwait),
    .sample_stream (sample_stream),
    .sample_shift  (sample_shift),
    .convolve_en   (convolve_en),
    .coeff_ld      (coeff_ld),
    .coeff_sel     (coeff_sel)
  );

  sample_shift_reg u_samples (
    .clk       (clk),
    .n_rst     (n_rst),
    .col_in    (col_out),
    .shift_en  (sample_shift),
    .sample_out(sample_out)
  );

  coeff_reg u_coeffs (
    .clk      (clk),
    .n_rst    (n_rst),
    .coeff_in (coeff_col),
    .coeff_sel(coeff_sel),
    .coeff_ld (coeff_ld),
    .coeff_out(coeff_out)
  );

  mult_adder_tree u_mac (
    .clk         (clk),
    .n_rst       (n_rst),
    .sample_in   (sample_out),
    .coeff_in    (coeff_out),
    .conv_en     (convolve_en),
    .result      (result),
    .result_ready(result_ready)
  );

  result_fifo #(
    .DEPTH(FIFO_DEPTH),
    .WIDTH(RES_W)
  ) u_fifo (
    .clk       (clk),
    .n_rst     (n_rst),
    .wenable   (result_ready),
    .result_in (result),
    .renable   (read_enable),
    .result_out(result_out),
    .empty     (empty),
    .full      (full)
  );

endmodule
