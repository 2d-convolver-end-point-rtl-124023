// sample_shift_reg: the 3x3 sample window of the convolver.
//
// Three 12-bit column positions hold the nine 4-bit samples. When shift_en is
// high at a rising clock edge the bottom 12 bits of col_in enter the right-most
// position (column 2) and the older columns move one place left, so that after
// three shifts the first column written sits in column 0, next to the left-most
// coefficient column. All 36 bits are presented on sample_out at once, straight
// from the flip-flops. The 16-bit input with only 12 bits used and the 36-bit
// parallel output follow the reference architecture; the shift direction and
// the asynchronous clear to zero are this design's choices.
module sample_shift_reg
  import conv_pkg::*;
(
  input  logic              clk,
  input  logic              n_rst,
  input  logic [DATA_W-1:0] col_in,
  input  logic              shift_en,
  output logic [WIN_W-1:0]  sample_out
);

  logic [COL_W-1:0] col_q [3];

  always_ff @(posedge clk or negedge n_rst) begin
    if (!n_rst) begin
      col_q[0] <= '0;
      col_q[1] <= '0;
      col_q[2] <= '0;
    end else if (shift_en) begin
      col_q[0] <= col_q[1];
      col_q[1] <= col_q[2];
      col_q[2] <= col_in[COL_W-1:0];
    end
  end

  assign sample_out = {col_q[2], col_q[1], col_q[0]};

endmodule
