// coeff_reg: the 3x3 coefficient kernel of the convolver.
//
// Three addressable 12-bit column registers hold the nine 4-bit coefficients.
// When coeff_ld is high at a rising clock edge, the bottom 12 bits of coeff_in
// are stored in the column chosen by coeff_sel (0 = left-most, 2 =
// right-most; the value 3 selects nothing). All 36 bits are presented on
// coeff_out at once. The three addressable columns, the 16-bit input of which
// 12 bits are used and the 36-bit parallel output follow the reference
// architecture; the handling of coeff_sel = 3 and the asynchronous clear to
// zero are this design's choices.
module coeff_reg
  import conv_pkg::*;
(
  input  logic              clk,
  input  logic              n_rst,
  input  logic [DATA_W-1:0] coeff_in,
  input  logic [1:0]        coeff_sel,
  input  logic              coeff_ld,
  output logic [WIN_W-1:0]  coeff_out
);

  logic [COL_W-1:0] col_q [3];

  always_ff @(posedge clk or negedge n_rst) begin
    if (!n_rst) begin
      col_q[0] <= '0;
      col_q[1] <= '0;
      col_q[2] <= '0;
    end else if (coeff_ld && coeff_sel != 2'd3) begin
      col_q[coeff_sel] <= coeff_in[COL_W-1:0];
    end
  end

  assign coeff_out = {col_q[2], col_q[1], col_q[0]};

endmodule
