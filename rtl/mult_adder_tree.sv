// mult_adder_tree: the arithmetic of one 3x3 convolution step.
//
// Nine 4x4-bit unsigned multipliers form the products of each sample with the
// coefficient in the same row and column; a balanced tree of adders sums them.
// The largest possible sum is 15*15*9 = 2025, which needs 11 bits; it is
// zero-extended to the 16-bit result word. When conv_en is high at a rising
// clock edge the sum is captured in the internal result register, and
// result_ready is high for exactly the following cycle, while result holds the
// new value, so that it can drive the FIFO write enable directly. Latency is
// one cycle from conv_en to result_ready. The registered output and the
// result_ready handshake follow the reference architecture; the adder tree
// shape and the single-cycle latency are this design's choices.
module mult_adder_tree
  import conv_pkg::*;
(
  input  logic             clk,
  input  logic             n_rst,
  input  logic [WIN_W-1:0] sample_in,
  input  logic [WIN_W-1:0] coeff_in,
  input  logic             conv_en,
  output logic [RES_W-1:0] result,
  output logic             result_ready
);

  localparam int unsigned PROD_W = 2 * PIX_W;   // 8 bits, max 225
  localparam int unsigned SUM_W  = PROD_W + 4;  // 12 bits, max 2025 fits

  logic [PROD_W-1:0] prod [9];
  logic [SUM_W-1:0]  sum_l1 [5];
  logic [SUM_W-1:0]  sum_l2 [3];
  logic [SUM_W-1:0]  sum;

  always_comb begin
    for (int i = 0; i < 9; i++) begin
      prod[i] = PROD_W'(sample_in[i*PIX_W +: PIX_W]) * PROD_W'(coeff_in[i*PIX_W +: PIX_W]);
    end
    for (int i = 0; i < 4; i++) begin
      sum_l1[i] = SUM_W'(prod[2*i]) + SUM_W'(prod[2*i+1]);
    end
    sum_l1[4] = SUM_W'(prod[8]);
    sum_l2[0] = sum_l1[0] + sum_l1[1];
    sum_l2[1] = sum_l1[2] + sum_l1[3];
    sum_l2[2] = sum_l1[4];
    sum       = sum_l2[0] + sum_l2[1] + sum_l2[2];
  end

  always_ff @(posedge clk or negedge n_rst) begin
    if (!n_rst) begin
      result       <= '0;
      result_ready <= 1'b0;
    end else begin
      result_ready <= conv_en;
      if (conv_en) result <= RES_W'(sum);
    end
  end

endmodule
