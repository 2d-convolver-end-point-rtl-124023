// tb_mult_adder_tree: self-checking test of the multiply/add datapath.
// Checks the published worked example (samples and coefficients 1..9 give
// 285), the all-15 maximum (2025), and random windows, each against a
// sum-of-products computed here. Checks the one-cycle latency: result_ready is
// high exactly in the cycle after conv_en, and result does not change when
// conv_en is low.
module tb_mult_adder_tree;
  import conv_pkg::*;

  logic clk = 0, n_rst = 0;
  logic [WIN_W-1:0] sample_in, coeff_in;
  logic conv_en;
  logic [RES_W-1:0] result;
  logic result_ready;
  int checks = 0, failures = 0;

  mult_adder_tree dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(input logic [WIN_W-1:0] s, input logic [WIN_W-1:0] c);
    int acc = 0;
    for (int i = 0; i < 9; i++) acc += int'(s[4*i +: 4]) * int'(c[4*i +: 4]);
    return acc;
  endfunction

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input logic [WIN_W-1:0] s, input logic [WIN_W-1:0] c, input int exp);
    @(negedge clk); sample_in = s; coeff_in = c; conv_en = 1;
    @(negedge clk); conv_en = 0;
    chk(result_ready === 1'b1, "result_ready one cycle after conv_en");
    chk(result === 16'(exp), $sformatf("result %0d expected %0d", result, exp));
    sample_in = ~s;  // change inputs: the result register must hold
    @(negedge clk);
    chk(result_ready === 1'b0, "result_ready is a single pulse");
    chk(result === 16'(exp), "result held without conv_en");
  endtask

  initial begin
    logic [WIN_W-1:0] s, c;
    sample_in = '0; coeff_in = '0; conv_en = 0;
    repeat (2) @(posedge clk);
    chk(result === '0 && result_ready === 1'b0, "reset");
    n_rst = 1;
    // worked example: 1*1 + 2*2 + ... + 9*9 = 285
    for (int i = 0; i < 9; i++) begin s[4*i +: 4] = 4'(i + 1); c[4*i +: 4] = 4'(i + 1); end
    run(s, c, 285);
    run({36{1'b1}}, {36{1'b1}}, 2025);
    for (int k = 0; k < 9; k++) begin       // each product position on its own
      s = '0; c = '0; s[4*k +: 4] = 4'(k + 3); c[4*k +: 4] = 4'(15 - k);
      run(s, c, (k + 3) * (15 - k));
    end
    for (int k = 0; k < 200; k++) begin
      s = {4'($urandom), 32'($urandom)};
      c = {4'($urandom), 32'($urandom)};
      run(s, c, model(s, c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
