// tb_coeff_reg: self-checking test of the coefficient kernel register.
// Loads random 16-bit values into random columns (coeff_sel 0..3, where 3 must
// load nothing), with coeff_ld held low on random cycles, and compares the
// 36-bit output after every edge with a reference model.
module tb_coeff_reg;
  import conv_pkg::*;

  logic clk = 0, n_rst = 0;
  logic [DATA_W-1:0] coeff_in;
  logic [1:0] coeff_sel;
  logic coeff_ld;
  logic [WIN_W-1:0] coeff_out;
  int checks = 0, failures = 0;
  logic [COL_W-1:0] m [3];

  coeff_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [WIN_W-1:0] exp, input string what);
    checks++;
    if (coeff_out !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, coeff_out, exp);
    end
  endtask

  initial begin
    coeff_in = '0; coeff_sel = 0; coeff_ld = 0;
    m[0] = '0; m[1] = '0; m[2] = '0;
    repeat (2) @(posedge clk);
    #1 check('0, "reset");
    n_rst = 1;
    // the three columns in order
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); coeff_in = 16'hA000 | 16'(12'h123 * (i + 1)); coeff_sel = 2'(i); coeff_ld = 1;
      m[i] = coeff_in[11:0];
    end
    @(negedge clk); coeff_ld = 0;
    check({m[2], m[1], m[0]}, "three columns");
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      coeff_in  = 16'($urandom);
      coeff_sel = 2'($urandom);
      coeff_ld  = 1'($urandom % 2);
      @(posedge clk);
      if (coeff_ld && coeff_sel != 3) m[coeff_sel] = coeff_in[11:0];
      #1 check({m[2], m[1], m[0]}, $sformatf("step %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
