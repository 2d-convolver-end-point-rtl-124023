// tb_sample_shift_reg: self-checking test of the sample window.
// Shifts random 16-bit columns in (upper 4 bits random, so ignoring them is
// checked), holds shift_en low on random cycles, and compares the 36-bit output
// after every edge with a three-entry reference model. Also checks the reset
// value and that the output changes on the edge where shift_en is high.
module tb_sample_shift_reg;
  import conv_pkg::*;

  logic clk = 0, n_rst = 0;
  logic [DATA_W-1:0] col_in;
  logic shift_en;
  logic [WIN_W-1:0] sample_out;
  int checks = 0, failures = 0;
  logic [COL_W-1:0] m [3];

  sample_shift_reg dut (.*);

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
    if (sample_out !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, sample_out, exp);
    end
  endtask

  initial begin
    col_in = '0; shift_en = 0;
    m[0] = '0; m[1] = '0; m[2] = '0;
    repeat (2) @(posedge clk);
    #1 check('0, "reset");
    n_rst = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      col_in   = 16'($urandom);
      shift_en = (i < 6) ? 1'b1 : 1'($urandom % 3 != 0);
      @(posedge clk);
      if (shift_en) begin
        m[0] = m[1]; m[1] = m[2]; m[2] = col_in[11:0];
      end
      #1 check({m[2], m[1], m[0]}, $sformatf("step %0d", i));
    end
    // after three known shifts the first column sits in column 0
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); col_in = 16'hF000 | 16'(12'h111 * (i + 1)); shift_en = 1;
    end
    @(negedge clk); shift_en = 0;
    check({12'h333, 12'h222, 12'h111}, "column order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
