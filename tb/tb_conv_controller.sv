// tb_conv_controller: self-checking test of the convolver state machine.
// Commands are presented the way the bus interface presents them: held until
// a rising edge at which modwait is low. After each command the outputs are
// compared cycle by cycle with the expected sequence:
//   coefficient load: 3 busy cycles with coeff_ld and coeff_sel 0, 1, 2;
//   sample load, window not yet full: 1 busy cycle with sample_shift;
//   sample load that fills or keeps a full window: sample_shift, convolve_en,
//   one store cycle, i.e. 3 busy cycles;
//   new row / sample complete: no busy cycle, column count cleared.
// sample_stream is compared with a column counter kept here. Random command
// sequences are run after the directed ones.
module tb_conv_controller;
  import conv_pkg::*;

  logic clk = 0, n_rst = 0;
  logic coeff_load_en, sample_load_en, new_row;
  logic modwait, sample_stream, sample_shift, convolve_en, coeff_ld;
  logic [1:0] coeff_sel;
  int checks = 0, failures = 0;
  int cols_m = 0;
  int n_conv = 0, n_row = 0, n_done = 0, n_coef = 0;

  conv_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // expected outputs in one cycle: {modwait, sample_shift, convolve_en, coeff_ld, coeff_sel}
  task automatic expect_cycle(input bit mw, input bit sh, input bit cv, input bit ld,
                              input logic [1:0] sel, input string what);
    chk(modwait === mw && sample_shift === sh && convolve_en === cv && coeff_ld === ld &&
        (!ld || coeff_sel === sel),
        $sformatf("%s: mw%b sh%b cv%b ld%b sel%0d", what, modwait, sample_shift,
                  convolve_en, coeff_ld, coeff_sel));
  endtask

  // bits: 0 load coefficients, 1 load sample column, 2 new row
  task automatic command(input logic [2:0] bits);
    @(negedge clk);
    chk(modwait === 1'b0, "idle before command");
    {new_row, sample_load_en, coeff_load_en} = bits;
    @(negedge clk);
    {new_row, sample_load_en, coeff_load_en} = '0;
    if (bits[1] && bits[2]) begin
      cols_m = 0; n_done++;
      expect_cycle(0, 0, 0, 0, 0, "complete");
    end else if (bits[0]) begin
      n_coef++;
      expect_cycle(1, 0, 0, 1, 0, "coef col 0");
      @(negedge clk) expect_cycle(1, 0, 0, 1, 1, "coef col 1");
      @(negedge clk) expect_cycle(1, 0, 0, 1, 2, "coef col 2");
      @(negedge clk) expect_cycle(0, 0, 0, 0, 0, "coef done");
    end else if (bits[2]) begin
      cols_m = 0; n_row++;
      expect_cycle(0, 0, 0, 0, 0, "new row");
    end else if (bits[1]) begin
      expect_cycle(1, 1, 0, 0, 0, "shift");
      if (cols_m < 3) cols_m++;
      if (cols_m == 3) begin
        n_conv++;
        @(negedge clk) expect_cycle(1, 0, 1, 0, 0, "convolve");
        @(negedge clk) expect_cycle(1, 0, 0, 0, 0, "store");
      end
      @(negedge clk) expect_cycle(0, 0, 0, 0, 0, "shift done");
    end
    chk(sample_stream === (cols_m == 3), $sformatf("sample_stream with %0d columns", cols_m));
  endtask

  initial begin
    coeff_load_en = 0; sample_load_en = 0; new_row = 0;
    repeat (2) @(posedge clk);
    #1 chk(modwait === 0 && sample_stream === 0 && coeff_ld === 0, "reset");
    n_rst = 1;
    command(3'b001);                       // coefficients
    repeat (5) command(3'b010);            // 3 to fill, 2 streaming
    command(3'b100);                       // new row
    repeat (4) command(3'b010);
    command(3'b110);                       // sample complete
    command(3'b010);
    command(3'b011);                       // both: coefficient load wins
    for (int i = 0; i < 400; i++) begin
      int r = $urandom % 10;
      command(r < 6 ? 3'b010 : r < 7 ? 3'b001 : r < 9 ? 3'b100 : 3'b110);
    end
    chk(n_conv > 0 && n_row > 0 && n_done > 0 && n_coef > 0, "all commands exercised");
    $display("convolutions %0d, new rows %0d, completes %0d, coefficient loads %0d",
             n_conv, n_row, n_done, n_coef);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
