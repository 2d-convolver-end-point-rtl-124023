// tb_ahb_lite_slave: self-checking test of the AHB-Lite slave interface.
// The slave is driven by the behavioural bus master. The controller and the
// result FIFO are replaced by small models here: the controller model takes a
// pending command while idle and stays busy for a few cycles; the FIFO model is
// an array with read and write indices. Checked: reset values; write and
// read-back of every R/W register, back to back; byte-lane writes; a read that
// overlaps the data phase of a write to the same register; the coefficient
// column seen through coeff_sel; command bits delivered to the controller and
// the command byte clearing itself; the busy bit right after a command write;
// the status bits; FIFO reads in order with one read_enable pulse each, and
// reads of an empty FIFO; every kind of bad access answered with the two-cycle
// error response (exactly one stall cycle each) and without side effects,
// including one that follows a good write whose data phase it stalls.
module tb_ahb_lite_slave;
  import conv_pkg::*;

  logic clk = 0, n_rst = 0;
  logic hsel, hwrite, hready, hresp;
  logic [ADDR_W-1:0] haddr;
  logic [1:0] htrans;
  logic [2:0] hsize;
  logic [DATA_W-1:0] hwdata, hrdata;
  logic [DATA_W-1:0] col_out, coeff_out;
  logic [1:0] coeff_sel;
  logic coeff_load_en, sample_load_en, new_row;
  logic modwait, sample_stream, empty, full, read_enable;
  logic [RES_W-1:0] result_in;
  int checks = 0, failures = 0;

  ahb_lite_slave dut (.*);
  ahb_lite_master_bfm bfm (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // controller model
  int mw_cnt = 0;
  logic [2:0] cmd_seen [$];
  assign modwait = (mw_cnt != 0);
  always @(posedge clk) begin
    if (mw_cnt != 0) mw_cnt <= mw_cnt - 1;
    else if (n_rst && (coeff_load_en || sample_load_en || new_row)) begin
      cmd_seen.push_back({new_row, sample_load_en, coeff_load_en});
      mw_cnt <= 4;
    end
  end

  // FIFO model
  logic [RES_W-1:0] fmem [64];
  int rp = 0, wp = 0, n_renable = 0;
  assign empty     = (rp == wp);
  assign result_in = fmem[rp % 64];
  always @(posedge clk) if (read_enable) begin rp <= rp + 1; n_renable <= n_renable + 1; end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic rd(input logic [3:0] a, output logic [15:0] v, input logic [2:0] sz = 3'd1);
    bit e;
    bfm.read(a, v, e, sz);
    chk(!e, $sformatf("read %h no error", a));
  endtask

  task automatic wr(input logic [3:0] a, input logic [15:0] v, input logic [2:0] sz = 3'd1);
    bit e;
    bfm.write(a, v, e, sz);
    chk(!e, $sformatf("write %h no error", a));
  endtask

  task automatic bad(input bit w, input logic [3:0] a, input logic [2:0] sz);
    bit e;
    logic [15:0] v;
    int s0 = bfm.n_stall;
    if (w) bfm.write(a, 16'hFFFF, e, sz);
    else   bfm.read(a, v, e, sz);
    chk(e, $sformatf("error response for %s %h size %0d", w ? "write" : "read", a, sz));
    chk(bfm.n_stall == s0 + 1, "one stall cycle per error");
  endtask

  initial begin
    logic [15:0] v;
    int id [8];
    coeff_sel = 0; sample_stream = 0; full = 0;
    repeat (3) @(posedge clk);
    n_rst = 1;
    @(posedge clk);
    chk(hready === 1'b1 && hresp === 1'b0 && hrdata === '0, "idle bus after reset");

    rd(4'h0, v);  chk(v === 16'h0080, $sformatf("status after reset %h", v));
    rd(4'h4, v);  chk(v === 16'h0000, "sample register after reset");
    rd(4'hC, v);  chk(v === 16'h0000, "command register after reset");

    // back-to-back writes then back-to-back reads
    bfm.queue_write(4'h4, 16'h0ABC, id[0]);
    bfm.queue_write(4'h6, 16'h0123, id[1]);
    bfm.queue_write(4'h8, 16'h0456, id[2]);
    bfm.queue_write(4'hA, 16'h0789, id[3]);
    bfm.queue_read(4'h4, id[4]);
    bfm.queue_read(4'h6, id[5]);
    bfm.queue_read(4'h8, id[6]);
    bfm.queue_read(4'hA, id[7]);
    bfm.wait_idle();
    chk(bfm.res_data[id[4]] === 16'h0ABC, "sample read back");
    chk(bfm.res_data[id[5]] === 16'h0123, "R0 read back");
    chk(bfm.res_data[id[6]] === 16'h0456, "R1 read back");
    chk(bfm.res_data[id[7]] === 16'h0789, "R2 read back");
    chk(bfm.n_overlap >= 7, "transfers were overlapped");
    chk(col_out === 16'h0ABC, "col_out");
    coeff_sel = 0; #1 chk(coeff_out === 16'h0123, "coeff_out column 0");
    coeff_sel = 1; #1 chk(coeff_out === 16'h0456, "coeff_out column 1");
    coeff_sel = 2; #1 chk(coeff_out === 16'h0789, "coeff_out column 2");

    // byte lanes (little-endian)
    wr(4'h5, 16'h5A00, 3'd0);
    rd(4'h4, v); chk(v === 16'h5ABC, $sformatf("upper byte write %h", v));
    wr(4'h4, 16'h0033, 3'd0);
    rd(4'h4, v); chk(v === 16'h5A33, $sformatf("lower byte write %h", v));

    // read overlapping the data phase of a write to the same register
    bfm.queue_write(4'h6, 16'h0F0E, id[0]);
    bfm.queue_read(4'h6, id[1]);
    bfm.wait_idle();
    chk(bfm.res_data[id[1]] === 16'h0F0E, "read-after-write forwarding");

    // command: delivered to the controller, busy visible at once, self-clearing
    bfm.queue_write(4'hC, 16'h0002, id[0], 3'd0);
    bfm.queue_read(4'h0, id[1]);
    bfm.wait_idle();
    chk(bfm.res_data[id[1]][0] === 1'b1, "busy right after command write");
    repeat (8) @(posedge clk);
    chk(cmd_seen.size() == 1 && cmd_seen[0] == 3'b010, "sample load command delivered once");
    rd(4'h0, v); chk(v[0] === 1'b0, "not busy after command done");
    rd(4'hC, v); chk(v === 16'h0000, "command byte cleared");
    wr(4'hC, 16'h0001, 3'd1);   // half-word write of the command register
    repeat (8) @(posedge clk);
    chk(cmd_seen.size() == 2 && cmd_seen[1] == 3'b001, "coefficient load command delivered");
    wr(4'hC, 16'h0006, 3'd0);
    repeat (8) @(posedge clk);
    chk(cmd_seen.size() == 3 && cmd_seen[2] == 3'b110, "sample complete command delivered");

    // status bits
    sample_stream = 1; full = 1;
    rd(4'h0, v); chk(v === 16'h0380, $sformatf("status stream/full/empty %h", v));
    sample_stream = 0; full = 0;

    // FIFO reads
    for (int i = 0; i < 5; i++) begin fmem[wp % 64] = 16'(16'h100 + i * 3); wp++; end
    rd(4'h0, v); chk(v[7] === 1'b0, "status not empty");
    for (int i = 0; i < 5; i++) begin
      rd(4'h2, v); chk(v === 16'(16'h100 + i * 3), $sformatf("FIFO read %0d got %h", i, v));
    end
    chk(n_renable == 5, "one read_enable per FIFO read");
    rd(4'h2, v); chk(v === 16'h0000 && n_renable == 5, "read of empty FIFO has no effect");
    for (int i = 0; i < 3; i++) begin fmem[wp % 64] = 16'(16'h200 + i); wp++; end
    for (int i = 0; i < 3; i++) bfm.queue_read(4'h2, id[i]);
    bfm.wait_idle();
    for (int i = 0; i < 3; i++) chk(bfm.res_data[id[i]] === 16'(16'h200 + i), "back-to-back FIFO reads");

    // error responses, no side effects
    rd(4'h4, v);
    bad(1, 4'h0, 3'd1);     // read-only status
    bad(1, 4'h2, 3'd1);     // read-only result
    bad(0, 4'hE, 3'd1);     // outside the map
    bad(1, 4'hD, 3'd0);     // upper byte of the one-byte command register
    bad(1, 4'h4, 3'd2);     // wider than the bus
    bad(0, 4'h5, 3'd1);     // misaligned half-word
    rd(4'h4, v); chk(v === 16'h5A33, "bad write had no effect");
    chk(cmd_seen.size() == 3, "no command from a bad access");
    // error following a good write: the write's data phase is stalled, not lost
    bfm.queue_write(4'h8, 16'h0BAD, id[0]);
    bfm.queue_write(4'h0, 16'h1111, id[1]);
    bfm.queue_read(4'h8, id[2]);
    bfm.wait_idle();
    chk(!bfm.res_err[id[0]] && bfm.res_err[id[1]] && !bfm.res_err[id[2]], "error only on the bad transfer");
    chk(bfm.res_data[id[2]] === 16'h0BAD, "write before an error completed");
    chk(bfm.n_error == 7, $sformatf("error count %0d", bfm.n_error));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
