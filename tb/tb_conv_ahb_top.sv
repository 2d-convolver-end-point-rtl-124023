// tb_conv_ahb_top: end-to-end test of the convolver peripheral at its full
// size (1352-entry result FIFO), driven over AHB-Lite by the behavioural bus
// master with the CPU's software sequence:
//   * load a 3x3 kernel: write columns R0-R2, write command 0x01, poll busy;
//   * per image row band: command 0x04 (new row), then one sample column per
//     image column (write 0x4, command 0x02, poll busy), each queued back to
//     back so that the transfers overlap;
//   * command 0x06 (sample complete) at the end of an image;
//   * read results from 0x2 until the empty bit is set.
// Results are compared with a 2-D convolution computed here. Phase 1 uses a
// small image and drains the FIFO after every row band. Phase 2 loads a new
// kernel and convolves a 28 x 54 image, whose 26 x 52 = 1352 results fill the
// FIFO exactly; it checks the full status bit, pushes one more window (the
// result must be dropped), then drains and compares all 1352 results. Bad
// accesses are mixed in. Each mechanism is counted and a failure is counted
// for any that never happened.
module tb_conv_ahb_top;
  import conv_pkg::*;

  logic clk = 0, n_rst = 0;
  logic hsel, hwrite, hready, hresp;
  logic [ADDR_W-1:0] haddr;
  logic [1:0] htrans;
  logic [2:0] hsize;
  logic [DATA_W-1:0] hwdata, hrdata;
  int checks = 0, failures = 0;

  conv_ahb_top dut (.*);
  ahb_lite_master_bfm bfm (.*);

  always #5 clk = ~clk;   // 100 MHz

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_coef_load = 0, n_shift = 0, n_conv = 0, n_new_row = 0, n_complete = 0;
  int n_fifo_read = 0, n_empty_read = 0, n_busy_seen = 0, n_stream_seen = 0;
  int n_full_seen = 0, n_drop = 0;

  int n_cycles = 0;
  always @(posedge clk) n_cycles++;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [3:0] kern [3][3];          // [row][column]
  logic [3:0] img  [28][54];
  int exp_q [$];

  task automatic wait_not_busy();
    logic [15:0] v;
    bit e;
    int polls = 0;
    do begin
      bfm.read(4'h0, v, e);
      chk(!e, "status read");
      if (v[ST_MODWAIT]) n_busy_seen++;
      if (v[ST_STREAM])  n_stream_seen++;
      polls++;
    end while (v[ST_MODWAIT] && polls < 50);
    chk(polls < 50, "busy clears");
  endtask

  task automatic load_kernel();
    int id;
    for (int j = 0; j < 3; j++)
      bfm.queue_write(4'(6 + 2 * j), {4'h0, kern[2][j], kern[1][j], kern[0][j]}, id);
    bfm.queue_write(4'hC, 16'h0001, id, 3'd0);
    bfm.queue_read(4'h0, id);        // overlaps the command write
    bfm.wait_idle();
    chk(bfm.res_data[id][ST_MODWAIT] === 1'b1, "busy right after coefficient command");
    wait_not_busy();
    n_coef_load++;
  endtask

  task automatic command(input logic [7:0] c);
    bit e;
    bfm.write(4'hC, {8'h00, c}, e, 3'd0);
    chk(!e, "command write");
    wait_not_busy();
  endtask

  task automatic push_column(input int r, input int c);
    int id;
    bfm.queue_write(4'h4, {4'hF, img[r+2][c], img[r+1][c], img[r][c]}, id);
    bfm.queue_write(4'hC, 16'h0002, id, 3'd0);
    bfm.wait_idle();
    wait_not_busy();
    n_shift++;
    if (c >= 2) n_conv++;
  endtask

  function automatic int window(input int r, input int c);   // c = right-most column
    int acc = 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        acc += int'(kern[i][j]) * int'(img[r+i][c-2+j]);
    return acc;
  endfunction

  task automatic drain(input string what);
    logic [15:0] v;
    bit e;
    forever begin
      bfm.read(4'h0, v, e);
      if (v[ST_EMPTY]) break;
      bfm.read(4'h2, v, e);
      n_fifo_read++;
      chk(!e && exp_q.size() > 0, {what, ": result expected"});
      if (exp_q.size() > 0) begin
        int x = exp_q.pop_front();
        chk(v === 16'(x), $sformatf("%s: result %0d expected %0d", what, v, x));
      end
    end
    chk(exp_q.size() == 0, $sformatf("%s: %0d results missing", what, exp_q.size()));
    bfm.read(4'h2, v, e);
    n_empty_read++;
    chk(!e && v === 16'h0, "read of empty FIFO returns zero");
  endtask

  task automatic convolve(input int h, input int w, input bit drain_rows);
    for (int r = 0; r + 2 < h; r++) begin
      if (r > 0) begin command(8'h04); n_new_row++; end
      for (int c = 0; c < w; c++) begin
        push_column(r, c);
        if (c >= 2) exp_q.push_back(window(r, c));
      end
      if (drain_rows) drain($sformatf("row %0d", r));
    end
  endtask

  task automatic bad_access();
    bit e;
    logic [15:0] v;
    bfm.write(4'h2, 16'h1234, e);
    chk(e, "write to the result register is an error");
    bfm.read(4'hF, v, e);
    chk(e, "read outside the map is an error");
  endtask

  initial begin
    logic [15:0] v;
    bit e;
    repeat (3) @(posedge clk);
    n_rst = 1;
    @(posedge clk);
    bfm.read(4'h0, v, e);
    chk(!e && v === 16'h0080, $sformatf("status after reset %h", v));

    // Phase 1: worked example, then a small image drained row by row
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) kern[i][j] = 4'(3 * j + i + 1);
    load_kernel();
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) img[i][j] = 4'(3 * j + i + 1);
    for (int c = 0; c < 3; c++) push_column(0, c);
    exp_q.push_back(285);
    drain("worked example");
    command(8'h06); n_complete++;
    bfm.read(4'h0, v, e);
    chk(v[ST_STREAM] === 1'b0, "sample complete ends streaming");

    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) kern[i][j] = 4'($urandom);
    load_kernel();
    for (int r = 0; r < 6; r++) for (int c = 0; c < 7; c++) img[r][c] = 4'($urandom);
    command(8'h04); n_new_row++;
    convolve(6, 7, 1);
    bad_access();
    command(8'h06); n_complete++;

    // Phase 2: fill the FIFO exactly, then overflow by one
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) kern[i][j] = 4'($urandom);
    kern[1][1] = 4'hF;
    load_kernel();
    for (int r = 0; r < 28; r++) for (int c = 0; c < 54; c++) img[r][c] = 4'($urandom);
    img[5][10] = 4'hF;
    command(8'h04); n_new_row++;
    convolve(28, 54, 0);
    chk(exp_q.size() == 1352, "1352 results expected");
    bfm.read(4'h0, v, e);
    chk(v[ST_FULL] === 1'b1 && v[ST_EMPTY] === 1'b0, $sformatf("FIFO full after 1352 results, status %h", v));
    if (v[ST_FULL]) n_full_seen++;
    push_column(25, 53);                     // one more window: dropped
    n_drop++;
    bfm.read(4'h0, v, e);
    chk(v[ST_FULL] === 1'b1, "still full after overflow");
    bad_access();
    command(8'h06); n_complete++;
    drain("full image");

    // every mechanism happened
    chk(n_coef_load > 0, "coefficient load");
    chk(n_shift > 0 && n_conv > 0, "shift and convolve");
    chk(n_conv == 1 + 5 * 4 + 1352 + 1, $sformatf("convolutions %0d", n_conv));
    chk(n_new_row > 0 && n_complete > 0, "new row and sample complete");
    chk(n_fifo_read == 1 + 20 + 1352, $sformatf("FIFO reads %0d", n_fifo_read));
    chk(n_empty_read > 0, "read of empty FIFO");
    chk(n_busy_seen > 0 && n_stream_seen > 0, "busy and streaming seen in status");
    chk(n_full_seen > 0 && n_drop > 0, "FIFO full and overflow");
    chk(bfm.n_error == 4 && bfm.n_stall == 4, "error responses with one stall each");
    chk(bfm.n_overlap > 0, "overlapped transfers");
    $display("coef loads %0d shifts %0d convolutions %0d new rows %0d completes %0d",
             n_coef_load, n_shift, n_conv, n_new_row, n_complete);
    $display("FIFO reads %0d empty reads %0d busy polls %0d full %0d dropped %0d",
             n_fifo_read, n_empty_read, n_busy_seen, n_full_seen, n_drop);
    $display("bus errors %0d stalls %0d overlapped transfers %0d cycles %0d",
             bfm.n_error, bfm.n_stall, bfm.n_overlap, n_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
