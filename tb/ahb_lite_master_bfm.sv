// ahb_lite_master_bfm: behavioural AHB-Lite master for the testbenches.
//
// Not synthesizable; it stands in for the SoC CPU and its bus master. The
// testbench queues transfers (queue_write / queue_read, each given an id and
// an optional number of idle cycles before it) and the model issues them
// back to back, overlapping the address phase of one transfer with the data
// phase of the previous one, as AHB-Lite allows. An address phase ends at a
// rising edge with hready high; a data phase likewise, at which point read
// data is taken from hrdata. When the slave answers an address phase with
// hresp high and hready low, the model records an error for that transfer and
// replaces it with IDLE in the following cycle, as a master normally does.
// Results are kept by id: res_data, res_err and res_done. The model also
// counts the cycles in which hready was low (stalls) and the error responses.
module ahb_lite_master_bfm
  import conv_pkg::*;
(
  input  logic              clk,
  input  logic              n_rst,
  output logic              hsel,
  output logic [ADDR_W-1:0] haddr,
  output logic [1:0]        htrans,
  output logic [2:0]        hsize,
  output logic              hwrite,
  output logic [DATA_W-1:0] hwdata,
  input  logic [DATA_W-1:0] hrdata,
  input  logic              hready,
  input  logic              hresp
);

  typedef struct {
    int                id;
    bit                write;
    logic [ADDR_W-1:0] addr;
    logic [2:0]        size;
    logic [DATA_W-1:0] wdata;
    int                gap;
  } xfer_t;

  xfer_t reqq [$];
  int    next_id = 0;
  logic [DATA_W-1:0] res_data [int];
  bit                res_err  [int];
  bit                res_done [int];
  int    n_stall = 0, n_error = 0, n_overlap = 0;

  xfer_t a, d;
  bit    a_valid = 0, a_cancel = 0, d_valid = 0;

  initial begin
    hsel = 0; haddr = '0; htrans = HTRANS_IDLE; hsize = 3'd1; hwrite = 0; hwdata = '0;
  end

  task automatic queue_write(input logic [ADDR_W-1:0] addr, input logic [DATA_W-1:0] data,
                             output int id, input logic [2:0] size = 3'd1, input int gap = 0);
    xfer_t t;
    t.id = next_id++; t.write = 1; t.addr = addr; t.size = size; t.wdata = data; t.gap = gap;
    reqq.push_back(t);
    id = t.id;
  endtask

  task automatic queue_read(input logic [ADDR_W-1:0] addr, output int id,
                            input logic [2:0] size = 3'd1, input int gap = 0);
    xfer_t t;
    t.id = next_id++; t.write = 0; t.addr = addr; t.size = size; t.wdata = '0; t.gap = gap;
    reqq.push_back(t);
    id = t.id;
  endtask

  function automatic bit busy();
    return reqq.size() != 0 || a_valid || d_valid;
  endfunction

  task automatic wait_idle();
    do @(posedge clk); while (busy());
    #1;
  endtask

  // blocking single transfers
  task automatic write(input logic [ADDR_W-1:0] addr, input logic [DATA_W-1:0] data,
                       output bit err, input logic [2:0] size = 3'd1);
    int id;
    queue_write(addr, data, id, size);
    wait_idle();
    err = res_err[id];
  endtask

  task automatic read(input logic [ADDR_W-1:0] addr, output logic [DATA_W-1:0] data,
                      output bit err, input logic [2:0] size = 3'd1);
    int id;
    queue_read(addr, id, size);
    wait_idle();
    data = res_data[id];
    err  = res_err[id];
  endtask

  always @(posedge clk) begin
    if (!n_rst) begin
      a_valid = 0; a_cancel = 0; d_valid = 0;
    end else begin
      if (!hready) n_stall++;
      if (hready) begin
        if (d_valid) begin
          res_data[d.id] = d.write ? '0 : hrdata;
          res_err[d.id]  = 0;
          res_done[d.id] = 1;
        end
        if (d_valid && a_valid && !a_cancel) n_overlap++;
        d_valid  = a_valid && !a_cancel;
        d        = a;
        a_valid  = 0;
        a_cancel = 0;
        if (reqq.size() != 0) begin
          if (reqq[0].gap > 0) reqq[0].gap--;
          else begin
            a = reqq.pop_front();
            a_valid = 1;
          end
        end
      end else if (hresp && a_valid && !a_cancel) begin
        n_error++;
        res_data[a.id] = '0;
        res_err[a.id]  = 1;
        res_done[a.id] = 1;
        a_cancel = 1;
      end
      #1;
      hsel   = a_valid;
      htrans = (a_valid && !a_cancel) ? HTRANS_NONSEQ : HTRANS_IDLE;
      if (a_valid) begin
        haddr  = a.addr;
        hsize  = a.size;
        hwrite = a.write;
      end
      hwdata = (d_valid && d.write) ? d.wdata : '0;
    end
  end

endmodule
