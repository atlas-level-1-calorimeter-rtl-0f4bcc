// IPbus master tasks for the testbenches.  The including module provides
// 'clk', 'ipb_in' (hub_pkg::ipb_wbus_t, driven) and 'ipb_out'
// (hub_pkg::ipb_rbus_t, answered by the design).  Each transaction raises
// the strobe, waits for ack or err (at most 16 clocks) and drops it.
`ifndef TB_IPBUS_TASKS_SVH
`define TB_IPBUS_TASKS_SVH

int ipb_latency;   // clocks from strobe to answer, of the last transaction

task automatic ipb_xfer(input logic wr, input logic [31:0] addr, input logic [31:0] wdata,
                        output logic [31:0] rdata, output logic err, output logic ok);
  ipb_in.strobe <= 1'b1;
  ipb_in.write  <= wr;
  ipb_in.addr   <= addr;
  ipb_in.wdata  <= wdata;
  ok = 1'b0;
  err = 1'b0;
  rdata = '0;
  ipb_latency = 0;
  for (int i = 0; i < 16; i++) begin
    @(posedge clk);
    ipb_latency++;
    #1;
    if (ipb_out.ack || ipb_out.err) begin
      ok    = 1'b1;
      err   = ipb_out.err;
      rdata = ipb_out.rdata;
      break;
    end
  end
  ipb_in.strobe <= 1'b0;
  ipb_in.write  <= 1'b0;
  @(posedge clk);
endtask

task automatic ipb_write(input logic [31:0] addr, input logic [31:0] wdata, output logic err);
  logic [31:0] d;
  logic ok;
  ipb_xfer(1'b1, addr, wdata, d, err, ok);
  if (!ok) err = 1'b1;
endtask

task automatic ipb_read(input logic [31:0] addr, output logic [31:0] rdata, output logic err);
  logic ok;
  ipb_xfer(1'b0, addr, '0, rdata, err, ok);
  if (!ok) err = 1'b1;
endtask

`endif
