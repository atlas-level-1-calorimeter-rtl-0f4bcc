// hub_regs: the four common Hub registers, as an IPbus slave.
//
//   0x0 hub_module  RO  {fw_version, fw_type, hw_revision, module_type}
//   0x1 hub_address RO  {spare, adrs_to_rod, slot_adrs, shelf_adrs}
//   0x2 hub_alerts  RO  alert bits from the board, all 0 in normal operation
//   0x3 hub_control RW  board control bits, all 0 after power on
// All registers are 32 bits, all signals active high.  Fields are packed
// from bit 0 upwards in the order of the register table (see hub_pkg).
// The "overall hardware address to the ROD" is generated here as
// {shelf_adrs[3:0], slot_adrs[3:0]} and driven to the ROD on adrs_to_rod.
//
// IPbus timing: the slave answers a strobe with ack one clock later (read
// data valid with ack), then waits for the strobe to drop or stay for a
// new cycle; a write to a read-only register is acknowledged and ignored.
// The register contents follow the register table; the field bit positions,
// the 5-bit spare of hub_control (the listed widths add to 31), the address
// formula and the module/version constants are this design's choices.
module hub_regs
  import hub_pkg::*;
#(
  parameter logic [7:0] MODULE_TYPE = 8'h01,
  parameter logic [7:0] HW_REVISION = 8'h01,
  parameter logic [7:0] FW_TYPE     = 8'h01,
  parameter logic [7:0] FW_VERSION  = 8'h01
) (
  input  logic         clk,
  input  logic         rst,
  input  ipb_wbus_t    ipb_in,
  output ipb_rbus_t    ipb_out,
  input  logic [7:0]   shelf_adrs,
  input  logic [7:0]   slot_adrs,
  input  hub_alerts_t  alerts,
  output hub_control_t ctrl,
  output logic [7:0]   adrs_to_rod
);

  logic [1:0] a;
  logic       ack_q;

  assign a           = ipb_in.addr[1:0];
  assign adrs_to_rod = {shelf_adrs[3:0], slot_adrs[3:0]};

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl    <= '0;
      ack_q   <= 1'b0;
      ipb_out <= IPB_RBUS_NULL;
    end else begin
      ipb_out.ack <= 1'b0;
      ipb_out.err <= 1'b0;
      ack_q       <= 1'b0;
      if (ipb_in.strobe && !ack_q) begin
        ack_q       <= 1'b1;
        ipb_out.ack <= 1'b1;
        if (ipb_in.write && a == ADDR_HUB_CONTROL[1:0]) ctrl <= hub_control_t'(ipb_in.wdata);
        unique case (a)
          2'd0: ipb_out.rdata <= {FW_VERSION, FW_TYPE, HW_REVISION, MODULE_TYPE};
          2'd1: ipb_out.rdata <= {8'h00, adrs_to_rod, slot_adrs, shelf_adrs};
          2'd2: ipb_out.rdata <= alerts;
          2'd3: ipb_out.rdata <= (ipb_in.write ? ipb_in.wdata : 32'(ctrl));
        endcase
      end
    end
  end

endmodule
