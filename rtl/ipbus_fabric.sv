// ipbus_fabric: address decoder and bus fabric of the IPbus SoC bus.
//
// The IPbus master (UDP engine + bus master, outside this design) issues
// A32/D32 transactions.  The fabric decodes the address, passes the strobe
// only to the selected slave (point-to-point buses to every slave) and
// returns that slave's read data, ack and err.  An address that matches no
// slave is answered with err one clock after the strobe.
//
// Address map (32-bit word addresses): slave i owns the addresses whose
// bits 31:SEL_LSB equal i, so with the defaults slave 0 = 0x00..0x0F (the
// four common Hub registers) and slave 1 = 0x10..0x1F (link monitor).
// Slaves must hold ack/err for one clock per strobe, as the IPbus slaves
// here do.  The bus signals follow the IPbus SoC bus; the decoding rule
// and the map are this design's choices.
module ipbus_fabric
  import hub_pkg::*;
#(
  parameter int NSLV    = 2,
  parameter int SEL_LSB = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  input  ipb_wbus_t            ipb_in,
  output ipb_rbus_t            ipb_out,
  output ipb_wbus_t [NSLV-1:0] ipb_to_slaves,
  input  ipb_rbus_t [NSLV-1:0] ipb_from_slaves
);

  localparam int SW = (NSLV > 1) ? $clog2(NSLV) : 1;

  logic [31:0] sel_raw;
  logic        hit;
  logic [SW-1:0] sel;
  logic        miss_q;

  assign sel_raw = ipb_in.addr >> SEL_LSB;
  assign hit     = (sel_raw < 32'(NSLV));
  assign sel     = SW'(sel_raw);

  always_comb begin
    for (int i = 0; i < NSLV; i++) begin
      ipb_to_slaves[i]        = ipb_in;
      ipb_to_slaves[i].strobe = ipb_in.strobe && hit && (sel == SW'(i));
    end
  end

  // Unmapped address: error answer after one clock.
  always_ff @(posedge clk) begin
    if (rst) miss_q <= 1'b0;
    else     miss_q <= ipb_in.strobe && !hit && !miss_q;
  end

  always_comb begin
    ipb_out = IPB_RBUS_NULL;
    if (miss_q)   ipb_out.err = 1'b1;
    else if (hit) ipb_out = ipb_from_slaves[sel];
  end

endmodule
