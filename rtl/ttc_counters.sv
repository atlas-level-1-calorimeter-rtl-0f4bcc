// ttc_counters: local bunch counter and extended event counter (L1ID).
//
// Once per LHC clock (bc_stb) the module takes that bunch crossing's L1A,
// BCR and ECR and updates:
//   * bcid  : 12-bit bunch counter, +1 every LHC clock, wraps from BC_MAX
//             (3563) to 0, cleared to 0 by BCR;
//   * l1id  : 24-bit event counter, +1 on every L1A, set to all ones (-1)
//             by ECR, so the first L1A after an ECR is event 0;
//   * ecrid : 8-bit extension of the L1ID, +1 on every ECR; {ecrid, l1id}
//             is the 32-bit extended L1ID sent on Combined_TTC Word_1.
// The outputs are combinational "next" values: they already include the
// signals present at the inputs, and the counters load them at bc_stb.  In
// the Hub the inputs are held for a whole LHC clock by the TTC pipeline, so
// a message built at bc_stb carries the event number of its own L1A.
//
// The ranges, the wrap value and the reset values of BCR and ECR follow
// the specification.  This design's choices: ECRID counts ECRs; ECR is
// applied before an L1A in the same bunch crossing; after reset l1id is
// all ones, ecrid and bcid are zero.
module ttc_counters #(
  parameter int          L1ID_W  = 24,
  parameter int          ECRID_W = 8,
  parameter logic [11:0] BC_MAX  = 12'd3563
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               bc_stb,
  input  logic               l1a,
  input  logic               bcr,
  input  logic               ecr,
  output logic [11:0]        bcid,
  output logic [L1ID_W-1:0]  l1id,
  output logic [ECRID_W-1:0] ecrid
);

  logic [11:0]        bc_q;
  logic [L1ID_W-1:0]  l1id_q;
  logic [ECRID_W-1:0] ecrid_q;

  always_comb begin
    if (bcr || bc_q == BC_MAX) bcid = '0;
    else                       bcid = bc_q + 12'd1;
    l1id  = ecr ? '1 : l1id_q;
    if (l1a) l1id = l1id + 1'b1;
    ecrid = ecr ? ecrid_q + 1'b1 : ecrid_q;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bc_q    <= BC_MAX;    // so the first bunch crossing after reset is 0
      l1id_q  <= '1;
      ecrid_q <= '0;
    end else if (bc_stb) begin
      bc_q    <= bcid;
      l1id_q  <= l1id;
      ecrid_q <= ecrid;
    end
  end

endmodule
