// ttc_pro_pipeline: TTC delay pipeline and Privileged Readout (PRO) FIFO.
//
// L1A, BCR and ECR enter a shift register that advances once per LHC clock
// (bc_stb) and leave it DELAY LHC clocks later.  Privileged-readout bits are
// queued in a PRO_DEPTH-entry FIFO as they are announced (pro_wr/pro_bit).
// Each LHC clock the delayed L1A/BCR/ECR are read from the end of the
// pipeline; if that L1A is set, one PRO bit is popped and presented on the
// output together with L1A, BCR and ECR, so all four reach the backplane in
// the same message.  An L1A that finds the FIFO empty sends PRO = 0 and
// pulses pro_empty_err; a push into a full FIFO is dropped and pulses
// pro_full_err.
//
// Interface: inputs are sampled at bc_stb; the ttc output changes only at
// bc_stb and is stable for the whole LHC clock.  Latency: a signal sampled
// at bc_stb number k appears on the output from bc_stb number k+DELAY on
// (DELAY pipeline stages plus the output register).  The pipeline/FIFO mechanism follows the
// specification; DELAY, PRO_DEPTH, the source of the PRO bits and the
// empty/full behaviour are this design's choices.
module ttc_pro_pipeline
  import hub_pkg::*;
#(
  parameter int DELAY     = 8,   // LHC clocks, >= 1
  parameter int PRO_DEPTH = 16   // power of two
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      bc_stb,
  input  logic      l1a_in,
  input  logic      bcr_in,
  input  logic      ecr_in,
  input  logic      pro_wr,
  input  logic      pro_bit,
  output ttc_bits_t ttc,
  output logic      pro_empty_err,
  output logic      pro_full_err
);

  localparam int AW = $clog2(PRO_DEPTH);

  typedef struct packed { logic l1a, bcr, ecr; } trig_t;

  trig_t [DELAY-1:0]    pipe;
  trig_t                last;
  logic [PRO_DEPTH-1:0] fifo;
  logic [AW-1:0]        rd_ptr, wr_ptr;
  logic [AW:0]          count;
  logic                 pop, push, empty, full;

  assign last  = pipe[DELAY-1];
  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(PRO_DEPTH));
  assign pop   = bc_stb && last.l1a && !empty;
  assign push  = pro_wr && (!full || pop);

  always_ff @(posedge clk) begin
    if (rst) begin
      pipe          <= '0;
      ttc           <= '0;
      fifo          <= '0;
      rd_ptr        <= '0;
      wr_ptr        <= '0;
      count         <= '0;
      pro_empty_err <= 1'b0;
      pro_full_err  <= 1'b0;
    end else begin
      pro_empty_err <= 1'b0;
      pro_full_err  <= pro_wr && !push;
      if (bc_stb) begin
        for (int i = DELAY-1; i > 0; i--) pipe[i] <= pipe[i-1];
        pipe[0]       <= '{l1a: l1a_in, bcr: bcr_in, ecr: ecr_in};
        ttc.l1a       <= last.l1a;
        ttc.bcr       <= last.bcr;
        ttc.ecr       <= last.ecr;
        ttc.pro       <= pop ? fifo[rd_ptr] : 1'b0;
        pro_empty_err <= last.l1a && empty;
      end
      if (push) begin
        fifo[wr_ptr] <= pro_bit;
        wr_ptr       <= wr_ptr + 1'b1;
      end
      if (pop) rd_ptr <= rd_ptr + 1'b1;
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

endmodule
