// cttc_word_builder: Control registers of one Combined_TTC output.
//
// The Hub sends one Combined_TTC message per LHC clock to each FEX slot
// (logical slots 3..14), to its own ROD and to the other Hub.  This module
// fills the four Control registers of one such output at every bc_stb:
//   Word_0 : version, Reset 3:0, L1A, BCR, ECR, Privileged Readout;
//   Word_1 : L1ID (24 bit) and ECRID (8 bit);
//   Word_2 : control channel, reserved, sent as zero;
//   Word_3 : Link_reset 3:0, ROD Busy, Link Enable, rod 0/1 channel up,
//            shelf number (the CRC is added by ctrl_reg_tx).
// Link-reset routing: a FEX in slot 3..8 receives the four Readout_Ctrl
// resets "slot N link reset 0..3", a FEX in slot 9..14 its single reset on
// Link_reset 0.  The Readout_Ctrl Global_Link_Reset (Aurora_Init) is ORed
// into all four bits of every destination, which is how it reaches the
// whole shelf.  ROD Busy and the slot's channel-up flag come from the
// Readout_Ctrl Shadow registers of this Hub's ROD (rod 0); rod 1 channel up
// comes from the other Hub's ROD via other_chan_up.
//
// Parameter DEST_SLOT: 3..14 for a FEX slot, 0 (DEST_ROD) or 1
// (DEST_OTHER_HUB) for the non-FEX destinations, which get only the global
// reset and no channel-up flags.  Timing: ctrl_words is registered and
// changes at bc_stb.  Bit positions and per-slot routing follow the link
// tables; the Aurora_Init OR, the meaning of rod 0 / rod 1, and the inputs
// for Link Enable and Reset 3:0 are this design's choices.
module cttc_word_builder
  import hub_pkg::*;
#(
  parameter int DEST_SLOT = 3
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        bc_stb,
  input  ttc_bits_t   ttc,
  input  logic [23:0] l1id,
  input  logic [7:0]  ecrid,
  input  roc_fields_t roc,
  input  logic [11:0] other_chan_up,  // other Hub's ROD, index = slot-3
  input  logic [3:0]  sys_reset,
  input  logic        link_enable,
  input  logic [2:0]  shelf,
  output msg_words_t  ctrl_words
);

  localparam bit IS_FEX  = (DEST_SLOT >= FIRST_FEX_SLOT) &&
                           (DEST_SLOT <  FIRST_FEX_SLOT + N_FEX_SLOTS);
  localparam int SLOT_IX = IS_FEX ? DEST_SLOT - FIRST_FEX_SLOT : 0;
  localparam int IX4     = (SLOT_IX < 6) ? SLOT_IX : 0;      // slots 3..8
  localparam int IX1     = (SLOT_IX < 6) ? 0 : SLOT_IX - 6;  // slots 9..14

  cttc_fields_t f;
  logic [3:0]   slot_rst;

  always_comb begin
    slot_rst = '0;
    if (IS_FEX) begin
      if (SLOT_IX < 6) slot_rst = roc.link_rst_4[IX4];
      else             slot_rst = {3'b000, roc.link_rst_1[IX1]};
    end
    f              = '0;
    f.version      = FORMAT_VERSION;
    f.reset        = sys_reset;
    f.ttc          = ttc;
    f.l1id         = l1id;
    f.ecrid        = ecrid;
    f.link_reset   = slot_rst | {4{roc.aurora_init}};
    f.rod_busy     = roc.rod_busy;
    f.link_enable  = link_enable;
    f.rod0_chan_up = IS_FEX ? roc.chan_up[SLOT_IX]    : 1'b0;
    f.rod1_chan_up = IS_FEX ? other_chan_up[SLOT_IX]  : 1'b0;
    f.shelf        = shelf;
  end

  always_ff @(posedge clk) begin
    if (rst)         ctrl_words <= cttc_pack('0);
    else if (bc_stb) ctrl_words <= cttc_pack(f);
  end

endmodule
