// link_mon_regs: read-only IPbus slave for monitoring the control links.
//
// Gives software a view of what the Hub receives and sends, the role of
// the diagnostic block next to the Shadow and Control registers:
//   0x10..0x13  Readout_Ctrl Shadow registers Word_0..Word_3
//   0x14        CRC error counts {other Hub link, Readout_Ctrl} (16 bit each)
//   0x15        status {.., init step[10:8], .., ohub_aligned, pro_full_seen,
//               pro_empty_seen, roc_aligned}
//   0x16        extended L1ID {ECRID, L1ID}
//   0x17        BCID
//   0x18..0x1B  Control registers of the Combined_TTC output to this ROD
//   0x1C..0x1F  Shadow registers of the Combined_TTC link from the other Hub
// pro_*_seen are sticky flags of the PRO FIFO error
// pulses, cleared by a write to 0x15.  IPbus timing as hub_regs: ack one
// clock after the strobe.  The register layout is this design's own.
module link_mon_regs
  import hub_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  ipb_wbus_t   ipb_in,
  output ipb_rbus_t   ipb_out,
  input  msg_words_t  roc_shadow,
  input  logic [15:0] roc_crc_err_cnt,
  input  logic        roc_aligned,
  input  init_step_t  step,
  input  logic        pro_empty_err,
  input  logic        pro_full_err,
  input  logic [23:0] l1id,
  input  logic [7:0]  ecrid,
  input  logic [11:0] bcid,
  input  msg_words_t  rod_cttc_words,
  input  msg_words_t  ohub_shadow,
  input  logic [15:0] ohub_crc_err_cnt,
  input  logic        ohub_aligned
);

  logic       ack_q;
  logic       empty_seen, full_seen;
  logic [3:0] a;
  logic [31:0] rd;

  assign a = ipb_in.addr[3:0];

  always_comb begin
    rd = '0;
    case (a)
      4'h0, 4'h1, 4'h2, 4'h3: rd = roc_shadow[a[1:0]];
      4'h4: rd = {ohub_crc_err_cnt, roc_crc_err_cnt};
      4'h5: rd = {21'h0, step, 4'h0, ohub_aligned, full_seen, empty_seen, roc_aligned};
      4'h6: rd = {ecrid, l1id};
      4'h7: rd = {20'h0, bcid};
      4'h8, 4'h9, 4'hA, 4'hB: rd = rod_cttc_words[a[1:0]];
      default: rd = ohub_shadow[a[1:0]];            // 0xC..0xF
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ack_q      <= 1'b0;
      empty_seen <= 1'b0;
      full_seen  <= 1'b0;
      ipb_out    <= IPB_RBUS_NULL;
    end else begin
      ipb_out.ack <= 1'b0;
      ack_q       <= 1'b0;
      if (pro_empty_err) empty_seen <= 1'b1;
      if (pro_full_err)  full_seen  <= 1'b1;
      if (ipb_in.strobe && !ack_q) begin
        ack_q         <= 1'b1;
        ipb_out.ack   <= 1'b1;
        ipb_out.rdata <= rd;
        if (ipb_in.write && a == 4'h5) begin
          empty_seen <= 1'b0;
          full_seen  <= 1'b0;
        end
      end
    end
  end

endmodule
