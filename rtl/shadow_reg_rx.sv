// shadow_reg_rx: receive side of a 128-bit control-register link.
//
// Rebuilds the four Shadow registers from the word stream sent by
// ctrl_reg_tx.  A word whose byte 0 is the K28.5 comma (and flagged as a K
// character) starts a message; the next three words complete it.  When the
// fourth word arrives the CRC-9 of the message is recomputed and compared
// with Word_3 bits 31:23.  On a match all four Shadow registers are updated
// together and msg_ok pulses.  On a mismatch the whole message is discarded
// (the Shadow registers keep the last good message), crc_err pulses and the
// saturating error counter counts.  A comma arriving before a message is
// complete ends the partial message with a frame_err pulse and starts a
// new one.
//
// Interface: rx_data/rx_charisk from an 8b/10b decoder with a 32-bit user
// interface, one word per clock.  Timing: shadow_words and msg_ok change on
// the clock edge after the one that presented Word_3.  'aligned' is high
// after a good message and low after any error.  Discarding a message with
// a bad CRC follows the link specification; the frame-error rule, the
// error counter and the reset values (all zero) are this design's choices.
module shadow_reg_rx
  import hub_pkg::*;
#(
  parameter int ERR_CNT_W = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [31:0]          rx_data,
  input  logic [3:0]           rx_charisk,
  output msg_words_t           shadow_words,
  output logic                 msg_ok,
  output logic                 crc_err,
  output logic                 frame_err,
  output logic                 aligned,
  output logic [ERR_CNT_W-1:0] crc_err_cnt
);

  logic [2:0][31:0] buf_q;     // Word_0..Word_2 of the message in progress
  logic [1:0]       idx;       // index of the next word expected
  logic             in_frame;
  logic             is_comma;
  msg_words_t       cand;
  logic [8:0]       crc_calc;

  assign is_comma = (rx_charisk == 4'b0001) && (rx_data[7:0] == K28_5);
  assign cand     = {rx_data, buf_q[2], buf_q[1], buf_q[0]};

  crc9 u_crc (.msg(cand), .crc(crc_calc));

  always_ff @(posedge clk) begin
    if (rst) begin
      buf_q        <= '0;
      idx          <= '0;
      in_frame     <= 1'b0;
      shadow_words <= '0;
      msg_ok       <= 1'b0;
      crc_err      <= 1'b0;
      frame_err    <= 1'b0;
      aligned      <= 1'b0;
      crc_err_cnt  <= '0;
    end else begin
      msg_ok    <= 1'b0;
      crc_err   <= 1'b0;
      frame_err <= 1'b0;
      if (is_comma) begin
        if (in_frame) begin
          frame_err <= 1'b1;
          aligned   <= 1'b0;
        end
        buf_q[0] <= rx_data;
        idx      <= 2'd1;
        in_frame <= 1'b1;
      end else if (in_frame) begin
        if (idx == 2'd3) begin
          in_frame <= 1'b0;
          idx      <= 2'd0;
          if (crc_calc == rx_data[31:23]) begin
            shadow_words <= cand;
            msg_ok       <= 1'b1;
            aligned      <= 1'b1;
          end else begin
            crc_err <= 1'b1;
            aligned <= 1'b0;
            if (crc_err_cnt != '1) crc_err_cnt <= crc_err_cnt + 1'b1;
          end
        end else begin
          buf_q[idx] <= rx_data;
          idx        <= idx + 2'd1;
        end
      end
    end
  end

endmodule
