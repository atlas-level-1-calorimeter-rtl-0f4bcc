// aurora_reset_timer: Aurora channel reset timer of one link end.
//
// Every Aurora end in the shelf (Hub, ROD, FEX) runs the same timer from
// the trailing edge of the Combined_TTC link reset, so that all channels
// leave reset at the same moment and come up together.  It drives the four
// Aurora reset inputs Tx_GTReset, Tx_reset, Rx_GTReset and Rx_reset:
//   * while link_reset is high all four are held;
//   * on its falling edge a counter starts; the GT resets are released after
//     GT_CYCLES clocks and the core resets after RST_CYCLES clocks
//     (GT_CYCLES < RST_CYCLES), after which 'busy' drops.
// Firmware reset (rst) also starts the timer, so the cores never run
// without a full reset cycle.
//
// The trigger (trailing edge of the link reset) and the four outputs follow
// the initialisation proposal.  The durations (10 us / 20 us at 125 MHz),
// the release order GT reset before core reset, and identical Tx/Rx timing
// are this design's choices.
module aurora_reset_timer #(
  parameter int GT_CYCLES  = 1250,
  parameter int RST_CYCLES = 2500
) (
  input  logic clk,
  input  logic rst,
  input  logic link_reset,
  output logic tx_gtreset,
  output logic tx_reset,
  output logic rx_gtreset,
  output logic rx_reset,
  output logic busy
);

  localparam int CW = $clog2(RST_CYCLES + 1);

  logic          link_reset_q;
  logic          running;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      link_reset_q <= 1'b0;
      running      <= 1'b1;
      cnt          <= '0;
    end else begin
      link_reset_q <= link_reset;
      if (link_reset) begin
        running <= 1'b0;
        cnt     <= '0;
      end else if (link_reset_q) begin        // trailing edge
        running <= 1'b1;
        cnt     <= CW'(1);
      end else if (running) begin
        if (cnt == CW'(RST_CYCLES - 1)) running <= 1'b0;
        cnt <= cnt + 1'b1;
      end
    end
  end

  logic gt_hold, core_hold;
  assign gt_hold   = link_reset || link_reset_q || (running && cnt < CW'(GT_CYCLES));
  assign core_hold = link_reset || link_reset_q || running;

  assign tx_gtreset = gt_hold;
  assign rx_gtreset = gt_hold;
  assign tx_reset   = core_hold;
  assign rx_reset   = core_hold;
  assign busy       = running;

  initial assert (GT_CYCLES > 0 && GT_CYCLES < RST_CYCLES)
    else $error("aurora_reset_timer: need 0 < GT_CYCLES < RST_CYCLES");

endmodule
