// pulse_timer: retriggerable one-shot built on a down-counter.
//
// A trigger loads COUNT into a WIDTH-bit down-counter; 'pulse' is high
// while the counter is not zero, i.e. for exactly COUNT clocks starting the
// clock after the trigger.  A new trigger restarts the count.  The Hub uses
// it for the Combined_TTC GT reset pulse of the initialisation sequence;
// the ROD power-up timer is the same circuit with the default COUNT.
//
// Defaults: a 32-bit countdown from 0x3FFFFFFF, which at 125 MHz lasts
// 8.6 s, the "long" ROD power-up pulse of the initialisation proposal.
// Reset clears the counter (pulse low).
module pulse_timer #(
  parameter int               WIDTH = 32,
  parameter logic [WIDTH-1:0] COUNT = WIDTH'(32'h3FFF_FFFF)
) (
  input  logic clk,
  input  logic rst,
  input  logic trig,
  output logic pulse
);

  logic [WIDTH-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst)             cnt <= '0;
    else if (trig)       cnt <= COUNT;
    else if (cnt != '0)  cnt <= cnt - 1'b1;
  end

  assign pulse = (cnt != '0);

endmodule
