// tb_pulse_timer: the pulse must last exactly COUNT clocks after a trigger,
// restart on a new trigger and stay low otherwise.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_pulse_timer;
  localparam int COUNT = 37;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, trig = 0, pulse;
  int width;

  pulse_timer #(.WIDTH(8), .COUNT(8'(COUNT))) dut (.*);

  always #4 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  task automatic measure(output int n);
    n = 0;
    @(posedge clk); #1;
    while (pulse) begin n++; @(posedge clk); #1; end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    #1 `CHECK_EQ(pulse, 1'b0, "idle after reset")
    for (int k = 0; k < 20; k++) begin
      @(posedge clk); trig <= 1; @(posedge clk); trig <= 0;
      #1 `CHECK_EQ(pulse, 1'b1, "pulse starts the clock after the trigger")
      width = 1;
      @(posedge clk); #1;
      while (pulse) begin width++; @(posedge clk); #1; end
      `CHECK_EQ(width, COUNT, "pulse width")
      repeat ($urandom_range(1, 10)) @(posedge clk);
      #1 `CHECK_EQ(pulse, 1'b0, "stays low")
    end
    // retrigger in the middle
    @(posedge clk); trig <= 1; @(posedge clk); trig <= 0;
    repeat (20) @(posedge clk);
    trig <= 1; @(posedge clk); trig <= 0;
    width = 0;
    #1;
    while (pulse) begin width++; @(posedge clk); #1; end
    `CHECK_EQ(width, COUNT, "retriggered pulse width")
    `TB_FINISH
  end
endmodule
