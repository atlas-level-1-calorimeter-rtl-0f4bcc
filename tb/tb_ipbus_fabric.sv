// tb_ipbus_fabric: two behavioural slaves answer with their index in the
// read data; the test checks that each address reaches only its slave (the
// other one never sees a strobe), that read data and ack come back from
// the right slave, and that unmapped addresses get err.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_ipbus_fabric;
  import hub_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  ipb_wbus_t ipb_in;
  ipb_rbus_t ipb_out;
  ipb_wbus_t [1:0] ipb_to_slaves;
  ipb_rbus_t [1:0] ipb_from_slaves;
  int strobes [2];

  `include "tb/tb_ipbus_tasks.svh"

  ipbus_fabric #(.NSLV(2), .SEL_LSB(4)) dut (.*);

  // behavioural slaves: ack one clock after the strobe, data = {index, addr}
  for (genvar s = 0; s < 2; s++) begin : g_slv
    logic busy;
    always_ff @(posedge clk) begin
      if (rst) begin
        ipb_from_slaves[s] <= '0;
        busy <= 1'b0;
      end else begin
        ipb_from_slaves[s].ack <= 1'b0;
        busy <= 1'b0;
        if (ipb_to_slaves[s].strobe && !busy) begin
          strobes[s]++;
          busy <= 1'b1;
          ipb_from_slaves[s].ack   <= 1'b1;
          ipb_from_slaves[s].rdata <= {8'(s), ipb_to_slaves[s].addr[23:0]};
        end
      end
    end
  end

  always #16 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    logic [31:0] d;
    logic e;
    ipb_in = '0;
    strobes = '{0, 0};
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      logic [31:0] a;
      int exp_s, s0, s1;
      a = (n % 3 == 0) ? 32'($urandom_range(32, 1000)) : 32'($urandom_range(0, 31));
      exp_s = (a < 16) ? 0 : (a < 32) ? 1 : -1;
      s0 = strobes[0]; s1 = strobes[1];
      if (n % 2) ipb_read(a, d, e); else ipb_write(a, $urandom, e);
      if (exp_s < 0) begin
        `CHECK_EQ(e, 1'b1, "unmapped address gives err")
        `CHECK_EQ(ipb_latency, 1, "err one clock after the strobe")
        `CHECK(strobes[0] == s0 && strobes[1] == s1, "no slave strobed for unmapped address")
      end else begin
        `CHECK_EQ(e, 1'b0, "mapped address acked")
        `CHECK_EQ(ipb_latency, 1, "answer one clock after the strobe")
        if (n % 2) `CHECK_EQ(d, {8'(exp_s), a[23:0]}, "read data from the addressed slave")
        `CHECK_EQ(strobes[exp_s], ((exp_s == 0) ? s0 : s1) + 1, "addressed slave strobed once")
        `CHECK_EQ(strobes[1 - exp_s], ((exp_s == 0) ? s1 : s0), "other slave not strobed")
      end
    end
    `TB_FINISH
  end
endmodule
