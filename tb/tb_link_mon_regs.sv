// tb_link_mon_regs: drives random monitor inputs, reads every offset and
// compares with the expected layout; checks the sticky PRO FIFO flags set
// on a pulse, survive reads and clear on a write to the status register.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_link_mon_regs;
  import hub_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  ipb_wbus_t   ipb_in;
  ipb_rbus_t   ipb_out;
  msg_words_t  roc_shadow, rod_cttc_words, ohub_shadow;
  logic [15:0] roc_crc_err_cnt, ohub_crc_err_cnt;
  logic        roc_aligned, ohub_aligned, pro_empty_err, pro_full_err;
  init_step_t  step;
  logic [23:0] l1id;
  logic [7:0]  ecrid;
  logic [11:0] bcid;

  `include "tb/tb_ipbus_tasks.svh"

  link_mon_regs dut (.*);

  always #16 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  task automatic pulse(input bit empty);
    @(negedge clk);
    if (empty) pro_empty_err = 1'b1; else pro_full_err = 1'b1;
    @(negedge clk);
    pro_empty_err = 1'b0; pro_full_err = 1'b0;
  endtask

  initial begin
    logic [31:0] d, exp;
    logic e;
    ipb_in = '0;
    pro_empty_err = 0; pro_full_err = 0;
    roc_shadow = '0; rod_cttc_words = '0; roc_crc_err_cnt = 0; roc_aligned = 0;
    ohub_shadow = '0; ohub_crc_err_cnt = 0; ohub_aligned = 0;
    step = INIT_CONFIG; l1id = 0; ecrid = 0; bcid = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int n = 0; n < 600; n++) begin
      logic [3:0] off;
      roc_shadow = {$urandom, $urandom, $urandom, $urandom};
      rod_cttc_words = {$urandom, $urandom, $urandom, $urandom};
      roc_crc_err_cnt = 16'($urandom); roc_aligned = 1'($urandom);
      ohub_shadow = {$urandom, $urandom, $urandom, $urandom};
      ohub_crc_err_cnt = 16'($urandom); ohub_aligned = 1'($urandom);
      step = init_step_t'($urandom_range(0, 6));
      l1id = 24'($urandom); ecrid = 8'($urandom); bcid = 12'($urandom);
      off = 4'($urandom);
      case (off)
        4'h0, 4'h1, 4'h2, 4'h3: exp = roc_shadow[off[1:0]];
        4'h4: exp = {ohub_crc_err_cnt, roc_crc_err_cnt};
        4'h5: exp = {21'h0, step, 4'h0, ohub_aligned, 2'b00, roc_aligned};
        4'h6: exp = {ecrid, l1id};
        4'h7: exp = {20'h0, bcid};
        4'h8, 4'h9, 4'hA, 4'hB: exp = rod_cttc_words[off[1:0]];
        default: exp = ohub_shadow[off[1:0]];
      endcase
      ipb_read(ADDR_LINK_MON + 32'(off), d, e);
      `CHECK_EQ(e, 1'b0, "read acked")
      `CHECK_EQ(ipb_latency, 1, "ack one clock after strobe")
      `CHECK_EQ(d, exp, $sformatf("offset %0h", off))
    end
    // sticky flags
    roc_aligned = 0; ohub_aligned = 0; step = INIT_RUN;
    pulse(1'b1);
    ipb_read(ADDR_LINK_MON + 5, d, e);
    `CHECK_EQ(d[2:1], 2'b01, "empty flag set")
    pulse(1'b0);
    repeat (3) ipb_read(ADDR_LINK_MON + 5, d, e);
    `CHECK_EQ(d[2:1], 2'b11, "both flags set and held over reads")
    `CHECK_EQ(d[10:8], 3'(INIT_RUN), "step field")
    ipb_write(ADDR_LINK_MON + 4, 0, e);
    ipb_read(ADDR_LINK_MON + 5, d, e);
    `CHECK_EQ(d[2:1], 2'b11, "write elsewhere keeps flags")
    ipb_write(ADDR_LINK_MON + 5, 0, e);
    `CHECK_EQ(e, 1'b0, "status write acked")
    ipb_read(ADDR_LINK_MON + 5, d, e);
    `CHECK_EQ(d[2:1], 2'b00, "write clears flags")
    `TB_FINISH
  end
endmodule
