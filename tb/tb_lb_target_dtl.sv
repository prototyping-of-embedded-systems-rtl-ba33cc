// tb_lb_target_dtl: drives the local bus as the PCI target core does (address
// phase with LB_Sadr, then LB_BA select, LB_RWn and LB_Mrdy) and checks that
// the wrapper turns a write burst into DTL writes at incrementing addresses,
// a read burst into the right data on LB_D, holds LB_TBusy while the DTL side
// stalls, and ignores transfers for another base address. It also checks
// random bursts, that no read is fetched before the initiator is ready, and
// that LB_Mgrdy reads exactly the addressed word.
`timescale 1ns/1ps
module tb_lb_target_dtl;
  import chp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, busy_cycles = 0;

  logic lb_sadr = 0, lb_rwn = 0, lb_mrdy = 0, lb_mgrdy = 0;
  logic [6:0] lb_ba = 0;
  logic [31:0] lb_d_i = 0, lb_d_o;
  logic lb_d_oe, lb_tbusy_o, lb_tbusy_oe;
  dtl_req_t ini_req; dtl_rsp_t ini_rsp;

  lb_target_dtl #(.BA_IDX(3), .ADDR_W(13)) dut (
    .clk, .rst_n, .lb_sadr, .lb_ba, .lb_rwn, .lb_mrdy, .lb_mgrdy, .lb_d_i,
    .lb_d_o, .lb_d_oe, .lb_tbusy_o, .lb_tbusy_oe, .ini_req, .ini_rsp);
  tb_dtl_mem #(.AW_WORDS(11)) mem (.clk, .rst_n, .req(ini_req), .rsp(ini_rsp));

  `include "tb_lb_tasks.svh"

  always @(posedge clk) if (lb_ba[3] && lb_tbusy_oe && lb_tbusy_o && lb_mrdy) busy_cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] d;
    logic [31:0] burst [4];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // single write and read, PCI address with upper bits that are dropped
    lb_write(3, 32'hF000_0100, 32'h1111_2222);
    repeat (8) @(posedge clk);
    check(mem.mem[32'h100 >> 2] == 32'h1111_2222, "single write");
    lb_read(3, 32'hF000_0100, d);
    check(d == 32'h1111_2222, "single read");
    // write burst of four words
    for (int k = 0; k < 4; k++) burst[k] = 32'h5000_0000 + 32'(k);
    lb_write_burst(3, 32'h0000_0200, burst, 4);
    repeat (8) @(posedge clk);
    for (int k = 0; k < 4; k++) check(mem.mem[(32'h200 >> 2) + k] == burst[k], "burst write word");
    // read burst
    lb_read_burst(3, 32'h0000_0200, burst, 4);
    for (int k = 0; k < 4; k++) check(burst[k] == 32'h5000_0000 + 32'(k), "burst read word");
    // another target's base address: nothing must happen here
    lb_write(2, 32'h0000_0300, 32'hBAD0_BAD0);
    repeat (8) @(posedge clk);
    check(mem.mem[32'h300 >> 2] == 0, "other base address ignored");
    check(busy_cycles > 0, "LB_TBusy held the initiator at least once");
    check(!lb_d_oe && !lb_tbusy_oe, "unselected target leaves LB_D and LB_TBusy undriven");
    // longer random bursts at random word addresses
    for (int r = 0; r < 4; r++) begin
      logic [31:0] a, wr [4], rd [4];
      a = 32'(($urandom_range(0, 48)) * 4);
      for (int k = 0; k < 4; k++) wr[k] = $urandom();
      lb_write_burst(3, a, wr, 4);
      lb_read_burst(3, a, rd, 4);
      for (int k = 0; k < 4; k++) check(rd[k] == wr[k], $sformatf("random burst at %h word %0d", a, k));
    end
    // a read with the initiator not ready must not start a DTL read, and
    // LB_Mgrdy must read like LB_Mrdy (no prefetch, same data)
    begin
      int unsigned rc;
      rc = mem.rd_cnt;
      lb_addr(3, 32'h0000_0100);
      lb_rwn = 1;
      repeat (6) @(negedge clk);
      check(mem.rd_cnt == rc, "no read is fetched while neither Mrdy nor Mgrdy");
      lb_mgrdy = 1;
      #1; while (lb_tbusy_o) begin @(negedge clk); #1; end
      check(lb_d_oe && lb_d_o == 32'h1111_2222, "read with LB_Mgrdy returns the addressed word");
      @(negedge clk);
      lb_mgrdy = 0; lb_rwn = 0;
      repeat (4) @(posedge clk);
      check(mem.rd_cnt == rc + 1, "exactly one DTL read for one LB_Mgrdy word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
