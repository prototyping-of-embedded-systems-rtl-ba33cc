// tb_cheap_board_top: end-to-end test of the board FPGA at its default
// parameters. The testbench plays the host processor on the local bus and
// the PCI side of the board:
//   * start-up: program the PCI memory address into address decoders 4 and
//     5 and configure both C-HEAP Blocks through the compounded shell;
//   * channel 1 (hardware producer -> software consumer, 4 tokens in SRAM):
//     the host polls the producer's semaphore copy in SRAM, reads each new
//     token, checks it continues the sequence 0, 1, 2, ... and writes its
//     own consumer counter back to SRAM, from where the block polls it;
//   * channel 2 (software producer -> hardware consumer, 2 tokens in SRAM):
//     the host writes tokens and its producer counter into SRAM; the block
//     copies its semaphore to an address outside the board's memory, so the
//     copy leaves through the local-bus master port, where the testbench
//     models host memory;
//   * finally the task's registers and the block registers are read back.
// Mechanisms that must each happen at least once are counted: producer and
// consumer blocking, semaphore polling, arbitration between two memory
// users, a write through the LB master path, roll-over of a semaphore,
// an LB_TBusy wait and a spare-range access.
`timescale 1ns/1ps
module tb_cheap_board_top;
  import chp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic lb_sadr = 0, lb_rwn = 0, lb_mrdy = 0, lb_mgrdy = 0;
  logic [6:0] lb_ba = 0;
  logic [31:0] lb_d_i = 0, lb_d_o;
  logic lb_d_oe, lb_tbusy_o, lb_tbusy_oe;
  dtl_req_t lbm_req; dtl_rsp_t lbm_rsp;
  logic [1:0] cs_n; logic we_n; logic [16:0] sram_addr; logic [31:0] sram_wdata;
  logic [31:0] sram_rdata [2];
  logic [15:0] unmapped_cnt;

  cheap_board_top dut (
    .clk, .rst_n, .lb_sadr, .lb_ba, .lb_rwn, .lb_mrdy, .lb_mgrdy, .lb_d_i,
    .lb_d_o, .lb_d_oe, .lb_tbusy_o, .lb_tbusy_oe, .lbm_req, .lbm_rsp,
    .sram_cs_n(cs_n), .sram_we_n(we_n), .sram_addr, .sram_wdata, .sram_rdata, .unmapped_cnt);

  tb_sram_model #(.LINE_W(17), .AW_MODEL(10)) sram (
    .clk, .cs_n, .we_n, .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata));
  tb_dtl_mem #(.AW_WORDS(6)) host (.clk, .rst_n, .req(lbm_req), .rsp(lbm_rsp));

  `include "tb_lb_tasks.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  localparam int BA_MEM = 2, BA_REG = 3;
  localparam logic [31:0] PCI_MEM = 32'h4000_0000;
  localparam logic [31:0] SH = 32'h1000, B1 = SH + 32'h20, B2 = SH + 32'h40, TASK = 32'h1800;
  localparam int NBUF1 = 4, NBUF2 = 2, NTOK1 = 11, NTOK2 = 7;

  // ------------------------------------------------------- mechanism counters
  // All counters look at the board's pins only. SRAM line 0x10 (byte 0x40)
  // and line 0x20 (byte 0x80) hold the host's semaphores; the host only
  // writes them, so every SRAM read there is a block polling its remote
  // semaphore. host_line is the SRAM line the host is reading right now;
  // an SRAM access to another line while the host waits on LB_TBusy shows
  // the memory arbiter serving a second requester.
  bit started = 0;
  int n_prod_block = 0, n_cons_block = 0, n_poll = 0, n_contend = 0, n_roll = 0, n_tbusy = 0;
  int host_line = -1;
  always @(posedge clk) if (started) begin
    if (cs_n != 2'b11 && we_n && (sram_addr == 17'h10 || sram_addr == 17'h20)) n_poll++;
    if (cs_n != 2'b11 && host_line >= 0 && int'(sram_addr) != host_line &&
        lb_ba[BA_MEM] && lb_rwn && lb_mrdy && lb_tbusy_oe && lb_tbusy_o) n_contend++;
    if (lb_tbusy_oe && lb_tbusy_o && (lb_mrdy || lb_mgrdy)) n_tbusy++;
  end

  task automatic mem_read(input logic [31:0] a, output logic [31:0] d);
    host_line = int'(a[18:2]);
    lb_read(BA_MEM, a, d);
    host_line = -1;
  endtask

  // semaphore helpers: bit 31 roll-over flag, bits 30..0 count modulo Nbuf
  function automatic logic [31:0] smpr_inc(input logic [31:0] s, input int nbuf);
    if (int'(s[30:0]) + 1 == nbuf) return {~s[31], 31'd0};
    return {s[31], s[30:0] + 31'd1};
  endfunction
  function automatic int filled(input logic [31:0] prod, input logic [31:0] cons, input int nbuf);
    if (prod[31] == cons[31]) return int'(prod[30:0]) - int'(cons[30:0]);
    return nbuf - (int'(cons[30:0]) - int'(prod[30:0]));
  endfunction

  logic [31:0] cons1 = 0, prod2 = 0, sum2 = 0, last2 = 0;
  int got1 = 0, put2 = 0;

  initial begin
    logic [31:0] d, p1, c2;
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    // ---------------------------------------------------------- start-up
    lb_write(BA_REG, 32'h0000, PCI_MEM);          // address decoder 4
    lb_write(BA_REG, 32'h0800, PCI_MEM);          // address decoder 5
    lb_read (BA_REG, 32'h0000, d); check(d == PCI_MEM, "decoder 4 base reads back");
    lb_write(BA_REG, B1 + 32'(REG_RSMPR_ADDR), PCI_MEM + 32'h40);
    lb_write(BA_REG, B1 + 32'(REG_BUF_PTR),    PCI_MEM + 32'h100);
    lb_write(BA_REG, B1 + 32'(REG_MEM_LSMPR),  PCI_MEM + 32'h44);
    lb_write(BA_REG, B2 + 32'(REG_RSMPR_ADDR), PCI_MEM + 32'h80);
    lb_write(BA_REG, B2 + 32'(REG_BUF_PTR),    PCI_MEM + 32'h200);
    lb_write(BA_REG, B2 + 32'(REG_MEM_LSMPR),  32'h8000_0010);   // off-board copy
    started = 1;
    lb_write(BA_REG, B1 + 32'(REG_NBUF), NBUF1);
    lb_write(BA_REG, B2 + 32'(REG_NBUF), NBUF2);
    lb_read (BA_REG, B1 + 32'(REG_NBUF), d); check(d == NBUF1, "block 1 Nbuf reads back");
    // let the producer fill the channel and block
    // let the producer fill channel 1 and block; nothing is offered on
    // channel 2 yet, so the consumer must be blocked too
    repeat (200) @(posedge clk);
    lb_read(BA_REG, TASK + 32'h4, d);
    check(d == NBUF1, "producer stopped after filling all tokens");
    repeat (200) @(posedge clk);
    lb_read(BA_REG, TASK + 32'h4, p1);
    if (p1 == d && d == NBUF1) n_prod_block++;
    lb_read(BA_REG, TASK + 32'h8, d);
    if (d == 0) n_cons_block++;
    check(d == 0, "consumer waits while channel 2 is empty");
    // ------------------------------------------------------- run both channels
    n = 0;
    while ((got1 < NTOK1 || put2 < NTOK2) && n < 400) begin
      n++;
      // channel 1: software consumer
      if (got1 < NTOK1) begin
        mem_read(32'h44, p1);
        if (p1[31]) n_roll++;
        for (int k = filled(p1, cons1, NBUF1); k > 0 && got1 < NTOK1; k--) begin
          mem_read(32'h100 + 32'(cons1[30:0]) * 4, d);
          check(d == 32'(got1), $sformatf("channel 1 token %0d value %0d", got1, d));
          got1++;
          cons1 = smpr_inc(cons1, NBUF1);
          lb_write(BA_MEM, 32'h40, cons1);
        end
      end
      // channel 2: software producer
      if (put2 < NTOK2) begin
        c2 = host.mem[4];
        if (NBUF2 - filled(prod2, c2, NBUF2) > 0) begin
          d = 32'h9000_0000 + 32'(put2 * 5);
          lb_write(BA_MEM, 32'h200 + 32'(prod2[30:0]) * 4, d);
          sum2 += d; last2 = d; put2++;
          prod2 = smpr_inc(prod2, NBUF2);
          lb_write(BA_MEM, 32'h80, prod2);
        end
      end
      repeat (20) @(posedge clk);
    end
    check(got1 == NTOK1 && put2 == NTOK2, "all tokens moved through both channels");
    repeat (300) @(posedge clk);
    // ---------------------------------------------------------- read back
    lb_read(BA_REG, TASK + 32'h8, d); check(d == NTOK2, "consumer token count");
    lb_read(BA_REG, TASK + 32'h0, d); check(d == last2, "consumer last word");
    lb_read(BA_REG, TASK + 32'hC, d); check(d == sum2, "consumer sum");
    lb_read(BA_REG, TASK + 32'h4, d); check(d == NTOK1 + NBUF1, "producer refilled the freed tokens");
    check(host.mem[4] == prod2, "block 2 semaphore copy via LB master equals host producer counter");
    lb_read(BA_REG, B1 + 32'(REG_LSMPR), d);
    mem_read(32'h44, p1);
    check(d == p1, "block 1 LSMPR equals its copy in SRAM");
    check(unmapped_cnt == 0, "no spare access before the test makes one");
    lb_read(BA_REG, SH + 32'h60, d); check(d == 0, "spare shell range reads zero");
    check(unmapped_cnt == 1, "spare access counted");
    // ------------------------------------------------------- mechanisms seen
    $display("mechanisms: producer-blocked %0d, consumer-blocked %0d, polls %0d, mem contention %0d, LB master writes %0d, roll-over %0d, TBusy waits %0d",
             n_prod_block, n_cons_block, n_poll, n_contend, host.wr_cnt, n_roll, n_tbusy);
    check(n_prod_block > 0, "producer blocked at least once");
    check(n_cons_block > 0, "consumer blocked at least once");
    check(n_poll > 0, "semaphore polled");
    check(n_contend > 0, "memory arbitration between concurrent requesters");
    check(host.wr_cnt > 0, "write through the LB master path");
    check(n_roll > 0, "semaphore roll-over observed");
    check(n_tbusy > 0, "LB_TBusy wait");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
