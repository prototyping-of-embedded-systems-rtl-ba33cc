// tb_board_split_apps: the producer and the consumer application each run
// alone on the board FPGA, as on a board that carries only one of them.
// The unused C-HEAP Block is simply never switched on (Nbuf stays 0), which
// gives the single-block configuration with the full design at its default
// parameters. Between the two phases the FPGA is reset.
//   Phase P (producer only): block 1, 8 tokens in SRAM. The host consumes
//     200 tokens with random pauses and checks the sequence 0, 1, 2, ...;
//     afterwards the consumer side must have done nothing.
//   Phase C (consumer only): block 2, 8 tokens in SRAM, its semaphore copy
//     also in SRAM. The host produces 200 random words with random pauses;
//     the task's last-word, count and sum registers must match.
// Both phases wrap the channel many times (roll-over flag toggling).
`timescale 1ns/1ps
module tb_board_split_apps;
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
    .sram_cs_n(cs_n), .sram_we_n(we_n), .sram_addr, .sram_wdata, .sram_rdata,
    .unmapped_cnt);

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
  localparam logic [31:0] B1 = 32'h1020, B2 = 32'h1040, TASK = 32'h1800;
  localparam int NBUF = 8, NTOK = 200;

  function automatic logic [31:0] smpr_inc(input logic [31:0] s);
    if (int'(s[30:0]) + 1 == NBUF) return {~s[31], 31'd0};
    return {s[31], s[30:0] + 31'd1};
  endfunction
  function automatic int filled(input logic [31:0] prod, input logic [31:0] cons);
    if (prod[31] == cons[31]) return int'(prod[30:0]) - int'(cons[30:0]);
    return NBUF - (int'(cons[30:0]) - int'(prod[30:0]));
  endfunction

  task automatic board_reset();
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    lb_write(BA_REG, 32'h0000, PCI_MEM);
    lb_write(BA_REG, 32'h0800, PCI_MEM);
  endtask

  int rolls = 0;

  initial begin
    logic [31:0] d, p, c, mine, sum, last;
    int got, put, guard;
    // ------------------------------------------------------ phase P
    board_reset();
    for (int i = 0; i < 4; i++) sram.mem0[16 + i] = '0;     // semaphores at 0x40..
    lb_write(BA_REG, B1 + 32'(REG_RSMPR_ADDR), PCI_MEM + 32'h40);
    lb_write(BA_REG, B1 + 32'(REG_BUF_PTR),    PCI_MEM + 32'h100);
    lb_write(BA_REG, B1 + 32'(REG_MEM_LSMPR),  PCI_MEM + 32'h44);
    lb_write(BA_REG, B1 + 32'(REG_NBUF), NBUF);
    mine = 0; got = 0; guard = 0;
    while (got < NTOK && guard < 5000) begin
      guard++;
      lb_read(BA_MEM, 32'h44, p);
      for (int k = filled(p, mine); k > 0 && got < NTOK; k--) begin
        lb_read(BA_MEM, 32'h100 + 32'(mine[30:0]) * 4, d);
        check(d == 32'(got), $sformatf("producer board: token %0d holds %0d", got, d));
        got++;
        mine = smpr_inc(mine);
        if (mine[30:0] == 0) rolls++;
        lb_write(BA_MEM, 32'h40, mine);
      end
      repeat ($urandom_range(0, 40)) @(posedge clk);
    end
    check(got == NTOK, "producer board: all tokens received");
    repeat (200) @(posedge clk);
    lb_read(BA_REG, TASK + 32'h4, d); check(d == NTOK + NBUF, "producer board: produced count (channel refilled)");
    lb_read(BA_REG, TASK + 32'h8, d); check(d == 0, "producer board: consumer idle");
    lb_read(BA_REG, B2 + 32'(REG_LSMPR), d); check(d == 0, "producer board: block 2 untouched");
    lb_read(BA_REG, B1 + 32'(REG_LSMPR), d); lb_read(BA_MEM, 32'h44, p);
    check(d == p, "producer board: LSMPR copy up to date");
    check(host.wr_cnt == 0 && host.rd_cnt == 0, "producer board: nothing left the board");
    // ------------------------------------------------------ phase C
    board_reset();
    for (int i = 0; i < 4; i++) sram.mem0[32 + i] = '0;     // semaphores at 0x80..
    lb_write(BA_REG, B2 + 32'(REG_RSMPR_ADDR), PCI_MEM + 32'h80);
    lb_write(BA_REG, B2 + 32'(REG_BUF_PTR),    PCI_MEM + 32'h200);
    lb_write(BA_REG, B2 + 32'(REG_MEM_LSMPR),  PCI_MEM + 32'h84);
    lb_write(BA_REG, B2 + 32'(REG_NBUF), NBUF);
    mine = 0; put = 0; guard = 0; sum = 0; last = 0;
    while (put < NTOK && guard < 5000) begin
      guard++;
      lb_read(BA_MEM, 32'h84, c);
      for (int k = NBUF - filled(mine, c); k > 0 && put < NTOK; k--) begin
        d = $urandom();
        lb_write(BA_MEM, 32'h200 + 32'(mine[30:0]) * 4, d);
        sum += d; last = d; put++;
        mine = smpr_inc(mine);
        if (mine[30:0] == 0) rolls++;
        lb_write(BA_MEM, 32'h80, mine);
      end
      repeat ($urandom_range(0, 40)) @(posedge clk);
    end
    check(put == NTOK, "consumer board: all tokens written");
    guard = 0;
    do begin
      repeat (50) @(posedge clk);
      lb_read(BA_REG, TASK + 32'h8, d);
      guard++;
    end while (d != NTOK && guard < 100);
    check(d == NTOK, "consumer board: consumed count");
    lb_read(BA_REG, TASK + 32'h0, d); check(d == last, "consumer board: last word");
    lb_read(BA_REG, TASK + 32'hC, d); check(d == sum, "consumer board: sum of all words");
    lb_read(BA_REG, TASK + 32'h4, d); check(d == 0, "consumer board: producer idle");
    lb_read(BA_MEM, 32'h84, c); check(c == mine, "consumer board: consumer semaphore caught up");
    check(rolls >= 2 * (NTOK / NBUF) - 1, "channels wrapped many times");
    $display("producer board and consumer board: %0d tokens each, %0d wraps", NTOK, rolls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
