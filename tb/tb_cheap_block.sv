// tb_cheap_block: checks the C-HEAP Block in both of its versions.
//  A: polling hardware-software output channel (Nbuf 3, 8-byte tokens). The
//     software consumer's counter lives in a memory model; the test claims
//     all tokens before releasing any, checks pointers, blocking, polling,
//     the copy of LSMPR written to memory and the roll-over flag.
//  B: hardware-hardware input channel (Nbuf 2). The remote producer's
//     semaphore lives in a memory model and the testbench drives the
//     signalling-register inputs; the block must not read the bus while
//     blocked until a matching wake-up value arrives, and must write its
//     sgnl_value to the remote signalling register after each release.
// Expected values come from the C-HEAP counting rules, worked out here.
`timescale 1ns/1ps
module tb_cheap_block;
  import chp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------------------------------------------------------- block A
  dtl_req_t m_req = DTL_REQ_IDLE;   // config port of A (task include uses m_*)
  dtl_rsp_t m_rsp;
  dtl_req_t a_ini_req; dtl_rsp_t a_ini_rsp;
  logic a_valid, a_ack = 0, a_rel = 0;
  logic [31:0] a_ptr;

  cheap_block #(.INPUT(1'b0), .SIZE_BUF(8), .HW_SW(1'b1)) dut_a (
    .clk, .rst_n, .tgt_req(m_req), .tgt_rsp(m_rsp),
    .ini_req(a_ini_req), .ini_rsp(a_ini_rsp),
    .sgnl_reg(32'h0), .chg_sgnl(1'b0),
    .chp_ptr_valid(a_valid), .chp_buf_ptr(a_ptr),
    .chp_ptr_ack(a_ack), .chp_released_buf(a_rel)
  );
  tb_dtl_mem #(.AW_WORDS(8)) mem_a (.clk, .rst_n, .req(a_ini_req), .rsp(a_ini_rsp));

  // ---------------------------------------------------------------- block B
  dtl_req_t b_cfg_req = DTL_REQ_IDLE; dtl_rsp_t b_cfg_rsp;
  dtl_req_t b_ini_req; dtl_rsp_t b_ini_rsp;
  logic b_valid, b_ack = 0, b_rel = 0, b_chg = 0;
  logic [31:0] b_ptr, b_sgnl = 0;

  cheap_block #(.INPUT(1'b1), .SIZE_BUF(4), .HW_SW(1'b0)) dut_b (
    .clk, .rst_n, .tgt_req(b_cfg_req), .tgt_rsp(b_cfg_rsp),
    .ini_req(b_ini_req), .ini_rsp(b_ini_rsp),
    .sgnl_reg(b_sgnl), .chg_sgnl(b_chg),
    .chp_ptr_valid(b_valid), .chp_buf_ptr(b_ptr),
    .chp_ptr_ack(b_ack), .chp_released_buf(b_rel)
  );
  tb_dtl_mem #(.AW_WORDS(8)) mem_b (.clk, .rst_n, .req(b_ini_req), .rsp(b_ini_rsp));

  `include "tb_dtl_tasks.svh"

  // claim one token of A/B: returns the pointer
  task automatic claim_a(output logic [31:0] p);
    @(negedge clk); #1;
    while (!a_valid) begin @(negedge clk); #1; end
    p = a_ptr; a_ack = 1; @(posedge clk); #1; a_ack = 0;
  endtask
  task automatic release_a();
    @(negedge clk); a_rel = 1; @(posedge clk); #1; a_rel = 0;
  endtask
  task automatic claim_b(output logic [31:0] p);
    @(negedge clk); #1;
    while (!b_valid) begin @(negedge clk); #1; end
    p = b_ptr; b_ack = 1; @(posedge clk); #1; b_ack = 0;
  endtask
  task automatic release_b();
    @(negedge clk); b_rel = 1; @(posedge clk); #1; b_rel = 0;
  endtask
  task automatic signal_b(input logic [31:0] v);
    @(negedge clk); b_sgnl = v; b_chg = 1; @(negedge clk); b_chg = 0;
  endtask
  task automatic cfg_b(input logic [4:0] a, input logic [31:0] d);
    dtl_req_t save_req;
    // reuse the DTL tasks on the B config port by swapping the bundle
    save_req = m_req;
    @(negedge clk);
    b_cfg_req.cmd_valid = 1; b_cfg_req.cmd_addr = 32'(a); b_cfg_req.cmd_read = 0;
    #1; while (!b_cfg_rsp.cmd_accept) begin @(negedge clk); #1; end
    @(posedge clk); #1; b_cfg_req.cmd_valid = 0; b_cfg_req.wr_valid = 1; b_cfg_req.wr_data = d;
    @(negedge clk); #1; while (!b_cfg_rsp.wr_accept) begin @(negedge clk); #1; end
    @(posedge clk); #1; b_cfg_req.wr_valid = 0;
    m_req = save_req;
  endtask
  task automatic cfg_b_read(input logic [4:0] a, output logic [31:0] d);
    @(negedge clk);
    b_cfg_req.cmd_valid = 1; b_cfg_req.cmd_addr = 32'(a); b_cfg_req.cmd_read = 1;
    #1; while (!b_cfg_rsp.cmd_accept) begin @(negedge clk); #1; end
    @(posedge clk); #1; b_cfg_req.cmd_valid = 0; b_cfg_req.rd_accept = 1;
    @(negedge clk); #1; while (!b_cfg_rsp.rd_valid) begin @(negedge clk); #1; end
    d = b_cfg_rsp.rd_data;
    @(posedge clk); #1; b_cfg_req.rd_accept = 0;
  endtask

  // ---------------------------------------------------------------- test A
  task automatic test_a();
    logic [31:0] p, d;
    int unsigned rd0;
    // not configured: Nbuf = 0 keeps the channel idle
    repeat (10) @(posedge clk);
    check(!a_valid, "A: no pointer before Nbuf is written");
    dtl_write({27'd0, REG_RSMPR_ADDR}, 32'h40);
    dtl_write({27'd0, REG_BUF_PTR},    32'h100);
    dtl_write({27'd0, REG_MEM_LSMPR},  32'h44);
    dtl_write({27'd0, REG_NBUF},       32'd3);
    dtl_read ({27'd0, REG_NBUF}, d);
    check(d == 3, "A: Nbuf register reads back");
    // output channel, empty FIFO: all three tokens available, claimed in order
    claim_a(p); check(p == 32'h100, "A: first token pointer");
    claim_a(p); check(p == 32'h108, "A: second token pointer (SIZE_BUF 8)");
    claim_a(p); check(p == 32'h110, "A: third token pointer");
    repeat (5) @(posedge clk);
    check(!a_valid, "A: blocked when every token is claimed");
    rd0 = mem_a.rd_cnt;
    repeat (60) @(posedge clk);
    check(mem_a.rd_cnt > rd0 + 2, "A: polls the software counter while blocked");
    // release in FIFO order
    release_a();
    repeat (30) @(posedge clk);
    dtl_read({27'd0, REG_LSMPR}, d);
    check(d == 32'd1, "A: LSMPR after one release");
    check(mem_a.mem[32'h44 >> 2] == 32'd1, "A: LSMPR copied to channel record");
    check(!a_valid, "A: still blocked, consumer has not consumed");
    release_a(); release_a();
    repeat (30) @(posedge clk);
    dtl_read({27'd0, REG_LSMPR}, d);
    check(d == 32'h8000_0000, "A: LSMPR rolled over with flag set");
    check(mem_a.mem[32'h44 >> 2] == 32'h8000_0000, "A: rolled LSMPR in channel record");
    // software consumer consumed two tokens: R = {0, 2}, flags differ -> 2 free
    mem_a.mem[32'h40 >> 2] = 32'd2;
    claim_a(p); check(p == 32'h100, "A: pointer wraps to first token");
    claim_a(p); check(p == 32'h108, "A: second free token after wrap");
    repeat (20) @(posedge clk);
    check(!a_valid, "A: only two tokens free");
    release_a(); release_a();
  endtask

  // ---------------------------------------------------------------- test B
  task automatic test_b();
    logic [31:0] p, d;
    int unsigned rd0;
    cfg_b(REG_SGNL_REG_ADDR, 32'h90);
    cfg_b(REG_SGNL_VALUE,    32'd7);
    cfg_b(REG_RSMPR_ADDR,    32'h80);
    cfg_b(REG_BUF_PTR,       32'h200);
    cfg_b(REG_NBUF,          32'd2);
    repeat (30) @(posedge clk);
    check(!b_valid, "B: input channel empty at start");
    rd0 = mem_b.rd_cnt;
    mem_b.mem[32'h80 >> 2] = 32'd1;     // producer released one token, no signal yet
    repeat (60) @(posedge clk);
    check(mem_b.rd_cnt == rd0, "B: no bus reads while blocked without wake-up");
    check(!b_valid, "B: stays blocked without wake-up");
    signal_b(32'd5);                    // another channel's value
    repeat (30) @(posedge clk);
    check(mem_b.rd_cnt == rd0 && !b_valid, "B: ignores a foreign wake-up value");
    signal_b(32'd7);
    claim_b(p); check(p == 32'h200, "B: first filled token after wake-up");
    check(mem_b.rd_cnt == rd0 + 1, "B: one semaphore read per wake-up");
    release_b();
    repeat (30) @(posedge clk);
    check(mem_b.mem[32'h90 >> 2] == 32'd7, "B: sgnl_value written to remote signalling register");
    cfg_b_read(REG_LSMPR, d);
    check(d == 32'd1, "B: LSMPR after release");
    // producer wrote a second token and rolled over: R = {1, 0}
    mem_b.mem[32'h90 >> 2] = 32'd0;
    mem_b.mem[32'h80 >> 2] = 32'h8000_0000;
    signal_b(32'd7);
    claim_b(p); check(p == 32'h204, "B: second token after remote roll-over");
    release_b();
    repeat (30) @(posedge clk);
    cfg_b_read(REG_LSMPR, d);
    check(d == 32'h8000_0000, "B: local roll-over");
    check(!b_valid, "B: channel empty again");
    check(mem_b.mem[32'h90 >> 2] == 32'd7, "B: wake-up written for second release");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      test_a();
      test_b();
    join
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
