// tb_cheap_shell: the compounded shell with block 1 as a polling
// hardware-software output channel and block 2 as a hardware-hardware input
// channel. Both are configured through the shell's one target port (address
// decoder 2) and share its one initiator port. Block 2 is woken by writing
// its sgnl_value into the shell's own signalling register. The spare range
// of decoder 2 must answer and read as zero. A wake-up with another
// channel's value must be ignored, and both blocks then work at the same
// time through the shared initiator port.
`timescale 1ns/1ps
module tb_cheap_shell;
  import chp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  dtl_req_t m_req = DTL_REQ_IDLE;
  dtl_rsp_t m_rsp;
  dtl_req_t ini_req; dtl_rsp_t ini_rsp;
  logic [1:0] valid, ack = 0, rel = 0;
  logic [31:0] ptr [2];
  logic [15:0] unmapped_cnt;

  cheap_shell #(.NB(2), .INPUT(2'b10), .HW_SW(2'b01), .SIZE_BUF(4)) dut (
    .clk, .rst_n, .tgt_req(m_req), .tgt_rsp(m_rsp), .ini_req, .ini_rsp,
    .chp_ptr_valid(valid), .chp_buf_ptr(ptr), .chp_ptr_ack(ack),
    .chp_released_buf(rel), .unmapped_cnt);
  tb_dtl_mem #(.AW_WORDS(9)) mem (.clk, .rst_n, .req(ini_req), .rsp(ini_rsp));

  `include "tb_dtl_tasks.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic claim(input int ch, output logic [31:0] p);
    @(negedge clk); #1;
    while (!valid[ch]) begin @(negedge clk); #1; end
    p = ptr[ch]; ack[ch] = 1; @(posedge clk); #1; ack[ch] = 0;
  endtask
  task automatic release_tok(input int ch);
    @(negedge clk); rel[ch] = 1; @(posedge clk); #1; rel[ch] = 0;
  endtask

  localparam logic [31:0] B1 = 32'h20, B2 = 32'h40;

  initial begin
    logic [31:0] p, d;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // block 1: output, HW-SW
    dtl_write(B1 + 32'(REG_RSMPR_ADDR), 32'h100);
    dtl_write(B1 + 32'(REG_BUF_PTR),    32'h200);
    dtl_write(B1 + 32'(REG_MEM_LSMPR),  32'h104);
    dtl_write(B1 + 32'(REG_NBUF),       32'd2);
    // block 2: input, HW-HW
    dtl_write(B2 + 32'(REG_SGNL_REG_ADDR), 32'h300);
    dtl_write(B2 + 32'(REG_SGNL_VALUE),    32'd9);
    dtl_write(B2 + 32'(REG_RSMPR_ADDR),    32'h108);
    dtl_write(B2 + 32'(REG_BUF_PTR),       32'h400);
    dtl_write(B2 + 32'(REG_NBUF),          32'd2);
    dtl_read (B1 + 32'(REG_NBUF), d);       check(d == 2, "block 1 Nbuf via decoder 2");
    dtl_read (B2 + 32'(REG_SGNL_VALUE), d); check(d == 9, "block 2 sgnl_value via decoder 2");
    // block 1 produces two tokens
    claim(0, p); check(p == 32'h200, "block 1 first token");
    claim(0, p); check(p == 32'h204, "block 1 second token");
    release_tok(0); release_tok(0);
    // block 2: remote producer made one token, then wakes us through sgnl_reg
    mem.mem[32'h108 >> 2] = 32'd1;
    repeat (40) @(posedge clk);
    check(!valid[1], "block 2 blocked before wake-up");
    dtl_write(32'h0, 32'd9);
    claim(1, p); check(p == 32'h400, "block 2 woken through the signalling register");
    release_tok(1);
    repeat (60) @(posedge clk);
    check(mem.mem[32'h104 >> 2] == 32'h8000_0000, "block 1 LSMPR copy rolled over");
    check(mem.mem[32'h300 >> 2] == 32'd9, "block 2 wrote its sgnl_value to the remote register");
    dtl_read(B2 + 32'(REG_LSMPR), d); check(d == 32'd1, "block 2 LSMPR");
    dtl_read(32'h0, d); check(d == 32'd9, "signalling register reads back");
    dtl_read(32'h60, d); check(d == 0, "spare range reads zero");
    check(unmapped_cnt == 1, "spare access counted");
    check(!valid[0], "block 1 full: consumer has not freed a token");
    // a wake-up value of another channel must not wake block 2
    mem.mem[32'h108 >> 2] = 32'd2;
    dtl_write(32'h0, 32'd5);
    repeat (40) @(posedge clk);
    check(!valid[1], "block 2 ignores another channel's wake-up value");
    // both blocks busy at once on the shared initiator port: the software
    // consumer frees both tokens of block 1 (it polls them back), and block
    // 2 is woken with its own value
    mem.mem[32'h100 >> 2] = 32'h8000_0000;
    dtl_write(32'h0, 32'd9);
    claim(1, p); check(p == 32'h404, "block 2 second token after its own wake-up");
    claim(0, p); check(p == 32'h200, "block 1 token freed by polling");
    release_tok(1); release_tok(0);
    repeat (60) @(posedge clk);
    dtl_read(B2 + 32'(REG_LSMPR), d); check(d == 32'h8000_0000, "block 2 LSMPR rolled over");
    check(mem.mem[32'h104 >> 2] == 32'h8000_0001, "block 1 LSMPR copy after the third token");
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
