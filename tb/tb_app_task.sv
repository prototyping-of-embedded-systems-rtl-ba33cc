// tb_app_task: runs the producer and consumer applications of the task at the
// same time, so that both share the task's single DTL initiator port, and
// reads the task's status registers through its target port. Pointers are
// offered by the testbench; produced tokens must hold 0, 1, 2, ... and the
// consumer's last word and sum registers must match the data given to it.
`timescale 1ns/1ps
module tb_app_task;
  import chp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  dtl_req_t m_req = DTL_REQ_IDLE;
  dtl_rsp_t m_rsp;
  dtl_req_t ini_req; dtl_rsp_t ini_rsp;
  logic [1:0] valid = 0, ack, rel;
  logic [31:0] ptr [2];

  app_task #(.SIZE_BUF(4)) dut (.clk, .rst_n, .tgt_req(m_req), .tgt_rsp(m_rsp),
    .ini_req, .ini_rsp, .chp_ptr_valid(valid), .chp_buf_ptr(ptr),
    .chp_ptr_ack(ack), .chp_released_buf(rel));
  tb_dtl_mem #(.AW_WORDS(8)) mem (.clk, .rst_n, .req(ini_req), .rsp(ini_rsp));

  `include "tb_dtl_tasks.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int NTOK = 6;
  logic [31:0] sum = 0, last = 0;

  task automatic offer(input int ch, input logic [31:0] p);
    @(negedge clk);
    ptr[ch] = p; valid[ch] = 1;
    #1; while (!ack[ch]) begin @(negedge clk); #1; end
    @(posedge clk); @(negedge clk); valid[ch] = 0;
    #1; while (!rel[ch]) begin @(negedge clk); #1; end
    @(posedge clk);
  endtask

  initial begin
    logic [31:0] d;
    ptr[0] = 0; ptr[1] = 0;
    for (int t = 0; t < NTOK; t++) begin
      mem.mem[64 + t] = 32'h7000_0000 + 32'(t * 3);
      sum += 32'h7000_0000 + 32'(t * 3);
    end
    last = 32'h7000_0000 + 32'((NTOK - 1) * 3);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      for (int t = 0; t < NTOK; t++) offer(0, 32'(t * 4));          // producer tokens
      for (int t = 0; t < NTOK; t++) offer(1, 32'(256 + t * 4));    // consumer tokens
    join
    repeat (5) @(posedge clk);
    for (int t = 0; t < NTOK; t++) check(mem.mem[t] == 32'(t), "produced value");
    dtl_read(32'h000, d); check(d == last, "last word register");
    dtl_read(32'h004, d); check(d == NTOK, "produced counter register");
    dtl_read(32'h008, d); check(d == NTOK, "consumed counter register");
    dtl_read(32'h00C, d); check(d == sum, "sum register");
    dtl_read(32'h010, d); check(d == 0, "spare register reads zero");
    // two more tokens for the producer only: the two counters must now differ
    for (int t = NTOK; t < NTOK + 2; t++) offer(0, 32'(t * 4));
    repeat (5) @(posedge clk);
    for (int t = NTOK; t < NTOK + 2; t++) check(mem.mem[t] == 32'(t), "produced value, producer alone");
    dtl_read(32'h004, d); check(d == NTOK + 2, "produced counter after producer-only tokens");
    dtl_read(32'h008, d); check(d == NTOK, "consumed counter unchanged");
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
