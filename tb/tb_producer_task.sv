// tb_producer_task: plays the C-HEAP Block towards the producer. It offers a
// ring of four 8-byte tokens with random delays, records each claim and
// release, and checks that every released token holds the next two numbers
// of the counting sequence and that releases come in claim order, one per
// claim. The pointer is withheld for a while to check that the task blocks.
`timescale 1ns/1ps
module tb_producer_task;
  import chp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic valid = 0, ack, rel;
  logic [31:0] ptr = 0, tokens_done;
  dtl_req_t ini_req; dtl_rsp_t ini_rsp;

  producer_task #(.SIZE_BUF(8)) dut (.clk, .rst_n, .chp_ptr_valid(valid), .chp_buf_ptr(ptr),
    .chp_ptr_ack(ack), .chp_released_buf(rel), .ini_req, .ini_rsp, .tokens_done);
  tb_dtl_mem #(.AW_WORDS(6)) mem (.clk, .rst_n, .req(ini_req), .rsp(ini_rsp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int claimed = 0, released = 0;
  logic [31:0] claim_ptr [$];
  always @(posedge clk) if (rst_n) begin
    if (ack) begin
      check(valid, "ack only while the pointer is valid");
      claim_ptr.push_back(ptr);
      claimed++;
    end
    if (rel) begin
      logic [31:0] p;
      check(claim_ptr.size() > 0, "release follows a claim");
      p = claim_ptr.pop_front();
      check(mem.mem[p >> 2] == 32'(2 * released) && mem.mem[(p >> 2) + 1] == 32'(2 * released + 1),
            $sformatf("token %0d holds the counting sequence", released));
      released++;
    end
  end

  localparam int NTOK = 10;
  initial begin
    int wr0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);
    check(mem.wr_cnt == 0 && claimed == 0, "producer blocks without a free token");
    for (int t = 0; t < NTOK; t++) begin
      repeat ($urandom_range(0, 4)) @(negedge clk);
      @(negedge clk);
      ptr = 32'h40 + 32'((t % 4) * 8); valid = 1;
      #1;
      while (!ack) begin @(negedge clk); #1; end
      @(posedge clk);
      @(negedge clk); valid = 0;
    end
    wait (released == NTOK);
    repeat (5) @(posedge clk);
    check(tokens_done == NTOK, "token counter");
    check(mem.wr_cnt == 2 * NTOK, "two bus writes per token");
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
