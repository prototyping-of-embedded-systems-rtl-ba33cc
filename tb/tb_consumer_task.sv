// tb_consumer_task: plays the C-HEAP Block towards the consumer. Tokens of
// two words are filled in a memory model with random values; each offered
// token must be read completely and released once, in order; last_data must
// then hold the token's last word and data_sum the sum of all words read.
`timescale 1ns/1ps
module tb_consumer_task;
  import chp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic valid = 0, ack, rel;
  logic [31:0] ptr = 0, last_data, data_sum, tokens_done;
  dtl_req_t ini_req; dtl_rsp_t ini_rsp;

  consumer_task #(.SIZE_BUF(8)) dut (.clk, .rst_n, .chp_ptr_valid(valid), .chp_buf_ptr(ptr),
    .chp_ptr_ack(ack), .chp_released_buf(rel), .ini_req, .ini_rsp, .last_data, .data_sum, .tokens_done);
  tb_dtl_mem #(.AW_WORDS(6)) mem (.clk, .rst_n, .req(ini_req), .rsp(ini_rsp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int NTOK = 8;
  initial begin
    logic [31:0] sum = 0, w0, w1;
    int rd0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NTOK; t++) begin
      w0 = $urandom; w1 = $urandom;
      mem.mem[(32'h40 >> 2) + 2 * (t % 4)]     = w0;
      mem.mem[(32'h40 >> 2) + 2 * (t % 4) + 1] = w1;
      sum += w0 + w1;
      rd0 = mem.rd_cnt;
      @(negedge clk);
      ptr = 32'h40 + 32'((t % 4) * 8); valid = 1;
      #1;
      while (!ack) begin @(negedge clk); #1; end
      @(posedge clk);
      @(negedge clk); valid = 0;
      #1;
      while (!rel) begin @(negedge clk); #1; end
      @(posedge clk); @(negedge clk);
      check(mem.rd_cnt == rd0 + 2, "both words read before release");
      check(last_data == w1, "last_data holds the last word");
      check(data_sum == sum, "running sum");
      check(tokens_done == 32'(t + 1), "token counter");
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
