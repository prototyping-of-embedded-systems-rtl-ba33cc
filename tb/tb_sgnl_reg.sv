// tb_sgnl_reg: checks the C-HEAP signalling register. A write at offset 0
// must appear on sgnl_value with chg_sgnl high for exactly one cycle; a
// write at another offset must change nothing; reads return the value.
`timescale 1ns/1ps
module tb_sgnl_reg;
  import chp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  dtl_req_t m_req = DTL_REQ_IDLE;
  dtl_rsp_t m_rsp;
  logic [31:0] sgnl_value;
  logic chg_sgnl;
  int checks = 0, failures = 0, pulses = 0;

  sgnl_reg dut (.clk, .rst_n, .tgt_req(m_req), .tgt_rsp(m_rsp), .sgnl_value, .chg_sgnl);

  `include "tb_dtl_tasks.svh"

  always @(posedge clk) if (chg_sgnl) pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(sgnl_value == 0 && !chg_sgnl, "reset state");
    for (int k = 0; k < 5; k++) begin
      automatic logic [31:0] v = $urandom;
      automatic int p0 = pulses;
      dtl_write(32'h0, v);
      repeat (4) @(posedge clk);
      check(sgnl_value == v, "value after write");
      check(pulses == p0 + 1, "exactly one chg_sgnl pulse per write");
      dtl_read(32'h0, d);
      check(d == v, "read back");
    end
    begin
      automatic int p0 = pulses;
      automatic logic [31:0] keep = sgnl_value;
      dtl_write(32'h4, 32'hDEAD_BEEF);
      repeat (4) @(posedge clk);
      check(pulses == p0 && sgnl_value == keep, "write to unmapped offset ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
