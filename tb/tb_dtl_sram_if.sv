// tb_dtl_sram_if: writes words to both SRAMs through the memory interface
// and reads them back. Address bit 19 must select the chip and bits 18..2
// the line; the data must land in the right chip and line of the model, and
// a read must return two cycles after its command.
`timescale 1ns/1ps
module tb_dtl_sram_if;
  import chp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  dtl_req_t m_req = DTL_REQ_IDLE;
  dtl_rsp_t m_rsp;
  logic [1:0] cs_n; logic we_n; logic [16:0] addr; logic [31:0] wdata; logic [31:0] rdata [2];

  dtl_sram_if #(.LINE_W(17)) dut (.clk, .rst_n, .tgt_req(m_req), .tgt_rsp(m_rsp),
    .sram_cs_n(cs_n), .sram_we_n(we_n), .sram_addr(addr), .sram_wdata(wdata), .sram_rdata(rdata));
  tb_sram_model #(.LINE_W(17), .AW_MODEL(10)) sram (.clk, .cs_n, .we_n, .addr, .wdata, .rdata);

  `include "tb_dtl_tasks.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] d, exp_d;
    int t0, lat;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 8; k++) begin
      dtl_write(32'(k * 4), 32'hC0DE_0000 + 32'(k));               // chip 0
      dtl_write(32'h0008_0000 | 32'(k * 4), 32'hBEEF_0000 + 32'(k)); // chip 1
    end
    repeat (2) @(posedge clk);
    for (int k = 0; k < 8; k++) begin
      check(sram.mem0[k] == 32'hC0DE_0000 + 32'(k), "chip 0 line contents");
      check(sram.mem1[k] == 32'hBEEF_0000 + 32'(k), "chip 1 line contents");
    end
    for (int k = 0; k < 8; k++) begin
      exp_d = (k % 2) ? 32'hBEEF_0000 + 32'(k) : 32'hC0DE_0000 + 32'(k);
      dtl_read(((k % 2) ? 32'h0008_0000 : 32'h0) | 32'(k * 4), d);
      check(d == exp_d, "read back");
    end
    // read latency: command accepted at one edge, rd_valid visible 2 edges later
    @(negedge clk);
    m_req.cmd_valid = 1; m_req.cmd_addr = 32'h8; m_req.cmd_read = 1;
    @(posedge clk); #1; m_req.cmd_valid = 0; m_req.rd_accept = 1;
    lat = 0;
    while (!m_rsp.rd_valid) begin @(posedge clk); #1; lat++; end
    check(lat == 2, $sformatf("read latency %0d cycles, expected 2", lat));
    check(m_rsp.rd_data == 32'hC0DE_0002, "latency read data");
    @(posedge clk); #1; m_req.rd_accept = 0;
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
