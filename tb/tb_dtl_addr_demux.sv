// tb_dtl_addr_demux: one initiator reaches three memories and a spare range
// through the de-multiplexer, which decodes address bits 13..12 here. Data
// written to each range must land in that range's memory only; the spare
// range must accept writes and read as zero, and be counted. A final write
// changes its address during the data phase, which must not move it.
`timescale 1ns/1ps
module tb_dtl_addr_demux;
  import chp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  dtl_req_t m_req = DTL_REQ_IDLE;
  dtl_rsp_t m_rsp;
  dtl_req_t dn_req [4];
  dtl_rsp_t dn_rsp [4];
  logic [15:0] unmapped_cnt;

  dtl_addr_demux #(.N(4), .PORT_USED(4'b0111)) dut (
    .clk, .rst_n, .dec_sel(m_req.cmd_addr[13:12]), .up_req(m_req), .up_rsp(m_rsp),
    .dn_req, .dn_rsp, .unmapped_cnt);

  tb_dtl_mem #(.AW_WORDS(6)) mem0 (.clk, .rst_n, .req(dn_req[0]), .rsp(dn_rsp[0]));
  tb_dtl_mem #(.AW_WORDS(6)) mem1 (.clk, .rst_n, .req(dn_req[1]), .rsp(dn_rsp[1]));
  tb_dtl_mem #(.AW_WORDS(6)) mem2 (.clk, .rst_n, .req(dn_req[2]), .rsp(dn_rsp[2]));
  assign dn_rsp[3] = '0;   // spare port: must never be used

  `include "tb_dtl_tasks.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 3; p++)
      for (int w = 0; w < 4; w++)
        dtl_write(32'(p) << 12 | 32'(w * 4), 32'hA000_0000 | 32'(p * 16 + w));
    for (int w = 0; w < 4; w++) begin
      check(mem0.mem[w] == (32'hA000_0000 | 32'(w)),      "range 0 data in memory 0");
      check(mem1.mem[w] == (32'hA000_0000 | 32'(16 + w)), "range 1 data in memory 1");
      check(mem2.mem[w] == (32'hA000_0000 | 32'(32 + w)), "range 2 data in memory 2");
    end
    for (int p = 0; p < 3; p++) begin
      dtl_read(32'(p) << 12 | 32'h4, d);
      check(d == (32'hA000_0000 | 32'(p * 16 + 1)), "read back through de-multiplexer");
    end
    check(unmapped_cnt == 0, "no spare accesses yet");
    dtl_write(32'h3000, 32'h1234_5678);
    dtl_read(32'h3004, d);
    check(d == 0, "spare range reads as zero");
    check(unmapped_cnt == 2, "spare accesses counted");
    check(mem0.wr_cnt == 4 && mem1.wr_cnt == 4 && mem2.wr_cnt == 4, "spare write reached no memory");
    // an initiator may move its address on once the command is accepted:
    // the data phase must still go to the port chosen at the command
    @(negedge clk);
    m_req.cmd_valid = 1; m_req.cmd_read = 0; m_req.cmd_addr = 32'h0008;
    #1; while (!m_rsp.cmd_accept) begin @(negedge clk); #1; end
    @(negedge clk);
    m_req.cmd_valid = 0; m_req.cmd_addr = 32'h2000;
    m_req.wr_valid = 1; m_req.wr_data = 32'h5A5A_0001;
    #1; while (!m_rsp.wr_accept) begin @(negedge clk); #1; end
    @(negedge clk);
    m_req.wr_valid = 0;
    repeat (2) @(posedge clk);
    check(mem0.mem[2] == 32'h5A5A_0001, "data phase stays with the port of its command");
    check(mem2.mem[0] == (32'hA000_0000 | 32'd32), "other port untouched by a moved address");
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
