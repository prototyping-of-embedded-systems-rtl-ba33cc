// tb_mem_lb_demux: programs the PCI memory address into the decoder and
// checks that accesses inside that 256 KB window (bits 31..18) go to the
// memory port and all others to the local-bus port; the base register must
// read back. Random addresses are routed against a reference decision, and
// a new base address must move the window.
`timescale 1ns/1ps
module tb_mem_lb_demux;
  import chp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  dtl_req_t m_req = DTL_REQ_IDLE;     // routed path (tasks use m_*)
  dtl_rsp_t m_rsp;
  dtl_req_t cfg_req = DTL_REQ_IDLE;
  dtl_rsp_t cfg_rsp;
  dtl_req_t mem_req, lb_req;
  dtl_rsp_t mem_rsp, lb_rsp;

  mem_lb_demux #(.DEC_LSB(18)) dut (
    .clk, .rst_n, .cfg_req, .cfg_rsp, .up_req(m_req), .up_rsp(m_rsp),
    .mem_req, .mem_rsp, .lb_req, .lb_rsp);
  tb_dtl_mem #(.AW_WORDS(6)) memm (.clk, .rst_n, .req(mem_req), .rsp(mem_rsp));
  tb_dtl_mem #(.AW_WORDS(6)) lbm  (.clk, .rst_n, .req(lb_req),  .rsp(lb_rsp));

  `include "tb_dtl_tasks.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cfg(input bit rd, input logic [31:0] a, input logic [31:0] wd, output logic [31:0] rdv);
    @(negedge clk);
    cfg_req.cmd_valid = 1; cfg_req.cmd_addr = a; cfg_req.cmd_read = rd;
    #1; while (!cfg_rsp.cmd_accept) begin @(negedge clk); #1; end
    @(posedge clk); #1; cfg_req.cmd_valid = 0;
    if (rd) cfg_req.rd_accept = 1; else begin cfg_req.wr_valid = 1; cfg_req.wr_data = wd; end
    @(negedge clk); #1;
    while (!(rd ? cfg_rsp.rd_valid : cfg_rsp.wr_accept)) begin @(negedge clk); #1; end
    rdv = cfg_rsp.rd_data;
    @(posedge clk); #1; cfg_req.rd_accept = 0; cfg_req.wr_valid = 0;
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    cfg(0, 32'h0, 32'h4005_1234, d);
    cfg(1, 32'h0, 32'h0, d);
    check(d == 32'h4004_0000, "base register keeps bits 31..18");
    dtl_write(32'h4004_0010, 32'h11);
    dtl_write(32'h4007_FFFC, 32'h22);
    dtl_write(32'h4008_0010, 32'h33);     // just above the window
    dtl_write(32'h8000_0020, 32'h44);
    check(memm.wr_cnt == 2 && lbm.wr_cnt == 2, "two writes each way");
    check(memm.mem[4] == 32'h11, "window start goes to memory");
    check(lbm.mem[4] == 32'h33 && lbm.mem[8] == 32'h44, "outside addresses go to the local bus");
    dtl_read(32'h4004_0010, d);
    check(d == 32'h11, "memory read through decoder");
    dtl_read(32'h8000_0020, d);
    check(d == 32'h44, "local-bus read through decoder");
    // random addresses, some inside the window and some outside: each write
    // must reach exactly the port the reference decision names
    for (int n = 0; n < 40; n++) begin
      logic [31:0] a;
      int unsigned mw, lw;
      bit in_win;
      a = $urandom();
      if (n % 2 == 0) a[31:18] = 14'h1001;              // force into the window
      a[1:0] = 2'b00;
      in_win = (a[31:18] == 14'h1001);
      mw = memm.wr_cnt; lw = lbm.wr_cnt;
      dtl_write(a, 32'hC000_0000 | 32'(n));
      check(in_win ? (memm.wr_cnt == mw + 1 && lbm.wr_cnt == lw)
                   : (lbm.wr_cnt == lw + 1 && memm.wr_cnt == mw),
            $sformatf("address %h routed to the %s port", a, in_win ? "memory" : "local-bus"));
    end
    // reprogramming the base moves the window
    cfg(0, 32'h0, 32'h8000_0000, d);
    dtl_read(32'h8000_0020, d);
    check(d == memm.mem[8] && memm.rd_cnt == 2 && lbm.rd_cnt == 1,
          "after reprogramming, 0x8000_0020 is memory");
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
