// tb_dtl_arb_mux: three autonomous initiators share one stalling memory
// through the multiplexer. Every initiator must read back exactly what it
// wrote, and whenever several initiators request at once the grant must go
// to the first requester after the last granted one (round robin), checked
// against a reference kept in the testbench.
`timescale 1ns/1ps
module tb_dtl_arb_mux;
  import chp_pkg::*;
  localparam int N = 3;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, contested = 0;

  dtl_req_t ini_req [N];
  dtl_rsp_t ini_rsp [N];
  dtl_req_t out_req;
  dtl_rsp_t out_rsp;
  logic [N-1:0] done;
  int ck [N], fl [N];

  dtl_arb_mux #(.N(N)) dut (.clk, .rst_n, .ini_req, .ini_rsp, .out_req, .out_rsp);
  tb_dtl_mem #(.AW_WORDS(8)) mem (.clk, .rst_n, .req(out_req), .rsp(out_rsp));

  for (genvar i = 0; i < N; i++) begin : g_init
    tb_dtl_init #(.ID(i + 1), .NTRANS(12), .BASE(32'(i * 64))) u_init (
      .clk, .start, .m_req(ini_req[i]), .m_rsp(ini_rsp[i]),
      .done(done[i]), .checks(ck[i]), .failures(fl[i]));
  end

  // round-robin reference: the port is free until a command appears; the
  // arbiter then decides among the requesters of that cycle and keeps the
  // grant until the data phase completes.
  int last = N - 1, expect_i = -1, nreq_at_grant = 0;
  bit free = 1'b1, in_data = 1'b0, rd_ph = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (free) begin
      nreq_at_grant = 0; expect_i = -1;
      for (int k = 1; k <= N; k++) begin
        int j;
        j = (last + k) % N;
        if (ini_req[j].cmd_valid) begin
          nreq_at_grant++;
          if (expect_i < 0) expect_i = j;
        end
      end
      if (expect_i >= 0) begin
        free = 1'b0;
        last = expect_i;
        if (nreq_at_grant > 1) contested++;
      end
    end
    for (int i = 0; i < N; i++) begin
      if (ini_req[i].cmd_valid && ini_rsp[i].cmd_accept) begin
        checks++;
        if (expect_i != i) begin
          failures++;
          $display("FAIL: grant to %0d, round robin expects %0d", i, expect_i);
        end
        in_data = 1'b1;
        rd_ph = ini_req[i].cmd_read;
      end
    end
    if (in_data && !(out_req.cmd_valid && out_rsp.cmd_accept) &&
        (rd_ph ? (out_rsp.rd_valid && out_req.rd_accept) : (out_req.wr_valid && out_rsp.wr_accept))) begin
      in_data = 1'b0;
      free = 1'b1;
    end
    // at most one initiator may see an accept in any cycle
    checks++;
    if ($countones({ini_rsp[0].cmd_accept && ini_req[0].cmd_valid,
                    ini_rsp[1].cmd_accept && ini_req[1].cmd_valid,
                    ini_rsp[2].cmd_accept && ini_req[2].cmd_valid}) > 1) begin
      failures++;
      $display("FAIL: two commands accepted in one cycle");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    start = 1'b1;
    wait (&done);
    for (int i = 0; i < N; i++) begin checks += ck[i]; failures += fl[i]; end
    checks++;
    if (contested < 5) begin failures++; $display("FAIL: only %0d contested grants", contested); end
    $display("contested grants: %0d", contested);
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
