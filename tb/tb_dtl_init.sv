// tb_dtl_init: autonomous DTL initiator for testbenches. After start it
// writes NTRANS words to BASE, BASE+4, ... (data = {ID, index}) with random
// gaps, then reads them back and compares; checks and failures are counted.
`timescale 1ns/1ps
module tb_dtl_init
  import chp_pkg::*;
#(
  parameter int unsigned ID     = 0,
  parameter int unsigned NTRANS = 8,
  parameter logic [31:0] BASE   = 32'h0
) (
  input  logic     clk,
  input  logic     start,
  output dtl_req_t m_req,
  input  dtl_rsp_t m_rsp,
  output logic     done,
  output int       checks,
  output int       failures
);
  `include "tb_dtl_tasks.svh"
  initial begin
    logic [31:0] d;
    m_req = DTL_REQ_IDLE; done = 1'b0; checks = 0; failures = 0;
    wait (start);
    for (int unsigned k = 0; k < NTRANS; k++) begin
      repeat ($urandom_range(0, 2)) @(posedge clk);
      dtl_write(BASE + 4 * k, {16'(ID), 16'(k)});
    end
    for (int unsigned k = 0; k < NTRANS; k++) begin
      dtl_read(BASE + 4 * k, d);
      checks++;
      if (d !== {16'(ID), 16'(k)}) begin
        failures++;
        $display("init%0d: read %h at %h, expected %h", ID, d, BASE + 4 * k, {16'(ID), 16'(k)});
      end
    end
    done = 1'b1;
  end
endmodule
