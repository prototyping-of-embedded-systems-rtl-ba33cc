// Directed DTL initiator tasks for testbenches. The including module
// declares clk, m_req (dtl_req_t) and m_rsp (dtl_rsp_t). Signals are driven
// just after the falling clock edge and sampled one time unit later; a
// handshake completes at the following rising edge.
task automatic dtl_write(input logic [31:0] a, input logic [31:0] d);
  @(negedge clk);
  m_req.cmd_valid = 1'b1; m_req.cmd_addr = a; m_req.cmd_read = 1'b0;
  #1;
  while (!m_rsp.cmd_accept) begin @(negedge clk); #1; end
  @(posedge clk); #1;
  m_req.cmd_valid = 1'b0;
  m_req.wr_valid = 1'b1; m_req.wr_data = d;
  @(negedge clk); #1;
  while (!m_rsp.wr_accept) begin @(negedge clk); #1; end
  @(posedge clk); #1;
  m_req.wr_valid = 1'b0;
endtask

task automatic dtl_read(input logic [31:0] a, output logic [31:0] d);
  @(negedge clk);
  m_req.cmd_valid = 1'b1; m_req.cmd_addr = a; m_req.cmd_read = 1'b1;
  #1;
  while (!m_rsp.cmd_accept) begin @(negedge clk); #1; end
  @(posedge clk); #1;
  m_req.cmd_valid = 1'b0;
  m_req.rd_accept = 1'b1;
  @(negedge clk); #1;
  while (!m_rsp.rd_valid) begin @(negedge clk); #1; end
  d = m_rsp.rd_data;
  @(posedge clk); #1;
  m_req.rd_accept = 1'b0;
endtask
