// mem_lb_demux: programmable address decoder with its 1-to-2 DTL
// de-multiplexer (address decoders 4 and 5 of the board architecture).
//
// An initiator (the compounded C-HEAP shell or the task) issues PCI
// addresses. Addresses whose bits 31..DEC_LSB equal the programmed PCI memory
// address belong to the on-board memory and are sent to port 0 (memory);
// every other address is sent to port 1 (local bus, i.e. off the board).
// The PCI memory address must be written at start-up through the decoder's
// own DTL target port: a write at offset 0 stores wdata[31:DEC_LSB]; a read
// returns it in the same bit positions. Other offsets are spare.
//
// Timing: decoding is combinational; see dtl_addr_demux. The base register
// resets to 0 (design choice). The low DEC_LSB bits of a configuration
// write are not stored, so they are unused.
module mem_lb_demux
  import chp_pkg::*;
#(
  parameter int unsigned DEC_LSB = 18
) (
  input  logic     clk,
  input  logic     rst_n,
  // configuration target port
  input  dtl_req_t cfg_req,
  output dtl_rsp_t cfg_rsp,
  // routed path
  input  dtl_req_t up_req,
  output dtl_rsp_t up_rsp,
  output dtl_req_t mem_req,
  input  dtl_rsp_t mem_rsp,
  output dtl_req_t lb_req,
  input  dtl_rsp_t lb_rsp
);

  logic        reg_we;
  logic [10:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic [31-DEC_LSB:0] pci_mem_base;

  dtl_reg_port #(.OFS_W(11)) u_port (
    .clk, .rst_n, .req(cfg_req), .rsp(cfg_rsp),
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata
  );

  assign reg_rdata = (reg_addr == '0) ? {pci_mem_base, {DEC_LSB{1'b0}}} : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          pci_mem_base <= '0;
    else if (reg_we && reg_addr == '0)   pci_mem_base <= reg_wdata[31:DEC_LSB];
  end

  logic     to_lb;
  dtl_req_t dn_req [2];
  dtl_rsp_t dn_rsp [2];
  logic [15:0] unused_cnt;

  assign to_lb = (up_req.cmd_addr[31:DEC_LSB] != pci_mem_base);

  dtl_addr_demux #(.N(2), .PORT_USED(2'b11)) u_demux (
    .clk, .rst_n, .dec_sel(to_lb), .up_req, .up_rsp, .dn_req, .dn_rsp,
    .unmapped_cnt(unused_cnt)
  );

  assign mem_req   = dn_req[0];
  assign lb_req    = dn_req[1];
  assign dn_rsp[0] = mem_rsp;
  assign dn_rsp[1] = lb_rsp;

endmodule
