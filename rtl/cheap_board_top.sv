// cheap_board_top: one FPGA of the PCI prototyping board carrying a hardware
// task with two C-HEAP channels (the architecture for two C-HEAP Blocks).
//
// The host processor reaches the FPGA over the board's local bus (LB) through
// two LB target wrappers: one for the 8 KB register space, one for the local
// memory, each with its own base-address select. Hardware reaches the outside
// through one DTL initiator port towards the LB master side.
//
//   LB (registers) -> de-mux 3 (address bits 12..11)
//        00 address decoder 4 config, 01 address decoder 5 config,
//        10 compounded C-HEAP shell (bits 10..0), 11 task (bits 10..0)
//   LB (memory)    ----------------------------------\
//   shell initiator -> decoder/de-mux 4 -> memory ----+-> mux 7 + arbiter
//                                       -> LB    --\  |   -> memory interface
//   task initiator  -> decoder/de-mux 5 -> memory -----/     -> two SRAMs
//                                       -> LB    ----> mux 6 + arbiter
//                                                      -> lbm_req / lbm_rsp
//
// The shell's block 1 is the output channel of the producer application and
// block 2 the input channel of the consumer application, both of the polling
// hardware-software type: the channels live in the on-board memory, where
// the host polls and updates the software side of each channel.
//
// The wrapper that makes this FPGA a local-bus master (request/grant towards
// the PCI core and the address look-up table) is not part of this RTL; its
// DTL side is brought out as lbm_req/lbm_rsp. The LB tri-state lines are
// split into _i/_o/_oe. The choice of LB_BA bits (BA_MEM, BA_REG), and which
// of decoders 4 and 5 serves the shell (4) and the task (5), are assumptions
// of this design. unmapped_cnt counts register accesses that hit a spare
// range; it is a debug aid of this design.
//
// Timing: everything runs on the one FPGA clock; an LB register or memory
// access costs a few cycles of wrapper, de-multiplexer and arbiter latency,
// reported to the host through LB_TBusy.
//
// Lint note: rst_n is the asynchronous reset of all flip-flops and is also
// used (synchronously) by the "disable iff" of the C-HEAP Block's
// assertions; the resulting mixed sync/async use of rst_n is in simulation
// checks only and does not reach the netlist.
module cheap_board_top
  import chp_pkg::*;
#(
  parameter int unsigned SIZE_BUF = 4,
  parameter logic [1:0]  HW_SW    = 2'b11,
  parameter int unsigned BA_MEM   = 2,
  parameter int unsigned BA_REG   = 3,
  parameter int unsigned DEC_LSB  = 18,
  parameter int unsigned LINE_W   = 17
) (
  input  logic        clk,
  input  logic        rst_n,
  // local bus, target side
  input  logic        lb_sadr,
  input  logic [6:0]  lb_ba,
  input  logic        lb_rwn,
  input  logic        lb_mrdy,
  input  logic        lb_mgrdy,
  input  logic [31:0] lb_d_i,
  output logic [31:0] lb_d_o,
  output logic        lb_d_oe,
  output logic        lb_tbusy_o,
  output logic        lb_tbusy_oe,
  // DTL initiator towards the local-bus master wrapper
  output dtl_req_t    lbm_req,
  input  dtl_rsp_t    lbm_rsp,
  // local memory, two 32-bit SRAMs
  output logic [1:0]        sram_cs_n,
  output logic              sram_we_n,
  output logic [LINE_W-1:0] sram_addr,
  output logic [31:0]       sram_wdata,
  input  logic [31:0]       sram_rdata [2],
  // debug: accesses that hit no register (spare ranges of the shell)
  output logic [15:0]       unmapped_cnt
);

  // ------------------------------------------------------- LB target wrappers
  dtl_req_t reg_req, lbmem_req;
  dtl_rsp_t reg_rsp, lbmem_rsp;
  logic [31:0] reg_d_o, mem_d_o;
  logic        reg_d_oe, mem_d_oe, reg_tb_o, reg_tb_oe, mem_tb_o, mem_tb_oe;

  lb_target_dtl #(.BA_IDX(BA_REG), .ADDR_W(13)) u_lb_reg (
    .clk, .rst_n, .lb_sadr, .lb_ba, .lb_rwn, .lb_mrdy, .lb_mgrdy, .lb_d_i,
    .lb_d_o(reg_d_o), .lb_d_oe(reg_d_oe), .lb_tbusy_o(reg_tb_o), .lb_tbusy_oe(reg_tb_oe),
    .ini_req(reg_req), .ini_rsp(reg_rsp)
  );

  lb_target_dtl #(.BA_IDX(BA_MEM), .ADDR_W(LINE_W + 3)) u_lb_mem (
    .clk, .rst_n, .lb_sadr, .lb_ba, .lb_rwn, .lb_mrdy, .lb_mgrdy, .lb_d_i,
    .lb_d_o(mem_d_o), .lb_d_oe(mem_d_oe), .lb_tbusy_o(mem_tb_o), .lb_tbusy_oe(mem_tb_oe),
    .ini_req(lbmem_req), .ini_rsp(lbmem_rsp)
  );

  assign lb_d_oe     = reg_d_oe | mem_d_oe;
  assign lb_d_o      = reg_d_oe ? reg_d_o : mem_d_o;
  assign lb_tbusy_oe = reg_tb_oe | mem_tb_oe;
  assign lb_tbusy_o  = reg_tb_oe ? reg_tb_o : mem_tb_o;

  // ------------------------------------------------ de-multiplexer 3 (fixed)
  dtl_req_t d3_req [4];
  dtl_rsp_t d3_rsp [4];
  logic [15:0] d3_unmapped, shell_unmapped;

  dtl_addr_demux #(.N(4), .PORT_USED(4'b1111)) u_demux3 (
    .clk, .rst_n, .dec_sel(reg_req.cmd_addr[12:11]),
    .up_req(reg_req), .up_rsp(reg_rsp), .dn_req(d3_req), .dn_rsp(d3_rsp),
    .unmapped_cnt(d3_unmapped)
  );

  // ------------------------------------------------ compounded shell + task
  dtl_req_t shell_ini_req, task_ini_req;
  dtl_rsp_t shell_ini_rsp, task_ini_rsp;
  logic [1:0]  ptr_valid, ptr_ack, released;
  logic [31:0] buf_ptr [2];

  cheap_shell #(.NB(2), .INPUT(2'b10), .HW_SW(HW_SW), .SIZE_BUF(SIZE_BUF)) u_shell (
    .clk, .rst_n,
    .tgt_req(d3_req[AD3_SHELL]), .tgt_rsp(d3_rsp[AD3_SHELL]),
    .ini_req(shell_ini_req), .ini_rsp(shell_ini_rsp),
    .chp_ptr_valid(ptr_valid), .chp_buf_ptr(buf_ptr),
    .chp_ptr_ack(ptr_ack), .chp_released_buf(released),
    .unmapped_cnt(shell_unmapped)
  );

  app_task #(.SIZE_BUF(SIZE_BUF)) u_task (
    .clk, .rst_n,
    .tgt_req(d3_req[AD3_TASK]), .tgt_rsp(d3_rsp[AD3_TASK]),
    .ini_req(task_ini_req), .ini_rsp(task_ini_rsp),
    .chp_ptr_valid(ptr_valid), .chp_buf_ptr(buf_ptr),
    .chp_ptr_ack(ptr_ack), .chp_released_buf(released)
  );

  // ------------------------------------- address decoders 4 and 5 (memory/LB)
  dtl_req_t m7_req [3];
  dtl_rsp_t m7_rsp [3];
  dtl_req_t m6_req [2];
  dtl_rsp_t m6_rsp [2];

  mem_lb_demux #(.DEC_LSB(DEC_LSB)) u_dec4 (
    .clk, .rst_n,
    .cfg_req(d3_req[AD3_DEC4]), .cfg_rsp(d3_rsp[AD3_DEC4]),
    .up_req(shell_ini_req), .up_rsp(shell_ini_rsp),
    .mem_req(m7_req[1]), .mem_rsp(m7_rsp[1]),
    .lb_req(m6_req[0]),  .lb_rsp(m6_rsp[0])
  );

  mem_lb_demux #(.DEC_LSB(DEC_LSB)) u_dec5 (
    .clk, .rst_n,
    .cfg_req(d3_req[AD3_DEC5]), .cfg_rsp(d3_rsp[AD3_DEC5]),
    .up_req(task_ini_req), .up_rsp(task_ini_rsp),
    .mem_req(m7_req[2]), .mem_rsp(m7_rsp[2]),
    .lb_req(m6_req[1]),  .lb_rsp(m6_rsp[1])
  );

  assign unmapped_cnt = d3_unmapped + shell_unmapped;

  assign m7_req[0] = lbmem_req;
  assign lbmem_rsp = m7_rsp[0];

  // ------------------------------------------ multiplexers 6 and 7 + arbiters
  dtl_req_t mem_req;
  dtl_rsp_t mem_rsp;

  dtl_arb_mux #(.N(3)) u_mux7 (
    .clk, .rst_n, .ini_req(m7_req), .ini_rsp(m7_rsp), .out_req(mem_req), .out_rsp(mem_rsp)
  );

  dtl_arb_mux #(.N(2)) u_mux6 (
    .clk, .rst_n, .ini_req(m6_req), .ini_rsp(m6_rsp), .out_req(lbm_req), .out_rsp(lbm_rsp)
  );

  // ------------------------------------------------------- memory interface
  dtl_sram_if #(.LINE_W(LINE_W)) u_mem (
    .clk, .rst_n, .tgt_req(mem_req), .tgt_rsp(mem_rsp),
    .sram_cs_n, .sram_we_n, .sram_addr, .sram_wdata, .sram_rdata
  );

endmodule
