// app_task: the Task of the board architecture. It holds the two example
// applications, a producer on C-HEAP channel 0 (output) and a consumer on
// channel 1 (input), behind exactly one DTL initiator port and one DTL
// target port, so that the task never has to choose between bus ports; the
// board decides where an address goes.
//
// The two applications share the initiator port through a round-robin
// DTL multiplexer. The target port is the task's application-specific
// register space (byte offsets, bits 10..0; read-only, writes are ignored):
//   0x000  last word read by the consumer
//   0x004  tokens produced
//   0x008  tokens consumed
//   0x00C  sum of all words the consumer read
// This register layout is a choice of this design. Because the space is
// read-only, the write strobe and write data of the register port are left
// unconnected on purpose.
module app_task
  import chp_pkg::*;
#(
  parameter int unsigned SIZE_BUF = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  dtl_req_t    tgt_req,
  output dtl_rsp_t    tgt_rsp,
  output dtl_req_t    ini_req,
  input  dtl_rsp_t    ini_rsp,
  // C-HEAP synchronisation, index 0: producer channel, 1: consumer channel
  input  logic [1:0]  chp_ptr_valid,
  input  logic [31:0] chp_buf_ptr [2],
  output logic [1:0]  chp_ptr_ack,
  output logic [1:0]  chp_released_buf
);

  dtl_req_t app_req [2];
  dtl_rsp_t app_rsp [2];
  logic [31:0] produced, consumed, last_data, data_sum;

  producer_task #(.SIZE_BUF(SIZE_BUF)) u_prod (
    .clk, .rst_n,
    .chp_ptr_valid(chp_ptr_valid[0]), .chp_buf_ptr(chp_buf_ptr[0]),
    .chp_ptr_ack(chp_ptr_ack[0]), .chp_released_buf(chp_released_buf[0]),
    .ini_req(app_req[0]), .ini_rsp(app_rsp[0]), .tokens_done(produced)
  );

  consumer_task #(.SIZE_BUF(SIZE_BUF)) u_cons (
    .clk, .rst_n,
    .chp_ptr_valid(chp_ptr_valid[1]), .chp_buf_ptr(chp_buf_ptr[1]),
    .chp_ptr_ack(chp_ptr_ack[1]), .chp_released_buf(chp_released_buf[1]),
    .ini_req(app_req[1]), .ini_rsp(app_rsp[1]),
    .last_data, .data_sum, .tokens_done(consumed)
  );

  dtl_arb_mux #(.N(2)) u_mux (
    .clk, .rst_n, .ini_req(app_req), .ini_rsp(app_rsp),
    .out_req(ini_req), .out_rsp(ini_rsp)
  );

  logic        reg_we;
  logic [10:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;

  dtl_reg_port #(.OFS_W(11)) u_port (
    .clk, .rst_n, .req(tgt_req), .rsp(tgt_rsp),
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata
  );

  always_comb begin
    unique case (reg_addr)
      11'h000: reg_rdata = last_data;
      11'h004: reg_rdata = produced;
      11'h008: reg_rdata = consumed;
      11'h00C: reg_rdata = data_sum;
      default: reg_rdata = '0;
    endcase
  end

endmodule
