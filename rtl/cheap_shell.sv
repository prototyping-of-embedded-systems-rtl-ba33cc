// cheap_shell: compounded C-HEAP task shell.
//
// Combines the synchronisation hardware of one hardware task: a signalling
// register shared by all channels and NB C-HEAP Blocks, one per channel. So
// that the shell needs a single bus wrapper per direction, the blocks' DTL
// initiator ports are merged by multiplexer-1 with round-robin arbiter-1, and
// the single DTL target port is split by de-multiplexer-2, whose fixed
// address decoder-2 uses address bits 6..5:
//   00  signalling register (offset 00000)
//   01  C-HEAP Block 1 (administrative registers, bits 4..0)
//   10  C-HEAP Block 2
//   11  spare (accepted, ignored, reads as zero)
// Bits 10..7 are not decoded (spare). The target port serves the start-up
// configuration of the blocks, reading their registers, and the wake-up
// writes of other devices into the signalling register.
//
// Parameters: NB blocks (at most 3 with this map; 2 in the board
// architecture), per-block INPUT and HW_SW flags (bit i for block i+1) and
// the common token size. Timing: see cheap_block; the muxes add no cycle to
// an uncontested access.
//
// Lint note: rst_n also drives the "disable iff" of the blocks' assertions
// (simulation only), so it is seen as both a synchronous and an
// asynchronous net.
module cheap_shell
  import chp_pkg::*;
#(
  parameter int unsigned    NB       = 2,
  parameter logic [NB-1:0]  INPUT    = 2'b10,  // block 1 output, block 2 input
  parameter logic [NB-1:0]  HW_SW    = 2'b11,
  parameter int unsigned    SIZE_BUF = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  dtl_req_t    tgt_req,
  output dtl_rsp_t    tgt_rsp,
  output dtl_req_t    ini_req,
  input  dtl_rsp_t    ini_rsp,
  output logic [NB-1:0] chp_ptr_valid,
  output logic [31:0]   chp_buf_ptr [NB],
  input  logic [NB-1:0] chp_ptr_ack,
  input  logic [NB-1:0] chp_released_buf,
  output logic [15:0]   unmapped_cnt
);

  localparam logic [3:0] USED = 4'((1 << (NB + 1)) - 1);

  dtl_req_t dn_req [4];
  dtl_rsp_t dn_rsp [4];
  dtl_req_t blk_ini_req [NB];
  dtl_rsp_t blk_ini_rsp [NB];

  logic [31:0] sgnl_value;
  logic        chg_sgnl;

  // de-multiplexer-2 with address decoder-2
  dtl_addr_demux #(.N(4), .PORT_USED(USED)) u_demux2 (
    .clk, .rst_n, .dec_sel(tgt_req.cmd_addr[6:5]),
    .up_req(tgt_req), .up_rsp(tgt_rsp), .dn_req, .dn_rsp, .unmapped_cnt
  );

  sgnl_reg u_sgnl (
    .clk, .rst_n, .tgt_req(dn_req[0]), .tgt_rsp(dn_rsp[0]),
    .sgnl_value, .chg_sgnl
  );

  for (genvar b = 0; b < NB; b++) begin : g_blk
    cheap_block #(.INPUT(INPUT[b]), .SIZE_BUF(SIZE_BUF), .HW_SW(HW_SW[b])) u_blk (
      .clk, .rst_n,
      .tgt_req(dn_req[b+1]), .tgt_rsp(dn_rsp[b+1]),
      .ini_req(blk_ini_req[b]), .ini_rsp(blk_ini_rsp[b]),
      .sgnl_reg(sgnl_value), .chg_sgnl,
      .chp_ptr_valid(chp_ptr_valid[b]), .chp_buf_ptr(chp_buf_ptr[b]),
      .chp_ptr_ack(chp_ptr_ack[b]), .chp_released_buf(chp_released_buf[b])
    );
  end

  for (genvar s = NB + 1; s < 4; s++) begin : g_spare
    assign dn_rsp[s] = DTL_RSP_IDLE;
  end

  // multiplexer-1 with arbiter-1
  dtl_arb_mux #(.N(NB)) u_mux1 (
    .clk, .rst_n, .ini_req(blk_ini_req), .ini_rsp(blk_ini_rsp),
    .out_req(ini_req), .out_rsp(ini_rsp)
  );

  initial assert (NB >= 1 && NB <= 3) else $fatal(1, "cheap_shell: NB must be 1..3");

endmodule
