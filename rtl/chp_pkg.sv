// chp_pkg: types and constants shared by the C-HEAP synchronisation shell,
// the DTL interconnect and the board-level architecture.
//
// DTL port. Every point-to-point DTL connection in this design is a pair of
// structs: dtl_req_t travels from initiator to target, dtl_rsp_t back. Only
// the minimal single-word subset is used: one 32-bit word per command.
//   1. command phase : initiator holds cmd_valid/cmd_addr/cmd_read until the
//                      target answers cmd_accept (transfer on valid & accept);
//   2. write data    : after the command transfer the initiator holds
//                      wr_valid/wr_data until wr_accept;
//   3. read data     : after the command transfer the target holds
//                      rd_valid/rd_data until rd_accept.
// A port carries one transaction at a time. Byte enables, block sizes and the
// error response of full DTL are not part of this subset.
//
// The register offsets follow the register order of the C-HEAP Block (byte
// addresses, bits 4..0), and the address-decoder fields follow the board's
// 8 KB register space (bits 12..11) and the compounded shell (bits 6..5).
package chp_pkg;

  localparam int unsigned DTL_AW = 32;
  localparam int unsigned DTL_DW = 32;

  typedef struct packed {
    logic              cmd_valid;
    logic [DTL_AW-1:0] cmd_addr;
    logic              cmd_read;
    logic              wr_valid;
    logic [DTL_DW-1:0] wr_data;
    logic              rd_accept;
  } dtl_req_t;

  typedef struct packed {
    logic              cmd_accept;
    logic              wr_accept;
    logic              rd_valid;
    logic [DTL_DW-1:0] rd_data;
  } dtl_rsp_t;

  localparam dtl_req_t DTL_REQ_IDLE = '0;
  localparam dtl_rsp_t DTL_RSP_IDLE = '0;

  // C-HEAP Block register offsets (byte address bits 4..0)
  localparam logic [4:0] REG_SGNL_REG_ADDR = 5'b00000;
  localparam logic [4:0] REG_SGNL_VALUE    = 5'b00100;
  localparam logic [4:0] REG_RSMPR_ADDR    = 5'b01000;
  localparam logic [4:0] REG_NBUF          = 5'b01100;
  localparam logic [4:0] REG_BUF_PTR       = 5'b10000;
  localparam logic [4:0] REG_MEM_LSMPR     = 5'b10100;
  localparam logic [4:0] REG_LSMPR         = 5'b11000;

  // Semaphore word: bit 31 is the roll-over flag, bits 30..0 the counter.
  localparam int unsigned SMPR_FLAG = 31;

  // Board register space (address decoder 3, bits 12..11)
  localparam logic [1:0] AD3_DEC4  = 2'b00;
  localparam logic [1:0] AD3_DEC5  = 2'b01;
  localparam logic [1:0] AD3_SHELL = 2'b10;
  localparam logic [1:0] AD3_TASK  = 2'b11;

  // Compounded shell register space (address decoder 2, bits 6..5)
  localparam logic [1:0] AD2_SGNL   = 2'b00;
  localparam logic [1:0] AD2_BLOCK1 = 2'b01;
  localparam logic [1:0] AD2_BLOCK2 = 2'b10;

endpackage
