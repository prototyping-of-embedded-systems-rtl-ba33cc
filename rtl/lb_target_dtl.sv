// lb_target_dtl: local-bus target to DTL initiator wrapper.
//
// The board's PCI target core drives the local bus (LB); this wrapper is one
// LB target, selected by one bit BA_IDX of the one-hot base-address select
// LB_BA, and turns each LB data transfer into a single-word DTL transaction
// on its initiator port.
//
// LB side, as defined for the board's local bus:
//   * LB_Sadr = 1: the address on LB_D is copied into the local address
//     generator (bits ADDR_W-1..0 are kept), whatever else the bus does.
//   * selected and LB_RWn = 0: a word is written when LB_Mrdy = 1 and
//     LB_TBusy = 0; LB_TBusy stays high until the DTL write has been taken.
//   * selected and LB_RWn = 1: the wrapper drives LB_D and shows valid data
//     with LB_TBusy = 0; a word is transferred when the initiator is ready
//     (LB_Mrdy or LB_Mgrdy) and LB_TBusy = 0.
//   * after each transferred word the local address advances by 4 (bursts).
// The LB's tri-state lines are split into _i/_o/_oe signals; the board top
// merges the targets. Byte enables are ignored (whole words only).
//
// Read fetch policy (choice of this design): the DTL read for the current
// address is started only while the initiator signals LB_Mrdy or LB_Mgrdy,
// and one word is held at a time; a fetched word that is not taken before
// LB_RWn returns to 0 or a new address arrives is dropped. There is no
// further prefetch, so LB_Mgrdy and LB_Mrdy behave alike here.
//
// Only the low ADDR_W address bits are kept; the upper DTL address bits are
// constant 0 and byte lane information is not produced.
module lb_target_dtl
  import chp_pkg::*;
#(
  parameter int unsigned BA_IDX = 2,
  parameter int unsigned ADDR_W = 13
) (
  input  logic        clk,
  input  logic        rst_n,
  // local bus (target side)
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
  // DTL initiator
  output dtl_req_t    ini_req,
  input  dtl_rsp_t    ini_rsp
);

  typedef enum logic [1:0] {W_IDLE, W_CMD, W_WDATA, W_RDATA} wstate_e;
  wstate_e           state;
  logic [ADDR_W-1:0] addr_q, cmd_addr_q;
  logic [31:0]       wdata_q, rbuf;
  logic              rbuf_valid, cmd_rd_q;
  logic              sel, ready, wr_xfer, rd_xfer, rd_start;

  assign sel      = lb_ba[BA_IDX];
  assign ready    = lb_mrdy || lb_mgrdy;
  assign wr_xfer  = sel && !lb_rwn && lb_mrdy && !lb_tbusy_o && !lb_sadr;
  assign rd_xfer  = sel && lb_rwn && ready && !lb_tbusy_o && !lb_sadr;
  assign rd_start = sel && lb_rwn && ready && !rbuf_valid && state == W_IDLE && !lb_sadr;

  always_comb begin
    if (lb_rwn) lb_tbusy_o = !rbuf_valid;
    else        lb_tbusy_o = (state != W_IDLE);
  end
  assign lb_tbusy_oe = sel;
  assign lb_d_oe     = sel && lb_rwn;
  assign lb_d_o      = rbuf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= W_IDLE;
      addr_q     <= '0;
      cmd_addr_q <= '0;
      wdata_q    <= '0;
      rbuf       <= '0;
      rbuf_valid <= 1'b0;
      cmd_rd_q   <= 1'b0;
    end else begin
      if (lb_sadr) begin
        addr_q     <= lb_d_i[ADDR_W-1:0];
        rbuf_valid <= 1'b0;
      end
      if (!lb_rwn && state == W_IDLE) rbuf_valid <= 1'b0;
      if (wr_xfer) begin
        cmd_addr_q <= addr_q;
        wdata_q    <= lb_d_i;
        cmd_rd_q   <= 1'b0;
        addr_q     <= addr_q + ADDR_W'(4);
        state      <= W_CMD;
      end else if (rd_xfer) begin
        rbuf_valid <= 1'b0;
        addr_q     <= addr_q + ADDR_W'(4);
      end else if (rd_start) begin
        cmd_addr_q <= addr_q;
        cmd_rd_q   <= 1'b1;
        state      <= W_CMD;
      end
      unique case (state)
        W_CMD:   if (ini_rsp.cmd_accept) state <= cmd_rd_q ? W_RDATA : W_WDATA;
        W_WDATA: if (ini_rsp.wr_accept)  state <= W_IDLE;
        W_RDATA: if (ini_rsp.rd_valid) begin
          rbuf       <= ini_rsp.rd_data;
          rbuf_valid <= lb_rwn && !lb_sadr;
          state      <= W_IDLE;
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    ini_req           = DTL_REQ_IDLE;
    ini_req.cmd_valid = (state == W_CMD);
    ini_req.cmd_addr  = 32'(cmd_addr_q);
    ini_req.cmd_read  = cmd_rd_q;
    ini_req.wr_valid  = (state == W_WDATA);
    ini_req.wr_data   = wdata_q;
    ini_req.rd_accept = (state == W_RDATA);
  end

endmodule
