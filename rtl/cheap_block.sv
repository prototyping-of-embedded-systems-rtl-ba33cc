// cheap_block: C-HEAP Block, the per-channel synchronisation unit of a
// hardware task shell. A task has one block for each of its input or output
// channels. The block keeps the channel's administrative registers, hands the
// task pointers to free (output) or filled (input) tokens, and on each token
// release tells the other end of the channel over the bus.
//
// Administrative registers (DTL target port, byte offsets in bits 4..0):
//   0x00 sgnl_reg_addr  address of the other device's signalling register
//   0x04 sgnl_value     this channel's unique wake-up value
//   0x08 RSMPR_addr     address of the other end's semaphore
//   0x0C Nbuf           number of tokens (0 keeps the channel inactive)
//   0x10 Buf_ptr        base address of the token array
//   0x14 Mem_LSMPR_addr where the local semaphore is copied (HW_SW only)
//   0x18 LSMPR_reg      local semaphore, read-only: bit 31 roll-over flag,
//                       bits 30..0 count of released tokens modulo Nbuf
// INPUT and SIZE_BUF (token size in bytes) are fixed by parameters, as in the
// original design where they are constants of the source code.
//
// Synchronisation. The number of tokens the task may use is derived from the
// local semaphore L and the last value R read from the other end:
//   input  channel: flags equal ? R - L : Nbuf - (L - R)
//   output channel: flags equal ? Nbuf - (L - R) : R - L
// While that number exceeds the tokens already claimed, chp_ptr_valid is high
// and chp_buf_ptr = Buf_ptr + index * SIZE_BUF points at the next unclaimed
// token; chp_ptr_ack claims it and the next pointer follows. Several tokens
// may be claimed before any is released; each chp_released_buf pulse releases
// the oldest claimed token (FIFO order) and advances L, toggling its flag when
// the count wraps at Nbuf.
//
// Bus side (DTL initiator port), one single-word transaction at a time:
//   * after a release: HW_SW=0 writes sgnl_value to sgnl_reg_addr (wake-up of
//     the other hardware block, which then reads our LSMPR_reg); HW_SW=1
//     writes L to Mem_LSMPR_addr (the software channel record).
//   * when every available token is claimed, R is re-read from RSMPR_addr:
//     HW_SW=0 waits for a wake-up (chg_sgnl with sgnl_reg equal to our
//     sgnl_value) before reading; HW_SW=1 polls, because software does not
//     signal. Releases are served before refreshes; several releases that
//     arrive during one write are covered by a single write of the latest L.
// The two HW_SW settings are the hardware-hardware and the polling-based
// hardware-software block types of the original design. The Nbuf = 0
// inactive state, the coalescing of notifications and the single-word bus
// accesses are choices of this design.
//
// Timing: all synchronisation signals are sampled at the rising clock edge;
// chp_ptr_valid/chp_buf_ptr are stable until acknowledged. A release costs
// one bus write (command plus data phase) of at least two cycles.
//
// Lint note: rst_n is the asynchronous reset of the flip-flops and is also
// read synchronously by the "disable iff" of the two assertions at the end;
// that mixed use exists in simulation checks only, not in the netlist.
module cheap_block
  import chp_pkg::*;
#(
  parameter bit          INPUT    = 1'b0,  // 1: input channel (consumer side)
  parameter int unsigned SIZE_BUF = 4,     // token size in bytes
  parameter bit          HW_SW    = 1'b1   // 1: polling-based HW-SW version
) (
  input  logic        clk,
  input  logic        rst_n,
  // generic bus target (administrative registers)
  input  dtl_req_t    tgt_req,
  output dtl_rsp_t    tgt_rsp,
  // generic bus initiator
  output dtl_req_t    ini_req,
  input  dtl_rsp_t    ini_rsp,
  // signalling register of this shell
  input  logic [31:0] sgnl_reg,
  input  logic        chg_sgnl,
  // synchronisation interface to the task
  output logic        chp_ptr_valid,
  output logic [31:0] chp_buf_ptr,
  input  logic        chp_ptr_ack,
  input  logic        chp_released_buf
);

  // ---------------------------------------------------------------- registers
  logic [31:0] sgnl_reg_addr_r, sgnl_value_r, rsmpr_addr_r, nbuf_r, buf_ptr_r,
               mem_lsmpr_addr_r;
  logic [31:0] lsmpr, rsmpr_q;

  logic        reg_we;
  logic [4:0]  reg_addr;
  logic [31:0] reg_wdata, reg_rdata;

  dtl_reg_port #(.OFS_W(5)) u_port (
    .clk, .rst_n, .req(tgt_req), .rsp(tgt_rsp),
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata
  );

  always_comb begin
    unique case (reg_addr)
      REG_SGNL_REG_ADDR: reg_rdata = sgnl_reg_addr_r;
      REG_SGNL_VALUE:    reg_rdata = sgnl_value_r;
      REG_RSMPR_ADDR:    reg_rdata = rsmpr_addr_r;
      REG_NBUF:          reg_rdata = nbuf_r;
      REG_BUF_PTR:       reg_rdata = buf_ptr_r;
      REG_MEM_LSMPR:     reg_rdata = mem_lsmpr_addr_r;
      REG_LSMPR:         reg_rdata = lsmpr;
      default:           reg_rdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sgnl_reg_addr_r  <= '0;
      sgnl_value_r     <= '0;
      rsmpr_addr_r     <= '0;
      nbuf_r           <= '0;
      buf_ptr_r        <= '0;
      mem_lsmpr_addr_r <= '0;
    end else if (reg_we) begin
      unique case (reg_addr)
        REG_SGNL_REG_ADDR: sgnl_reg_addr_r  <= reg_wdata;
        REG_SGNL_VALUE:    sgnl_value_r     <= reg_wdata;
        REG_RSMPR_ADDR:    rsmpr_addr_r     <= reg_wdata;
        REG_NBUF:          nbuf_r           <= reg_wdata;
        REG_BUF_PTR:       buf_ptr_r        <= reg_wdata;
        REG_MEM_LSMPR:     mem_lsmpr_addr_r <= reg_wdata;
        default: ;  // LSMPR_reg and spare offsets are not writable
      endcase
    end
  end

  // ------------------------------------------------------ token availability
  logic [30:0] l_cnt, r_cnt, nbuf, avail, claimed, claim_idx;
  logic        flags_equal;

  assign l_cnt       = lsmpr[30:0];
  assign r_cnt       = rsmpr_q[30:0];
  assign nbuf        = nbuf_r[30:0];
  assign flags_equal = (lsmpr[SMPR_FLAG] == rsmpr_q[SMPR_FLAG]);

  always_comb begin
    if (INPUT) avail = flags_equal ? (r_cnt - l_cnt) : (nbuf - (l_cnt - r_cnt));
    else       avail = flags_equal ? (nbuf - (l_cnt - r_cnt)) : (r_cnt - l_cnt);
  end

  assign chp_ptr_valid = (nbuf != '0) && (avail > claimed);
  assign chp_buf_ptr   = buf_ptr_r + 32'(claim_idx) * 32'(SIZE_BUF);

  logic take, release_now;
  assign take        = chp_ptr_valid && chp_ptr_ack;
  assign release_now = chp_released_buf && (claimed != '0);

  logic [30:0] l_next;
  assign l_next = l_cnt + 31'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lsmpr     <= '0;
      claimed   <= '0;
      claim_idx <= '0;
    end else begin
      if (take) claim_idx <= (claim_idx + 31'd1 == nbuf) ? '0 : claim_idx + 31'd1;
      if (release_now) begin
        if (l_next == nbuf) lsmpr <= {~lsmpr[SMPR_FLAG], 31'd0};
        else                lsmpr <= {lsmpr[SMPR_FLAG], l_next};
      end
      unique case ({take, release_now})
        2'b10:   claimed <= claimed + 31'd1;
        2'b01:   claimed <= claimed - 31'd1;
        default: ;
      endcase
    end
  end

  // ------------------------------------------------ synchronisation controller
  typedef enum logic [1:0] {C_IDLE, C_CMD, C_WDATA, C_RDATA} cstate_e;
  cstate_e     cstate;
  logic        notify_pend, wake_pend, cur_read;
  logic [31:0] cur_addr, cur_data;
  logic        wake_hit, need_refresh;

  assign wake_hit     = chg_sgnl && (sgnl_reg == sgnl_value_r);
  assign need_refresh = (nbuf != '0) && (avail == claimed) && (HW_SW || wake_pend);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cstate      <= C_IDLE;
      notify_pend <= 1'b0;
      wake_pend   <= 1'b1;   // first refresh needs no wake-up
      cur_read    <= 1'b0;
      cur_addr    <= '0;
      cur_data    <= '0;
      rsmpr_q     <= '0;
    end else begin
      if (release_now) notify_pend <= 1'b1;
      if (wake_hit)    wake_pend   <= 1'b1;
      unique case (cstate)
        C_IDLE: begin
          if (notify_pend) begin
            notify_pend <= release_now;
            cur_read    <= 1'b0;
            cur_addr    <= HW_SW ? mem_lsmpr_addr_r : sgnl_reg_addr_r;
            cur_data    <= HW_SW ? lsmpr : sgnl_value_r;
            cstate      <= C_CMD;
          end else if (need_refresh) begin
            wake_pend <= wake_hit;
            cur_read  <= 1'b1;
            cur_addr  <= rsmpr_addr_r;
            cstate    <= C_CMD;
          end
        end
        C_CMD:   if (ini_rsp.cmd_accept) cstate <= cur_read ? C_RDATA : C_WDATA;
        C_WDATA: if (ini_rsp.wr_accept)  cstate <= C_IDLE;
        C_RDATA: if (ini_rsp.rd_valid) begin
          rsmpr_q <= ini_rsp.rd_data;
          cstate  <= C_IDLE;
        end
      endcase
    end
  end

  always_comb begin
    ini_req           = DTL_REQ_IDLE;
    ini_req.cmd_valid = (cstate == C_CMD);
    ini_req.cmd_addr  = cur_addr;
    ini_req.cmd_read  = cur_read;
    ini_req.wr_valid  = (cstate == C_WDATA);
    ini_req.wr_data   = cur_data;
    ini_req.rd_accept = (cstate == C_RDATA);
  end

  // ------------------------------------------------------------- assertions
  a_release_claimed: assert property (@(posedge clk) disable iff (!rst_n)
    chp_released_buf |-> claimed != '0)
    else $error("cheap_block: token released that was never claimed");
  a_ack_valid: assert property (@(posedge clk) disable iff (!rst_n)
    chp_ptr_ack |-> chp_ptr_valid)
    else $error("cheap_block: pointer acknowledged while not valid");

endmodule
