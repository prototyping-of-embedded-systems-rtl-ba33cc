// producer_task: the simplest producer application of the board, writing the
// row of numbers 0, 1, 2, ... (a free-running 32-bit counter, wrapping after
// 0xFFFFFFFF) into the tokens of a C-HEAP output channel.
//
// Per token: wait for chp_ptr_valid, claim the token with a one-cycle
// chp_ptr_ack, write SIZE_BUF/4 consecutive counter values to the words of
// the token through the DTL initiator port, then release it with a
// one-cycle chp_released_buf. The task blocks (waits) whenever its C-HEAP
// Block has no free token. One token is handled at a time; the token layout
// (one counter value per 32-bit word) is a choice of this design.
//
// Timing: each word costs one DTL write (at least two cycles); a token of
// one word takes at least four cycles from claim to release.
//
// The producer only writes: the read side of its DTL response (rd_valid,
// rd_data) is not used, and cmd_read and rd_accept are constant 0.
module producer_task
  import chp_pkg::*;
#(
  parameter int unsigned SIZE_BUF = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        chp_ptr_valid,
  input  logic [31:0] chp_buf_ptr,
  output logic        chp_ptr_ack,
  output logic        chp_released_buf,
  output dtl_req_t    ini_req,
  input  dtl_rsp_t    ini_rsp,
  output logic [31:0] tokens_done
);

  localparam int unsigned WORDS = (SIZE_BUF / 4 > 0) ? SIZE_BUF / 4 : 1;

  typedef enum logic [2:0] {P_WAIT, P_CMD, P_WDATA, P_REL} pstate_e;
  pstate_e     state;
  logic [31:0] ptr_q, value, word_addr;
  logic [$clog2(WORDS+1)-1:0] word;

  assign chp_ptr_ack      = (state == P_WAIT) && chp_ptr_valid;
  assign chp_released_buf = (state == P_REL);
  assign word_addr        = ptr_q + 32'(word) * 32'd4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= P_WAIT;
      ptr_q       <= '0;
      value       <= '0;
      word        <= '0;
      tokens_done <= '0;
    end else begin
      unique case (state)
        P_WAIT: if (chp_ptr_valid) begin
          ptr_q <= chp_buf_ptr;
          word  <= '0;
          state <= P_CMD;
        end
        P_CMD:   if (ini_rsp.cmd_accept) state <= P_WDATA;
        P_WDATA: if (ini_rsp.wr_accept) begin
          value <= value + 32'd1;
          if (32'(word) == WORDS - 1) state <= P_REL;
          else begin
            word  <= word + 1'b1;
            state <= P_CMD;
          end
        end
        P_REL: begin
          tokens_done <= tokens_done + 32'd1;
          state       <= P_WAIT;
        end
        default: state <= P_WAIT;
      endcase
    end
  end

  always_comb begin
    ini_req           = DTL_REQ_IDLE;
    ini_req.cmd_valid = (state == P_CMD);
    ini_req.cmd_addr  = word_addr;
    ini_req.cmd_read  = 1'b0;
    ini_req.wr_valid  = (state == P_WDATA);
    ini_req.wr_data   = value;
  end

endmodule
