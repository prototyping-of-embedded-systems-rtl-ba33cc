// consumer_task: consumer application of the board. It takes the tokens of
// a C-HEAP input channel that software fills, reads every 32-bit word of
// each token through its DTL initiator port and keeps the last word read in
// last_data, a register the software can read back to check the channel.
//
// Per token: wait for chp_ptr_valid, claim with a one-cycle chp_ptr_ack,
// read SIZE_BUF/4 words, release with a one-cycle chp_released_buf. Besides
// the last word it keeps a running sum of all words (a check value of this
// design) and the number of tokens consumed.
//
// Timing: each word costs one DTL read (command, then data phase).
//
// The consumer only reads: wr_accept of its DTL response is not used, and
// wr_valid, wr_data and cmd_read are constant (0, 0, 1).
module consumer_task
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
  output logic [31:0] last_data,
  output logic [31:0] data_sum,
  output logic [31:0] tokens_done
);

  localparam int unsigned WORDS = (SIZE_BUF / 4 > 0) ? SIZE_BUF / 4 : 1;

  typedef enum logic [2:0] {C_WAIT, C_CMD, C_RDATA, C_REL} cstate_e;
  cstate_e     state;
  logic [31:0] ptr_q, word_addr;
  logic [$clog2(WORDS+1)-1:0] word;

  assign chp_ptr_ack      = (state == C_WAIT) && chp_ptr_valid;
  assign chp_released_buf = (state == C_REL);
  assign word_addr        = ptr_q + 32'(word) * 32'd4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= C_WAIT;
      ptr_q       <= '0;
      word        <= '0;
      last_data   <= '0;
      data_sum    <= '0;
      tokens_done <= '0;
    end else begin
      unique case (state)
        C_WAIT: if (chp_ptr_valid) begin
          ptr_q <= chp_buf_ptr;
          word  <= '0;
          state <= C_CMD;
        end
        C_CMD:   if (ini_rsp.cmd_accept) state <= C_RDATA;
        C_RDATA: if (ini_rsp.rd_valid) begin
          last_data <= ini_rsp.rd_data;
          data_sum  <= data_sum + ini_rsp.rd_data;
          if (32'(word) == WORDS - 1) state <= C_REL;
          else begin
            word  <= word + 1'b1;
            state <= C_CMD;
          end
        end
        C_REL: begin
          tokens_done <= tokens_done + 32'd1;
          state       <= C_WAIT;
        end
        default: state <= C_WAIT;
      endcase
    end
  end

  always_comb begin
    ini_req           = DTL_REQ_IDLE;
    ini_req.cmd_valid = (state == C_CMD);
    ini_req.cmd_addr  = word_addr;
    ini_req.cmd_read  = 1'b1;
    ini_req.rd_accept = (state == C_RDATA);
  end

endmodule
