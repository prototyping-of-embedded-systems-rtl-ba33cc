// tb_dtl_mem: behavioural DTL target for testbenches. A word memory of
// 2**AW_WORDS words (byte address bits AW_WORDS+1..2 index it, upper bits
// ignored) that answers the single-word DTL subset of chp_pkg with random
// stall cycles on every handshake when STALL is set. It counts the reads and
// writes it served; testbenches preload and inspect mem hierarchically.
`timescale 1ns/1ps
module tb_dtl_mem
  import chp_pkg::*;
#(
  parameter int unsigned AW_WORDS = 10,
  parameter bit          STALL    = 1'b1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  dtl_req_t req,
  output dtl_rsp_t rsp
);
  logic [31:0] mem [2**AW_WORDS];
  int unsigned rd_cnt, wr_cnt;
  logic [31:0] last_wr_addr;

  typedef enum logic [1:0] {S_IDLE, S_WR, S_RD} st_e;
  st_e         st;
  logic [31:0] addr_q;
  logic        go;

  initial begin
    for (int i = 0; i < 2**AW_WORDS; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) go <= STALL ? ($urandom_range(0, 3) != 0) : 1'b1;

  always_comb begin
    rsp            = DTL_RSP_IDLE;
    rsp.cmd_accept = (st == S_IDLE) && go;
    rsp.wr_accept  = (st == S_WR) && go;
    rsp.rd_valid   = (st == S_RD) && go;
    rsp.rd_data    = mem[addr_q[AW_WORDS+1:2]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      rd_cnt <= 0;
      wr_cnt <= 0;
      addr_q <= '0;
      last_wr_addr <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (req.cmd_valid && rsp.cmd_accept) begin
          addr_q <= req.cmd_addr;
          st     <= req.cmd_read ? S_RD : S_WR;
        end
        S_WR: if (req.wr_valid && rsp.wr_accept) begin
          mem[addr_q[AW_WORDS+1:2]] <= req.wr_data;
          last_wr_addr <= addr_q;
          wr_cnt <= wr_cnt + 1;
          st     <= S_IDLE;
        end
        S_RD: if (req.rd_accept && rsp.rd_valid) begin
          rd_cnt <= rd_cnt + 1;
          st     <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
