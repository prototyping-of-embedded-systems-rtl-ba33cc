// dtl_sram_if: memory interface from one DTL target port to the board's
// local memory, two 32-bit wide SRAMs.
//
// The byte address is split as on the board: bits 1..0 select the byte
// within the word (ignored, only whole words are moved), bits LINE_W+1..2 the
// memory line and bit LINE_W+2 which of the two memories. Defaults: 17 line
// bits and one chip bit, 2^17 words of 4 bytes per memory.
//
// The SRAM port is synchronous: sram_cs_n (one per memory), sram_we_n and
// sram_addr/sram_wdata are registered, read data is returned by the selected
// memory in the cycle after the access (sram_rdata). That single-cycle SRAM
// timing is an assumption of this design; the original board's memory
// timing is not modelled.
//
// Timing: write: command accepted when idle, data accepted next cycle, SRAM
// written the cycle after. Read: the SRAM access is issued with the command
// transfer and rd_valid rises two cycles after it.
module dtl_sram_if
  import chp_pkg::*;
#(
  parameter int unsigned LINE_W = 17
) (
  input  logic              clk,
  input  logic              rst_n,
  input  dtl_req_t          tgt_req,
  output dtl_rsp_t          tgt_rsp,
  output logic [1:0]        sram_cs_n,
  output logic              sram_we_n,
  output logic [LINE_W-1:0] sram_addr,
  output logic [31:0]       sram_wdata,
  input  logic [31:0]       sram_rdata [2]
);

  typedef enum logic [2:0] {M_IDLE, M_WDATA, M_RACC, M_RWAIT, M_RDATA} mstate_e;
  mstate_e     state;
  logic [31:0] addr_q, rdata_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= M_IDLE;
      addr_q     <= '0;
      rdata_q    <= '0;
      sram_cs_n  <= 2'b11;
      sram_we_n  <= 1'b1;
      sram_addr  <= '0;
      sram_wdata <= '0;
    end else begin
      sram_cs_n <= 2'b11;
      sram_we_n <= 1'b1;
      unique case (state)
        M_IDLE: if (tgt_req.cmd_valid) begin
          addr_q <= tgt_req.cmd_addr;
          if (tgt_req.cmd_read) begin
            sram_cs_n[tgt_req.cmd_addr[LINE_W+2]] <= 1'b0;
            sram_addr <= tgt_req.cmd_addr[LINE_W+1:2];
            state     <= M_RACC;
          end else begin
            state     <= M_WDATA;
          end
        end
        M_WDATA: if (tgt_req.wr_valid) begin
          sram_cs_n[addr_q[LINE_W+2]] <= 1'b0;
          sram_we_n  <= 1'b0;
          sram_addr  <= addr_q[LINE_W+1:2];
          sram_wdata <= tgt_req.wr_data;
          state      <= M_IDLE;
        end
        M_RACC:  state <= M_RWAIT;   // SRAM samples the access
        M_RWAIT: begin
          rdata_q <= sram_rdata[addr_q[LINE_W+2]];
          state   <= M_RDATA;
        end
        M_RDATA: if (tgt_req.rd_accept) state <= M_IDLE;
        default: state <= M_IDLE;
      endcase
    end
  end

  always_comb begin
    tgt_rsp            = DTL_RSP_IDLE;
    tgt_rsp.cmd_accept = (state == M_IDLE);
    tgt_rsp.wr_accept  = (state == M_WDATA);
    tgt_rsp.rd_valid   = (state == M_RDATA);
    tgt_rsp.rd_data    = rdata_q;
  end

endmodule
