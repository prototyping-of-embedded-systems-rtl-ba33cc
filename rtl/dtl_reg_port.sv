// dtl_reg_port: DTL target front end for a small bank of memory-mapped
// registers. It turns each single-word DTL command into one register access:
// a write produces a one-cycle reg_we pulse with reg_addr/reg_wdata, a read
// samples reg_rdata (combinational in the parent, indexed by reg_addr) one
// cycle after the command is accepted and holds it on rd_data until the
// initiator accepts it.
//
// Timing: the command is accepted in the cycle it is presented while the
// port is idle. Write: wr_accept is high from the next cycle; the register
// is written in the cycle wr_valid & wr_accept. Read: rd_valid rises two
// cycles after the command transfer. The accept-everything behaviour (any
// offset is accepted, unmapped reads return what the parent returns) keeps an
// initiator from ever hanging on a target; it is a choice of this design.
module dtl_reg_port
  import chp_pkg::*;
#(
  parameter int unsigned OFS_W = 5   // number of address bits passed on
) (
  input  logic             clk,
  input  logic             rst_n,
  input  dtl_req_t         req,
  output dtl_rsp_t         rsp,
  output logic             reg_we,
  output logic [OFS_W-1:0] reg_addr,
  output logic [31:0]      reg_wdata,
  input  logic [31:0]      reg_rdata
);

  typedef enum logic [1:0] {P_IDLE, P_WDATA, P_RSAMPLE, P_RDATA} pstate_e;
  pstate_e     state;
  logic [31:0] rdata_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= P_IDLE;
      reg_addr <= '0;
      rdata_q  <= '0;
    end else begin
      unique case (state)
        P_IDLE: if (req.cmd_valid) begin
          reg_addr <= req.cmd_addr[OFS_W-1:0];
          state    <= req.cmd_read ? P_RSAMPLE : P_WDATA;
        end
        P_WDATA:   if (req.wr_valid) state <= P_IDLE;
        P_RSAMPLE: begin
          rdata_q <= reg_rdata;
          state   <= P_RDATA;
        end
        P_RDATA:   if (req.rd_accept) state <= P_IDLE;
      endcase
    end
  end

  always_comb begin
    rsp            = DTL_RSP_IDLE;
    rsp.cmd_accept = (state == P_IDLE);
    rsp.wr_accept  = (state == P_WDATA);
    rsp.rd_valid   = (state == P_RDATA);
    rsp.rd_data    = rdata_q;
  end

  assign reg_we    = (state == P_WDATA) && req.wr_valid;
  assign reg_wdata = req.wr_data;

endmodule
