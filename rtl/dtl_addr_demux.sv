// dtl_addr_demux: 1-to-N DTL de-multiplexer steered by an address decoder.
//
// One incoming DTL port (from a bus wrapper or a task) is connected to one of
// N outgoing DTL target ports. The parent supplies the decoder result, dec_sel,
// computed from up_req.cmd_addr; the fixed decoders of this design take it
// from a bit field of the address, the programmable ones compare the address
// with a base register. The selection is taken when the command is presented
// and held until the transaction's data phase has completed.
//
// Ports whose bit in PORT_USED is 0 are spare address ranges. A command that
// decodes to a spare range is still accepted (a DTL target must accept every
// command, or the initiator would dead-lock): the built-in sink accepts the
// write data and returns zero read data. The sink and its zero read value are
// choices of this design. unmapped_cnt counts such accesses.
//
// Timing: no added cycle; the path is combinational from up_req to dn_req.
module dtl_addr_demux
  import chp_pkg::*;
#(
  parameter int unsigned N         = 4,
  parameter logic [N-1:0] PORT_USED = '1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic [((N > 1) ? $clog2(N) : 1)-1:0] dec_sel,
  input  dtl_req_t up_req,
  output dtl_rsp_t up_rsp,
  output dtl_req_t dn_req [N],
  input  dtl_rsp_t dn_rsp [N],
  output logic [15:0] unmapped_cnt
);

  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1;

  logic          data_phase, rd_q;
  logic [SW-1:0] sel_q, sel;
  logic          spare;

  assign sel   = data_phase ? sel_q : dec_sel;
  assign spare = !PORT_USED[sel];

  // sink for spare ranges
  dtl_rsp_t sink_rsp;
  always_comb begin
    sink_rsp            = DTL_RSP_IDLE;
    sink_rsp.cmd_accept = !data_phase;
    sink_rsp.wr_accept  = data_phase && !rd_q;
    sink_rsp.rd_valid   = data_phase && rd_q;
  end

  always_comb begin
    up_rsp = DTL_RSP_IDLE;
    for (int unsigned i = 0; i < N; i++) begin
      dn_req[i] = DTL_REQ_IDLE;
      if (sel == SW'(i) && PORT_USED[i]) begin
        dn_req[i] = up_req;
        up_rsp    = dn_rsp[i];
      end
    end
    if (spare) up_rsp = sink_rsp;
    if (data_phase) up_rsp.cmd_accept = 1'b0;
  end

  logic done;
  assign done = data_phase && (rd_q ? (up_rsp.rd_valid && up_req.rd_accept)
                                    : (up_req.wr_valid && up_rsp.wr_accept));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_phase   <= 1'b0;
      rd_q         <= 1'b0;
      sel_q        <= '0;
      unmapped_cnt <= '0;
    end else begin
      if (!data_phase && up_req.cmd_valid && up_rsp.cmd_accept) begin
        data_phase <= 1'b1;
        rd_q       <= up_req.cmd_read;
        sel_q      <= dec_sel;
        if (spare) unmapped_cnt <= unmapped_cnt + 16'd1;
      end
      if (done) data_phase <= 1'b0;
    end
  end

endmodule
