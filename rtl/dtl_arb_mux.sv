// dtl_arb_mux: N-to-1 DTL multiplexer with a central round-robin arbiter.
//
// Several DTL initiator ports (the C-HEAP Blocks of a shell, or the blocks
// and the task of a board) share one DTL initiator port towards the bus.
// Each initiator requests with its own cmd_valid (independent, parallel
// request lines); the arbiter grants one of them and the multiplexer
// connects it to the output until its transaction, command and data phase,
// has completed. Round robin: the search for the next grant starts just after
// the initiator granted last. The grant is combinational while the mux is
// free, so an uncontested command passes with no added cycle; the choice of
// round robin follows the original design, the lock per transaction is this
// design's reading of the single-word DTL subset.
//
// Interface: ini_req/ini_rsp[N] from the initiators, out_req/out_rsp to the
// target side. Non-granted initiators see an idle response (no accepts).
// An assertion checks that every initiator holds a command, unchanged,
// until it is accepted (the DTL handshake rule this multiplexer relies on).
module dtl_arb_mux
  import chp_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  dtl_req_t ini_req [N],
  output dtl_rsp_t ini_rsp [N],
  output dtl_req_t out_req,
  input  dtl_rsp_t out_rsp
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic          busy, busy_rd, data_phase;
  logic [IW-1:0] owner, last, pick, gnt;
  logic          any_req;

  // round-robin pick among requesting initiators
  always_comb begin
    pick    = last;
    any_req = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      automatic logic [IW-1:0] idx = IW'((int'(last) + k) % N);
      if (!any_req && ini_req[idx].cmd_valid) begin
        pick    = idx;
        any_req = 1'b1;
      end
    end
  end

  assign gnt = busy ? owner : pick;

  always_comb begin
    out_req = DTL_REQ_IDLE;
    for (int unsigned i = 0; i < N; i++) begin
      ini_rsp[i] = DTL_RSP_IDLE;
      if (gnt == IW'(i) && (busy || any_req)) begin
        out_req    = ini_req[i];
        ini_rsp[i] = out_rsp;
      end
    end
    // while the data phase runs, no new command may leave this port
    if (data_phase) out_req.cmd_valid = 1'b0;
    if (data_phase) for (int unsigned i = 0; i < N; i++) ini_rsp[i].cmd_accept = 1'b0;
  end

  logic done;
  assign done = data_phase &&
                (busy_rd ? (out_rsp.rd_valid && out_req.rd_accept)
                         : (out_req.wr_valid && out_rsp.wr_accept));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      busy_rd    <= 1'b0;
      data_phase <= 1'b0;
      owner      <= '0;
      last       <= IW'(N - 1);
    end else begin
      if (!busy && any_req) begin
        busy  <= 1'b1;
        owner <= pick;
        last  <= pick;
      end
      if (out_req.cmd_valid && out_rsp.cmd_accept) begin
        data_phase <= 1'b1;
        busy_rd    <= out_req.cmd_read;
      end
      if (done) begin
        busy       <= 1'b0;
        data_phase <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------- assertions
  // DTL rule checked on every initiator port: a command that was presented
  // and not accepted must be presented again, unchanged, in the next cycle.
  // Only simulation uses these flip-flops; synthesis removes them.
  logic [N-1:0] cmd_pend, read_q;
  logic [31:0]  addr_q [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_pend <= '0;
      read_q   <= '0;
      for (int unsigned i = 0; i < N; i++) addr_q[i] <= '0;
    end else begin
      for (int unsigned i = 0; i < N; i++) begin
        if (cmd_pend[i])
          assert (ini_req[i].cmd_valid && ini_req[i].cmd_addr == addr_q[i] &&
                  ini_req[i].cmd_read == read_q[i])
            else $error("dtl_arb_mux: initiator %0d dropped or changed a pending command", i);
        cmd_pend[i] <= ini_req[i].cmd_valid && !ini_rsp[i].cmd_accept;
        read_q[i]   <= ini_req[i].cmd_read;
        addr_q[i]   <= ini_req[i].cmd_addr;
      end
    end
  end

endmodule
