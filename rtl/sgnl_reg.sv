// sgnl_reg: C-HEAP signalling register of a task shell.
//
// A remote C-HEAP Block (or software) wakes a blocked channel of this shell
// by writing that channel's unique sgnl_value to this register over the bus.
// The written value is presented on sgnl_value to every C-HEAP Block of the
// shell and chg_sgnl is high for exactly one clock cycle; each block compares
// the value with its own and wakes its synchronisation controller on a match.
// There is one such register per shell, whatever the number of blocks.
//
// Interface: one DTL target port (see chp_pkg). Only offset 0 is mapped, as
// in the shell's address map; writes to other offsets are accepted and
// dropped. Reads return the last written value.
// Timing: sgnl_value and chg_sgnl change in the cycle after the write data
// transfer. Reset value 0; the reset clears the register (design choice).
module sgnl_reg
  import chp_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  dtl_req_t tgt_req,
  output dtl_rsp_t tgt_rsp,
  output logic [31:0] sgnl_value,
  output logic        chg_sgnl
);

  logic        reg_we;
  logic [4:0]  reg_addr;
  logic [31:0] reg_wdata;

  dtl_reg_port #(.OFS_W(5)) u_port (
    .clk, .rst_n, .req(tgt_req), .rsp(tgt_rsp),
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata(sgnl_value)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sgnl_value <= '0;
      chg_sgnl   <= 1'b0;
    end else begin
      chg_sgnl <= 1'b0;
      if (reg_we && reg_addr == 5'b00000) begin
        sgnl_value <= reg_wdata;
        chg_sgnl   <= 1'b1;
      end
    end
  end

endmodule
