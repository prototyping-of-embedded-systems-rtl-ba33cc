// tb_sram_model: behavioural model of the board's two 32-bit SRAMs with a
// synchronous port: written on the rising edge with chip select and write
// enable low, read data of the selected chip valid in the next cycle. Only
// 2**AW_MODEL words per chip are modelled (upper line bits ignored).
`timescale 1ns/1ps
module tb_sram_model #(
  parameter int unsigned LINE_W   = 17,
  parameter int unsigned AW_MODEL = 10
) (
  input  logic              clk,
  input  logic [1:0]        cs_n,
  input  logic              we_n,
  input  logic [LINE_W-1:0] addr,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata [2]
);
  logic [31:0] mem0 [2**AW_MODEL];
  logic [31:0] mem1 [2**AW_MODEL];
  initial begin
    for (int i = 0; i < 2**AW_MODEL; i++) begin mem0[i] = '0; mem1[i] = '0; end
    rdata[0] = '0; rdata[1] = '0;
  end
  always @(posedge clk) begin
    if (!cs_n[0]) begin
      if (!we_n) mem0[addr[AW_MODEL-1:0]] <= wdata;
      else       rdata[0] <= mem0[addr[AW_MODEL-1:0]];
    end
    if (!cs_n[1]) begin
      if (!we_n) mem1[addr[AW_MODEL-1:0]] <= wdata;
      else       rdata[1] <= mem1[addr[AW_MODEL-1:0]];
    end
  end
endmodule
