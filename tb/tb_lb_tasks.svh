// Local-bus initiator tasks, acting as the PCI target core on the board's
// local bus. The including module declares clk, lb_sadr, lb_ba, lb_rwn,
// lb_mrdy, lb_mgrdy, lb_d_i, lb_d_o, lb_tbusy_o. Address phase: one cycle
// of LB_Sadr with the address on LB_D; then the base-address bit, LB_RWn and
// LB_Mrdy; a word moves at each rising edge where LB_Mrdy = 1 and
// LB_TBusy = 0. Afterwards the bus is parked in write mode.
task automatic lb_addr(input int ba, input logic [31:0] a);
  @(negedge clk);
  lb_sadr = 1; lb_d_i = a; lb_ba = '0;
  @(negedge clk);
  lb_sadr = 0; lb_ba = 7'(1 << ba);
endtask

task automatic lb_write_burst(input int ba, input logic [31:0] a,
                              input logic [31:0] d [4], input int n);
  lb_addr(ba, a);
  lb_rwn = 0;
  for (int k = 0; k < n; k++) begin
    lb_d_i = d[k]; lb_mrdy = 1;
    #1;
    while (lb_tbusy_o) begin @(negedge clk); #1; end
    @(negedge clk);
  end
  lb_mrdy = 0;
endtask

task automatic lb_write(input int ba, input logic [31:0] a, input logic [31:0] d);
  logic [31:0] b [4];
  b[0] = d; b[1] = 0; b[2] = 0; b[3] = 0;
  lb_write_burst(ba, a, b, 1);
endtask

task automatic lb_read_burst(input int ba, input logic [31:0] a,
                             output logic [31:0] d [4], input int n);
  lb_addr(ba, a);
  lb_rwn = 1; lb_mrdy = 1;
  for (int k = 0; k < n; k++) begin
    #1;
    while (lb_tbusy_o) begin @(negedge clk); #1; end
    d[k] = lb_d_o;
    @(negedge clk);
  end
  lb_mrdy = 0; lb_rwn = 0;
endtask

task automatic lb_read(input int ba, input logic [31:0] a, output logic [31:0] d);
  logic [31:0] b [4];
  lb_read_burst(ba, a, b, 1);
  d = b[0];
endtask
