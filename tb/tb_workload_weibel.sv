// tb_workload_weibel: the 11-generation Weibel lung (2,047 branches, 4,094
// variables) on the 3-level 8-ary tree of 73 Weibel PEs: a root PE and 8
// middle PEs with 3 generations (7 branches) each, and 64 leaf PEs with 5
// generations (31 branches) each. Three time steps are run and every V and F
// is compared with a bit-exact reference. See tree_net_driver for the schedule
// and the other checks.
module tb_workload_weibel;
  import ode_pkg::*;
  localparam int NPE = tree_size(8, 3);
  localparam int PEW = (NPE > 1) ? $clog2(NPE) : 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, start, busy, done, cfg_we;
  logic [15:0] num_steps;
  logic [PEW-1:0] cfg_pe, hrd_pe;
  cfg_target_e cfg_target;
  logic [7:0] cfg_addr;
  logic [CFG_W-1:0] cfg_wdata;
  logic [DATA_AW-1:0] hrd_addr;
  word_t hrd_data;
  logic finished;

  always @(posedge finished) $finish;

  ode_pe_network #(.MODEL(MODEL_WEIBEL), .TREE(1'b1), .FAN(8), .TLEV(3)) dut (.*);

  tree_net_driver #(.FAN(8), .TLEV(3), .G(11), .STEPS(3)) drv (
    .*, .at_sync(dut.at_sync), .pe1_cw(dut.g_tree.g_p[1].u_pe.cw));
endmodule
