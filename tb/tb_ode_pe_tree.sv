// tb_ode_pe_tree: a small tree network of Weibel PEs: a 4-ary tree of 3
// levels (21 PEs) running a 6-generation lung (63 branches, 126 variables),
// 3 branches per PE. Three time steps are run; every V and F is compared with
// a bit-exact reference, the cycle count is checked, and each mechanism (compute,
// own store, store from a child, store from the parent, output, wrap, barrier
// wait) must occur. See tree_net_driver for the schedule.
module tb_ode_pe_tree;
  import ode_pkg::*;
  localparam int NPE = tree_size(4, 3);
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

  ode_pe_network #(.MODEL(MODEL_WEIBEL), .TREE(1'b1), .FAN(4), .TLEV(3)) dut (.*);

  tree_net_driver #(.FAN(4), .TLEV(3), .G(6), .STEPS(3)) drv (
    .*, .at_sync(dut.at_sync), .pe1_cw(dut.g_tree.g_p[1].u_pe.cw));
endmodule
