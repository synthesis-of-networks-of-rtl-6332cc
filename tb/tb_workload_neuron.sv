// tb_workload_neuron: the 40 x 40 neuron network (1,600 neurons, 4,800 ODEs)
// on a 10 x 10 mesh of neuron PEs, 4 x 4 neurons per PE. Each PE keeps two
// buffers of 48 variables (V, W, S of its 16 neurons) and 16 halo words of
// its neighbours' S. Three time steps are run; every V, W and S is compared
// with a bit-exact reference, and the run must use all three datapath modes.
// See mesh_net_driver for the schedule and the other checks.
module tb_workload_neuron;
  import ode_pkg::*;
  localparam int NPE = 10 * 10 * 1;
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

  ode_pe_network #(.MODEL(MODEL_NEURON), .NX(10), .NY(10), .NZ(1)) dut (.*);

  mesh_net_driver #(.MODEL(MODEL_NEURON), .NX(10), .NY(10), .NZ(1),
                    .BX(4), .BY(4), .BZ(1), .STEPS(3)) drv (
    .*, .at_sync(dut.at_sync), .pe0_cw(dut.g_mesh.g_z[0].g_y[0].g_x[0].u_pe.cw));
endmodule
