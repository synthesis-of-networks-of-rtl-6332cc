// tb_workload_lutchen: the 4,000-cell Lutchen airway (a line of gas cells) on 160 Lutchen PEs.
// The cells are split into blocks of 25 x 1 x 1 per PE on a 160 x 1 x 1
// mesh; three time steps are run and every cell is compared with a bit-exact
// reference. See mesh_net_driver for the schedule and the other checks.
module tb_workload_lutchen;
  import ode_pkg::*;
  localparam int NPE = 160 * 1 * 1;
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

  ode_pe_network #(.MODEL(MODEL_LUTCHEN), .NX(160), .NY(1), .NZ(1)) dut (.*);

  mesh_net_driver #(.MODEL(MODEL_LUTCHEN), .NX(160), .NY(1), .NZ(1),
                    .BX(25), .BY(1), .BZ(1), .STEPS(3)) drv (
    .*, .at_sync(dut.at_sync), .pe0_cw(dut.g_mesh.g_z[0].g_y[0].g_x[0].u_pe.cw));
endmodule
