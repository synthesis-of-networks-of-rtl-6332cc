// tb_ode_pe_network_full: the PE network at its default size.
// 125 atrial PEs on a 5 x 5 x 5 mesh, 3 x 3 x 3 cells per PE: the full
// 15 x 15 x 15 (3,375-cell) atrial model, run for three Euler steps and
// checked cell by cell; see mesh_net_driver for what is checked.
module tb_ode_pe_network_full;
  import ode_pkg::*;
  localparam int NPE = 125;
  localparam int PEW = $clog2(NPE);

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

  ode_pe_network dut (.*);

  mesh_net_driver #(.MODEL(MODEL_ATRIAL), .NX(5), .NY(5), .NZ(5), .BX(3), .BY(3), .BZ(3), .STEPS(3)) drv (
    .*, .at_sync(dut.at_sync), .pe0_cw(dut.g_mesh.g_z[0].g_y[0].g_x[0].u_pe.cw));
endmodule
