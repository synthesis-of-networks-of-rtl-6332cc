// tb_ode_pe_network: end-to-end test of the PE network at reduced size.
// A 2 x 2 x 2 mesh of atrial PEs, 2 x 2 x 2 cells per PE (a 4 x 4 x 4 cell
// model), runs three Euler steps; see mesh_net_driver for what is checked.
module tb_ode_pe_network;
  import ode_pkg::*;
  localparam int NX = 2, NY = 2, NZ = 2;
  localparam int NPE = NX * NY * NZ;
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

  ode_pe_network #(.MODEL(MODEL_ATRIAL), .NX(NX), .NY(NY), .NZ(NZ)) dut (.*);

  mesh_net_driver #(.MODEL(MODEL_ATRIAL), .NX(NX), .NY(NY), .NZ(NZ), .BX(2), .BY(2), .BZ(2), .STEPS(3)) drv (
    .*, .at_sync(dut.at_sync), .pe0_cw(dut.g_mesh.g_z[0].g_y[0].g_x[0].u_pe.cw));
endmodule
