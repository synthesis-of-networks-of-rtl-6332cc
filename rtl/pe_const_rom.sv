// pe_const_rom: constant ROM inside the custom ODE datapath.
//
// Holds the constant parameters of each variable a PE updates (for the atrial
// model the coupling gain and the ionic-current term, already scaled by the
// time step). The document keeps these out of the data RAM in a cheaper ROM
// addressed by the controller. Here the ROM is a synchronous-read table whose
// contents the host writes once before a run (the ROM image of a generated
// FPGA design); rd_data is valid one cycle after rd_addr.
module pe_const_rom #(
  parameter int DEPTH = 32,
  parameter int DW    = 64,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data,
  input  logic          ld_en,
  input  logic [AW-1:0] ld_addr,
  input  logic [DW-1:0] ld_data
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ld_en) mem[ld_addr] <= ld_data;
    rd_data <= mem[rd_addr];
  end

endmodule
