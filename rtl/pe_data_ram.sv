// pe_data_ram: the local data RAM of one custom PE.
//
// Holds the PE's resident variables (those it updates) and its local copies of
// dependent variables (those other PEs update). As in the document, the RAM is
// small (tens of words) and built from LUTs, so it has many ports: NRP
// asynchronous read ports feed the custom ODE datapath, the PE output register
// and the host, and one synchronous write port takes the input-mux value.
// Timing: rd_data follows rd_addr in the same cycle; a write lands at the
// clock edge, so a read in the same cycle still sees the old word (write after
// read), which the instruction schedule relies on. The port count and the
// missing reset are this design's choices; contents are loaded by the host.
module pe_data_ram #(
  parameter int DEPTH = 128,
  parameter int W     = 32,
  parameter int NRP   = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic                      clk,
  input  logic [NRP-1:0][AW-1:0]    rd_addr,
  output logic [NRP-1:0][W-1:0]     rd_data,
  input  logic                      wr_en,
  input  logic [AW-1:0]             wr_addr,
  input  logic [W-1:0]              wr_data
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_comb begin
    for (int p = 0; p < NRP; p++) rd_data[p] = mem[rd_addr[p]];
  end

endmodule
