// custom_pe: one custom processing element of the ODE-solver network.
//
// Structure (after the document's PE micro-architecture figure): an input mux
// feeds the write port of a multi-ported data RAM; the RAM's read ports feed a
// fully pipelined custom ODE datapath with its own constant ROM; the datapath
// result loops back to the input mux; a controller with an instruction RAM
// drives every select and address each cycle. The PE runs three abstract
// instructions, all expressed as fields of one control word:
//   compute - read V_i and its dependencies, start an Euler update in the datapath;
//   store   - write the input-mux value (own result or a neighbour's output);
//   output  - copy data-RAM read port 0 into the output register.
// Compute and store of the same variable are DP_LAT = 4 cycles apart; an
// output issued in cycle t is on dout in cycle t+1, so a neighbour stores it
// in cycle t+1. Reads see the RAM as it was before the cycle's write.
//
// MODEL chooses the datapath (atrial, Lutchen, wave, Weibel or neuron); the
// document generates one custom PE per model. The host loads the instruction RAM, the constant
// ROM and the initial data through cfg_* while the PE is idle, and reads the
// data RAM through a spare read port (hrd_*). These host ports, the output
// register and the port numbering are this design's choices.
module custom_pe
  import ode_pkg::*;
#(
  parameter model_e MODEL      = MODEL_ATRIAL,
  parameter int     NL         = NNB,          // links (mesh 6, tree up to NLK_MAX)
  parameter int     DATA_DEPTH = 2**DATA_AW,
  parameter int     CROM_DEPTH = 2**CROM_AW,
  parameter int     INST_DEPTH = 2**INST_AW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // run control and network barrier
  input  logic                  start,
  input  logic [15:0]           num_steps,
  input  logic                  all_sync,
  output logic                  at_sync,
  output logic                  busy,
  output logic                  done,
  // neighbour links: din[k] is mux input k+1
  input  word_t [NL-1:0]        din,
  output word_t                 dout,
  // host configuration and read-back
  input  logic                  cfg_we,
  input  cfg_target_e           cfg_target,
  input  logic [7:0]            cfg_addr,
  input  logic [CFG_W-1:0]      cfg_wdata,
  input  logic [DATA_AW-1:0]    hrd_addr,
  output word_t                 hrd_data
);

  localparam int NRP = NRD + 1;        // datapath ports + host port

  // controller
  ctrl_word_t  cw;
  pe_controller #(.INST_DEPTH(INST_DEPTH)) u_ctrl (
    .clk, .rst_n, .start, .num_steps, .all_sync, .at_sync, .busy, .done,
    .steps_done(), .cw,
    .prog_we  (cfg_we && cfg_target == CFG_INST),
    .prog_addr(cfg_addr[$clog2(INST_DEPTH)-1:0]),
    .prog_data(ctrl_word_t'(cfg_wdata[CW_W-1:0]))
  );

  // data RAM
  logic [NRP-1:0][DATA_AW-1:0] rd_addr;
  logic [NRP-1:0][W-1:0]       rd_data;
  logic                        ram_we;
  logic [DATA_AW-1:0]          ram_waddr;
  word_t                       ram_wdata, mux_out, dp_result;
  logic                        dp_valid;

  always_comb begin
    for (int p = 0; p < NRD; p++) rd_addr[p] = cw.rd_addr[p];
    rd_addr[NRD] = hrd_addr;
  end
  assign hrd_data = rd_data[NRD];

  pe_input_mux #(.N(NL + 1), .W(W), .SW(SEL_W)) u_mux (
    .din({din, dp_result}), .sel(cw.in_sel), .dout(mux_out)
  );

  always_comb begin
    if (busy) begin
      ram_we    = cw.wr_en;
      ram_waddr = cw.wr_addr;
      ram_wdata = mux_out;
    end else begin
      ram_we    = cfg_we && cfg_target == CFG_DATA;
      ram_waddr = cfg_addr[DATA_AW-1:0];
      ram_wdata = cfg_wdata[W-1:0];
    end
  end

  pe_data_ram #(.DEPTH(DATA_DEPTH), .W(W), .NRP(NRP)) u_dram (
    .clk, .rd_addr(rd_addr), .rd_data(rd_data),
    .wr_en(ram_we), .wr_addr(ram_waddr), .wr_data(ram_wdata)
  );

  // custom ODE datapath with its constant ROM
  localparam int CAW = $clog2(CROM_DEPTH);
  logic crom_ld;
  assign crom_ld = cfg_we && cfg_target == CFG_CROM;

  if (MODEL == MODEL_LUTCHEN) begin : g_dp
    ode_dp_lutchen #(.CROM_DEPTH(CROM_DEPTH)) u_dp (
      .clk, .rst_n, .in_valid(cw.compute), .opnd(rd_data[NRD-1:0]),
      .crom_addr(cw.crom_addr[CAW-1:0]), .crom_ld_en(crom_ld),
      .crom_ld_addr(cfg_addr[CAW-1:0]), .crom_ld_data(cfg_wdata[CROM_W-1:0]),
      .out_valid(dp_valid), .result(dp_result));
  end else if (MODEL == MODEL_WAVE) begin : g_dp
    ode_dp_wave #(.CROM_DEPTH(CROM_DEPTH)) u_dp (
      .clk, .rst_n, .in_valid(cw.compute), .opnd(rd_data[NRD-1:0]),
      .crom_addr(cw.crom_addr[CAW-1:0]), .crom_ld_en(crom_ld),
      .crom_ld_addr(cfg_addr[CAW-1:0]), .crom_ld_data(cfg_wdata[CROM_W-1:0]),
      .out_valid(dp_valid), .result(dp_result));
  end else if (MODEL == MODEL_WEIBEL) begin : g_dp
    ode_dp_weibel #(.CROM_DEPTH(CROM_DEPTH)) u_dp (
      .clk, .rst_n, .in_valid(cw.compute), .opnd(rd_data[NRD-1:0]),
      .crom_addr(cw.crom_addr[CAW-1:0]), .crom_ld_en(crom_ld),
      .crom_ld_addr(cfg_addr[CAW-1:0]), .crom_ld_data(cfg_wdata[CROM4_W-1:0]),
      .out_valid(dp_valid), .result(dp_result));
  end else if (MODEL == MODEL_NEURON) begin : g_dp
    ode_dp_neuron #(.CROM_DEPTH(CROM_DEPTH)) u_dp (
      .clk, .rst_n, .in_valid(cw.compute), .mode(cw.mode), .opnd(rd_data[NRD-1:0]),
      .crom_addr(cw.crom_addr[CAW-1:0]), .crom_ld_en(crom_ld),
      .crom_ld_addr(cfg_addr[CAW-1:0]), .crom_ld_data(cfg_wdata[CROM4_W-1:0]),
      .out_valid(dp_valid), .result(dp_result));
  end else begin : g_dp
    ode_dp_atrial #(.CROM_DEPTH(CROM_DEPTH)) u_dp (
      .clk, .rst_n, .in_valid(cw.compute), .opnd(rd_data[NRD-1:0]),
      .crom_addr(cw.crom_addr[CAW-1:0]), .crom_ld_en(crom_ld),
      .crom_ld_addr(cfg_addr[CAW-1:0]), .crom_ld_data(cfg_wdata[CROM_W-1:0]),
      .out_valid(dp_valid), .result(dp_result));
  end

  // output register towards the neighbours
  always_ff @(posedge clk) begin
    if (!rst_n)         dout <= '0;
    else if (cw.out_en) dout <= rd_data[0];
  end

  // A store of the datapath result must meet a finished compute.
  a_store_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (cw.wr_en && cw.in_sel == '0) |-> dp_valid);

endmodule
