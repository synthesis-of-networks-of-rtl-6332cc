// ode_dp_lutchen: custom ODE datapath for the Lutchen airway model.
//
// The gas cells form a line; cell i obeys
//   V_i' = C1 * (C2*V_{i-1} - C3*V_{i+1} + (C3 - C2)*V_i)
// which, after one Euler step of size h, is rewritten here as
//   V_i(t+1) = V_i + Ka*(V_{i-1} - V_i) - Kb*(V_{i+1} - V_i),
//   Ka = h*C1*C2, Kb = h*C1*C3.
// Stages: subtract, two multipliers with constants from the ROM, subtract,
// final add with V_i carried along. The stage split is this design's choice,
// made to share the 4-cycle latency and the port list of the other datapaths.
//
// Interface: opnd[0] = V_i, opnd[1] = V_{i-1}, opnd[2] = V_{i+1}; other
// operands are ignored. The ROM entry holds {Ka, Kb} (Ka in the upper word).
// One result per cycle, valid DP_LAT = 4 cycles after the operands; Q16.16.
module ode_dp_lutchen
  import ode_pkg::*;
#(
  parameter int CROM_DEPTH = 2**CROM_AW
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  word_t [NRD-1:0]               opnd,
  input  logic [$clog2(CROM_DEPTH)-1:0] crom_addr,
  input  logic                          crom_ld_en,
  input  logic [$clog2(CROM_DEPTH)-1:0] crom_ld_addr,
  input  logic [CROM_W-1:0]             crom_ld_data,
  output logic                          out_valid,
  output word_t                         result
);

  logic [CROM_W-1:0] cword;
  pe_const_rom #(.DEPTH(CROM_DEPTH), .DW(CROM_W)) u_crom (
    .clk, .rd_addr(crom_addr), .rd_data(cword),
    .ld_en(crom_ld_en), .ld_addr(crom_ld_addr), .ld_data(crom_ld_data)
  );

  logic [DP_LAT-1:0] vld;
  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[DP_LAT-2:0], in_valid};
  end
  assign out_valid = vld[DP_LAT-1];

  // stage 1: differences to the two neighbours
  logic signed [W:0] dm_s1, dp_s1;
  word_t v_s1;
  always_ff @(posedge clk) begin
    dm_s1 <= opnd[1] - opnd[0];
    dp_s1 <= opnd[2] - opnd[0];
    v_s1  <= opnd[0];
  end

  // stage 2: scale by the two constants
  word_t ka, kb, pa_s2, pb_s2, v_s2;
  logic signed [2*W:0] pa_full, pb_full;
  assign ka = cword[CROM_W-1 -: W];
  assign kb = cword[W-1:0];
  assign pa_full = dm_s1 * ka;
  assign pb_full = dp_s1 * kb;
  always_ff @(posedge clk) begin
    pa_s2 <= W'(pa_full >>> FRAC);
    pb_s2 <= W'(pb_full >>> FRAC);
    v_s2  <= v_s1;
  end

  // stage 3: combine the two flows
  word_t d_s3, v_s3;
  always_ff @(posedge clk) begin
    d_s3 <= pa_s2 - pb_s2;
    v_s3 <= v_s2;
  end

  // stage 4: Euler update
  always_ff @(posedge clk) result <= v_s3 + d_s3;

endmodule
