// ode_dp_wave: custom datapath for the 2-D wave model.
//
// Each mesh node follows the explicit finite-difference update
//   U(t+1) = C1*(U_n + U_s + U_w + U_e) + C2*U - U(t-1)
// Stages: two pair adders, a sum, two multipliers with constants from the
// ROM, and a final add/subtract that takes U(t-1) carried along. The stage
// split is this design's choice, made to share the 4-cycle latency and the
// port list of the other datapaths.
//
// Interface: opnd[0] = U, opnd[1..4] = the four neighbours, opnd[5] = U(t-1);
// opnd[6] is ignored. The ROM entry holds {C1, C2} (C1 in the upper word).
// One result per cycle, valid DP_LAT = 4 cycles after the operands; Q16.16.
module ode_dp_wave
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

  // stage 1: pair sums of the neighbours
  logic signed [W:0] s01_s1, s23_s1;
  word_t u_s1, up_s1;
  always_ff @(posedge clk) begin
    s01_s1 <= opnd[1] + opnd[2];
    s23_s1 <= opnd[3] + opnd[4];
    u_s1   <= opnd[0];
    up_s1  <= opnd[5];
  end

  // stage 2: neighbour sum; constants arrive from the ROM
  logic signed [W+1:0] sum_s2;
  word_t u_s2, up_s2, c1_s2, c2_s2;
  always_ff @(posedge clk) begin
    sum_s2 <= s01_s1 + s23_s1;
    u_s2   <= u_s1;
    up_s2  <= up_s1;
    c1_s2  <= cword[CROM_W-1 -: W];
    c2_s2  <= cword[W-1:0];
  end

  // stage 3: products
  word_t p1_s3, p2_s3, up_s3;
  logic signed [2*W+1:0] p1_full;
  logic signed [2*W-1:0] p2_full;
  assign p1_full = sum_s2 * c1_s2;
  assign p2_full = u_s2 * c2_s2;
  always_ff @(posedge clk) begin
    p1_s3 <= W'(p1_full >>> FRAC);
    p2_s3 <= W'(p2_full >>> FRAC);
    up_s3 <= up_s2;
  end

  // stage 4: combine with the previous value
  always_ff @(posedge clk) result <= p1_s3 + p2_s3 - up_s3;

endmodule
