// ode_dp_weibel: custom ODE datapath for the Weibel lung model.
//
// Each branch i of the binary airway tree has a volume V_i and a flow F_i:
//   V_i' = F_parent*C1 + (V_sib - V_i)*C2 + F_i
//   F_i' = V_i*C3 - F_i*C4 - (V_Rchild - V_Lchild)*C5 - V_Rchild*C6 - F_i*C7
// Both right-hand sides are linear in four stored values, so one Euler step of
// either equation has the same form,
//   X(t+1) = X + a1*opnd[1] + a2*opnd[2] + a3*opnd[3] + a4*opnd[4],
// with the time step and the branch's constants folded into a1..a4:
//   V: opnd = {V_i, F_parent, V_sib, V_i, F_i},    a = {h*C1, h*C2, -h*C2, h}
//   F: opnd = {F_i, V_i, F_i, V_Rchild, V_Lchild}, a = {h*C3, -h*(C4+C7), -h*(C5+C6), h*C5}
// One datapath therefore serves both variables of a branch; which is which is
// only a matter of the read addresses and the constant entry. This folding is
// this design's choice; the equations are the document's.
//
// Interface: as the other datapaths, but a constant entry holds four W-bit
// coefficients {a1, a2, a3, a4} (a1 in the top word). One result per cycle,
// valid DP_LAT = 4 cycles after the operands; Q16.16, each product shifted
// right by FRAC and truncated to W bits, sums wrap at W bits.
module ode_dp_weibel
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
  input  logic [CROM4_W-1:0]            crom_ld_data,
  output logic                          out_valid,
  output word_t                         result
);

  logic [CROM4_W-1:0] cword;
  pe_const_rom #(.DEPTH(CROM_DEPTH), .DW(CROM4_W)) u_crom (
    .clk, .rd_addr(crom_addr), .rd_data(cword),
    .ld_en(crom_ld_en), .ld_addr(crom_ld_addr), .ld_data(crom_ld_data)
  );

  logic [DP_LAT-1:0] vld;
  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[DP_LAT-2:0], in_valid};
  end
  assign out_valid = vld[DP_LAT-1];

  // stage 1: register the operands (the ROM is read in parallel)
  word_t x_s1;
  word_t o_s1 [4];
  always_ff @(posedge clk) begin
    x_s1 <= opnd[0];
    for (int k = 0; k < 4; k++) o_s1[k] <= opnd[k+1];
  end

  // stage 2: four products
  word_t x_s2;
  word_t p_s2 [4];
  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++) begin
      logic signed [2*W-1:0] full;
      full    = o_s1[k] * $signed(cword[CROM4_W-1-k*W -: W]);
      p_s2[k] <= W'(full >>> FRAC);
    end
    x_s2 <= x_s1;
  end

  // stage 3: pair sums
  word_t x_s3, s01_s3, s23_s3;
  always_ff @(posedge clk) begin
    s01_s3 <= p_s2[0] + p_s2[1];
    s23_s3 <= p_s2[2] + p_s2[3];
    x_s3   <= x_s2;
  end

  // stage 4: Euler update
  always_ff @(posedge clk) result <= x_s3 + s01_s3 + s23_s3;

endmodule
