// ode_dp_atrial: custom ODE datapath for the atrial cell model.
//
// Computes one explicit Euler step of the cell membrane equation
//   dV_i/dt = (-I_tot + G * sum_j (V_j - V_i)) / C_i
// folded, with the time step h, into
//   V_i(t+1) = V_i - K * sum_j (V_i - V_j) - Ioff,   K = G*h/C_i, Ioff = I_tot*h/C_i.
// The pipeline follows the document's datapath figure: a row of subtractors
// (V_i - V_j, one per neighbour), an adder, a multiplier fed by the constant
// ROM, and a final subtractor fed by V_i carried down the side. The
// ionic-current term is taken in the final subtractor, and the adder sums all
// six differences in one stage; both are this design's choices.
//
// Interface: opnd[0] = V_i, opnd[1..6] = neighbours (a missing neighbour is
// given V_i itself, which adds a zero difference). crom_addr selects the
// variable's {K, Ioff} entry (K in bits [2W-1:W]). Fully pipelined, one
// result per cycle, result valid DP_LAT = 4 cycles after the operands.
// Arithmetic: Q16.16; the product is shifted right arithmetically by FRAC and
// truncated to W bits, all sums wrap at W bits at the output.
module ode_dp_atrial
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

  localparam int NB = 6;               // neighbours used
  localparam int SW = W + 4;           // width of the sum of six differences

  logic [CROM_W-1:0] cword;
  pe_const_rom #(.DEPTH(CROM_DEPTH), .DW(CROM_W)) u_crom (
    .clk, .rd_addr(crom_addr), .rd_data(cword),
    .ld_en(crom_ld_en), .ld_addr(crom_ld_addr), .ld_data(crom_ld_data)
  );

  // valid pipe
  logic [DP_LAT-1:0] vld;
  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[DP_LAT-2:0], in_valid};
  end
  assign out_valid = vld[DP_LAT-1];

  // stage 1: differences
  logic signed [W:0] diff_s1 [NB];
  word_t             v_s1;
  always_ff @(posedge clk) begin
    for (int j = 0; j < NB; j++) diff_s1[j] <= opnd[0] - opnd[j+1];
    v_s1 <= opnd[0];
  end

  // stage 2: sum; constants arrive from the ROM
  logic signed [SW-1:0] sum_s2;
  word_t v_s2, k_s2, ioff_s2;
  always_ff @(posedge clk) begin
    logic signed [SW-1:0] acc;
    acc = '0;
    for (int j = 0; j < NB; j++) acc += SW'(diff_s1[j]);
    sum_s2  <= acc;
    v_s2    <= v_s1;
    k_s2    <= cword[CROM_W-1 -: W];
    ioff_s2 <= cword[W-1:0];
  end

  // stage 3: multiply by the coupling constant
  word_t prod_s3, v_s3, ioff_s3;
  logic signed [SW+W-1:0] prod_full;
  assign prod_full = sum_s2 * k_s2;
  always_ff @(posedge clk) begin
    prod_s3 <= W'(prod_full >>> FRAC);
    v_s3    <= v_s2;
    ioff_s3 <= ioff_s2;
  end

  // stage 4: final subtraction
  always_ff @(posedge clk) result <= v_s3 - prod_s3 - ioff_s3;

endmodule
