// ode_dp_neuron: custom ODE datapath for the neuron network model.
//
// Each neuron i has a membrane potential V, a gating variable W and a synaptic
// variable S:
//   V' = C1*V + W - C2*(V - C3)*sum_j S_j     (S_j: the neighbours' synapses)
//   W' = C4*W - V
//   S' = C5*(1 - S)*(V - C6) - C7*S
// The three equations share the datapath; the control word's mode field says
// which one a compute belongs to (NEU_V, NEU_W, NEU_S). With the time step h
// folded into the constants, one Euler step is
//   V: V + k1*V + k2*W - k3*(V - k4)*(S_1+S_2+S_3+S_4)   k = {h*C1, h, h*C2, C3}
//   W: W + k1*W - k2*V                                     k = {h*C4, h, -, -}
//   S: S + k1*(1 - S)*(V - k2) - k3*S                      k = {h*C5, C6, h*C7, -}
// Operands: opnd[0] = the variable updated; V: opnd[1] = W, opnd[2..5] = the
// four neighbours' S; W and S: opnd[1] = V. Sharing one datapath and the
// mode field are this design's choices; the equations are the document's.
// One result per cycle, valid DP_LAT = 4 cycles after the operands; Q16.16,
// each product shifted right by FRAC and truncated to W bits.
module ode_dp_neuron
  import ode_pkg::*;
#(
  parameter int CROM_DEPTH = 2**CROM_AW
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [1:0]                    mode,
  input  word_t [NRD-1:0]               opnd,
  input  logic [$clog2(CROM_DEPTH)-1:0] crom_addr,
  input  logic                          crom_ld_en,
  input  logic [$clog2(CROM_DEPTH)-1:0] crom_ld_addr,
  input  logic [CROM4_W-1:0]            crom_ld_data,
  output logic                          out_valid,
  output word_t                         result
);

  localparam word_t ONE = word_t'(1) <<< FRAC;

  function automatic word_t fmul(word_t a, word_t b);
    logic signed [2*W-1:0] full;
    full = a * b;
    return W'(full >>> FRAC);
  endfunction

  logic [CROM4_W-1:0] cword;
  pe_const_rom #(.DEPTH(CROM_DEPTH), .DW(CROM4_W)) u_crom (
    .clk, .rd_addr(crom_addr), .rd_data(cword),
    .ld_en(crom_ld_en), .ld_addr(crom_ld_addr), .ld_data(crom_ld_data)
  );
  word_t k1, k2, k3, k4;
  assign {k1, k2, k3, k4} = cword;

  logic [DP_LAT-1:0] vld;
  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[DP_LAT-2:0], in_valid};
  end
  assign out_valid = vld[DP_LAT-1];

  // stage 1: synapse sum and operand registers
  logic [1:0] m_s1, m_s2, m_s3;
  word_t x_s1, y_s1, ssum_s1;
  always_ff @(posedge clk) begin
    m_s1    <= mode;
    x_s1    <= opnd[0];
    y_s1    <= opnd[1];
    ssum_s1 <= opnd[2] + opnd[3] + opnd[4] + opnd[5];
  end

  // stage 2: first products and offsets (constants from the ROM)
  word_t x_s2, a_s2, b_s2, g_s2, t_s2;
  always_ff @(posedge clk) begin
    m_s2 <= m_s1;
    x_s2 <= x_s1;
    unique case (m_s1)
      NEU_V: begin
        a_s2 <= fmul(k1, x_s1);            // h*C1*V
        b_s2 <= fmul(k2, y_s1);            // h*W
        g_s2 <= fmul(k3, ssum_s1);         // h*C2*sum S
        t_s2 <= x_s1 - k4;                 // V - C3
      end
      NEU_W: begin
        a_s2 <= fmul(k1, x_s1);            // h*C4*W
        b_s2 <= -fmul(k2, y_s1);           // -h*V
        g_s2 <= '0;
        t_s2 <= '0;
      end
      default: begin                       // NEU_S
        a_s2 <= -fmul(k3, x_s1);           // -h*C7*S
        b_s2 <= '0;
        g_s2 <= fmul(k1, ONE - x_s1);      // h*C5*(1 - S)
        t_s2 <= y_s1 - k2;                 // V - C6
      end
    endcase
  end

  // stage 3: second product, linear terms summed
  word_t x_s3, q_s3, r_s3;
  always_ff @(posedge clk) begin
    m_s3 <= m_s2;
    x_s3 <= x_s2;
    q_s3 <= fmul(g_s2, t_s2);
    r_s3 <= a_s2 + b_s2;
  end

  // stage 4: Euler update (the V equation subtracts the coupling term)
  always_ff @(posedge clk)
    result <= (m_s3 == NEU_V) ? x_s3 + r_s3 - q_s3 : x_s3 + r_s3 + q_s3;

endmodule
