// ode_pkg: types and constants shared by the custom processing element (PE)
// network that solves a homogeneous system of ODEs with an explicit Euler step.
//
// Every PE carries a small program of control words. A control word drives,
// in one cycle, the read addresses of the data RAM (one per operand of the
// custom ODE datapath), the constant-ROM address, the data-RAM write port and
// its input-mux select, the PE output register, the equation of a
// multi-ODE datapath and the synchronisation flags.
// Numbers are signed two's complement fixed point, W bits wide with FRAC
// fraction bits. The 32-bit word follows the document; the Q16.16 split, the
// field widths and the flag encoding are this design's own choices.
package ode_pkg;

  // Arithmetic
  localparam int W    = 32;            // fixed-point word width
  localparam int FRAC = 16;            // fraction bits (Q16.16)

  // Datapath operands: operand 0 is the variable being updated, 1..NRD-1 are
  // the variables it depends on. NRD = 7 covers the six neighbours of a cell
  // in the 3-D atrial model.
  localparam int NRD = 7;
  // Neighbour links per PE (3-D mesh: -x +x -y +y -z +z)
  localparam int NNB = 6;
  // Most links a PE can have: a tree PE has its parent and 8 children
  localparam int NLK_MAX = 9;
  // Input-mux inputs of a mesh PE: 0 = own datapath result, 1..NNB = links;
  // the select field is sized for the largest PE (inputs 0..NLK_MAX)
  localparam int NIN   = NNB + 1;
  localparam int SEL_W = $clog2(NLK_MAX + 1);

  // Number of PEs in a full fan-ary tree of lev levels
  function automatic int tree_size(int fan, int lev);
    int n = 0, k = 1;
    for (int l = 0; l < lev; l++) begin
      n += k;
      k *= fan;
    end
    return n;
  endfunction

  // Memory address widths (the RAM/ROM depths are 2**AW)
  localparam int DATA_AW = 7;          // data RAM, 128 words
  localparam int CROM_AW = 5;          // constant ROM, 32 entries
  localparam int INST_AW = 8;          // instruction RAM, 256 control words

  // Constants per ROM entry and pipeline depth of every ODE datapath
  localparam int NCONST  = 2;
  localparam int CROM_W  = NCONST * W;  // two constants per entry
  localparam int CROM4_W = 4 * W;       // four constants per entry (Weibel, neuron)
  localparam int DP_LAT = 4;           // compute-to-result latency in cycles

  typedef logic signed [W-1:0] word_t;

  // ODE datapath selected for a PE
  typedef enum logic [2:0] {
    MODEL_ATRIAL  = 3'd0,              // 3-D cardiac cell, 6 neighbours
    MODEL_LUTCHEN = 3'd1,              // linear airway, 2 neighbours
    MODEL_WAVE    = 3'd2,              // 2-D wave, 4 neighbours
    MODEL_WEIBEL  = 3'd3,              // binary-tree lung, volume and flow
    MODEL_NEURON  = 3'd4               // 2-D neuron mesh, V, W and S
  } model_e;

  // Equation selected by a compute of the neuron datapath (control-word mode)
  localparam logic [1:0] NEU_V = 2'd0;
  localparam logic [1:0] NEU_W = 2'd1;
  localparam logic [1:0] NEU_S = 2'd2;

  // One control word (one line of the instruction RAM)
  typedef struct packed {
    logic [NRD-1:0][DATA_AW-1:0] rd_addr;   // data-RAM read addresses
    logic [CROM_AW-1:0]          crom_addr; // constant-ROM address
    logic                        compute;   // operands are a real compute
    logic [1:0]                  mode;      // equation, for multi-ODE datapaths
    logic                        wr_en;     // store
    logic [DATA_AW-1:0]          wr_addr;   // store address
    logic [SEL_W-1:0]            in_sel;    // store source
    logic                        out_en;    // output rd_addr[0] to neighbours
    logic                        sync;      // barrier after this word
    logic                        step_end;  // last word of a time step (barrier)
    logic                        wrap;      // next word is address 0
  } ctrl_word_t;

  localparam int CW_W = $bits(ctrl_word_t);

  // Host configuration bus targets
  typedef enum logic [1:0] {
    CFG_INST = 2'd0,
    CFG_CROM = 2'd1,
    CFG_DATA = 2'd2
  } cfg_target_e;

  localparam int CFG_W = (CW_W > CROM4_W) ? CW_W : CROM4_W;

endpackage
