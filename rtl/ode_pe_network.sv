// ode_pe_network: a network of custom PEs that emulates a physical system.
//
// The ODE dependency graph of the model is partitioned into blocks of
// neighbouring variables; each block lives in one PE. Here the PEs sit on an
// NX x NY x NZ mesh with a point-to-point link to each of their six mesh
// neighbours (NZ = 1 gives a 2-D mesh, NY = NZ = 1 a line), all on one global
// clock. The default 5 x 5 x 5 network of atrial PEs matches the document's
// 125-PE build of the 15 x 15 x 15 atrial cell model (27 cells per PE).
//
// A time step runs as in the document: every PE computes and stores its
// resident variables, all PEs meet at a barrier, PEs output updated boundary
// values which neighbours store into their local copies, and all PEs meet
// again before the next step. The schedule is static and comes from the
// programs loaded into the PEs; the hardware only supplies the barrier:
// all_sync is the AND of every PE's at_sync.
//
// Links: PE (x,y,z) receives on mux input 1 the output of (x-1,y,z), on 2
// (x+1,y,z), on 3 (x,y-1,z), on 4 (x,y+1,z), on 5 (x,y,z-1) and on 6
// (x,y,z+1); inputs with no neighbour read zero. PE index = x + NX*(y + NY*z).
//
// With TREE = 1 the PEs form a FAN-ary tree of TLEV levels instead (NX, NY
// and NZ are then unused), the shape the document uses for the Weibel lung:
// a root PE, 8 middle PEs and 64 leaf PEs, each holding a subtree of the
// lung's binary tree. PE p (root 0, then level by level) receives its
// parent's output, (p-1)/FAN, on mux input 1, and the output of its children
// FAN*p+1 .. FAN*p+FAN on inputs 2 .. FAN+1. Each PE's output goes to its
// parent and all its children; siblings exchange values through the parent.
//
// Host side: cfg_* writes one word of one PE's instruction RAM, constant ROM
// or data RAM (only while idle); hrd_* reads a data-RAM word of any PE
// combinationally; start (pulse) runs num_steps time steps, busy is high
// meanwhile and done pulses at the end. Mesh shape, link numbering and the
// host ports are this design's choices.
module ode_pe_network
  import ode_pkg::*;
#(
  parameter model_e MODEL = MODEL_ATRIAL,
  parameter int     NX    = 5,
  parameter int     NY    = 5,
  parameter int     NZ    = 5,
  parameter bit     TREE  = 1'b0,
  parameter int     FAN   = 8,
  parameter int     TLEV  = 3,
  localparam int    NPE   = TREE ? tree_size(FAN, TLEV) : NX * NY * NZ,
  localparam int    PEW   = (NPE > 1) ? $clog2(NPE) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [15:0]        num_steps,
  output logic               busy,
  output logic               done,
  input  logic               cfg_we,
  input  logic [PEW-1:0]     cfg_pe,
  input  cfg_target_e        cfg_target,
  input  logic [7:0]         cfg_addr,
  input  logic [CFG_W-1:0]   cfg_wdata,
  input  logic [PEW-1:0]     hrd_pe,
  input  logic [DATA_AW-1:0] hrd_addr,
  output word_t              hrd_data
);

  word_t [NPE-1:0] dout;
  word_t [NPE-1:0] hdata;
  logic  [NPE-1:0] at_sync, pe_busy, pe_done;
  logic            all_sync;

  assign all_sync = &at_sync;
  assign busy     = |pe_busy;
  assign done     = |pe_done;
  assign hrd_data = hdata[hrd_pe];

  if (TREE) begin : g_tree
    for (genvar p = 0; p < NPE; p++) begin : g_p
      word_t [FAN:0] din;
      if (p > 0) begin : g_par
        assign din[0] = dout[(p - 1) / FAN];
      end else begin : g_nopar
        assign din[0] = '0;
      end
      for (genvar k = 0; k < FAN; k++) begin : g_c
        if (FAN * p + 1 + k < NPE) begin : g_ch
          assign din[k + 1] = dout[FAN * p + 1 + k];
        end else begin : g_noch
          assign din[k + 1] = '0;
        end
      end

      custom_pe #(.MODEL(MODEL), .NL(FAN + 1)) u_pe (
        .clk, .rst_n, .start, .num_steps, .all_sync,
        .at_sync(at_sync[p]), .busy(pe_busy[p]), .done(pe_done[p]),
        .din, .dout(dout[p]),
        .cfg_we(cfg_we && cfg_pe == PEW'(p)), .cfg_target, .cfg_addr, .cfg_wdata,
        .hrd_addr, .hrd_data(hdata[p])
      );
    end
  end else begin : g_mesh
    for (genvar z = 0; z < NZ; z++) begin : g_z
      for (genvar y = 0; y < NY; y++) begin : g_y
        for (genvar x = 0; x < NX; x++) begin : g_x
          localparam int P = x + NX * (y + NY * z);
          word_t [NNB-1:0] din;

          assign din[0] = (x > 0)      ? dout[P - 1]       : '0;
          assign din[1] = (x < NX - 1) ? dout[P + 1]       : '0;
          assign din[2] = (y > 0)      ? dout[P - NX]      : '0;
          assign din[3] = (y < NY - 1) ? dout[P + NX]      : '0;
          assign din[4] = (z > 0)      ? dout[P - NX * NY] : '0;
          assign din[5] = (z < NZ - 1) ? dout[P + NX * NY] : '0;

          custom_pe #(.MODEL(MODEL)) u_pe (
            .clk, .rst_n, .start, .num_steps, .all_sync,
            .at_sync(at_sync[P]), .busy(pe_busy[P]), .done(pe_done[P]),
            .din, .dout(dout[P]),
            .cfg_we(cfg_we && cfg_pe == PEW'(P)), .cfg_target, .cfg_addr, .cfg_wdata,
            .hrd_addr, .hrd_data(hdata[P])
          );
        end
      end
    end
  end

  // a tree PE has a parent and FAN children
  if (TREE) begin : g_chk
    initial assert (FAN + 1 <= NLK_MAX) else $error("FAN too large for the select field");
  end

endmodule
