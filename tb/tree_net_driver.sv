// tree_net_driver: stimulus and checker for an ode_pe_network built as a tree
// (TREE = 1) of Weibel PEs, running a Weibel lung of G generations.
//
// The lung is a binary tree of 2**G - 1 branches in heap order: branch n has
// children 2n (left) and 2n+1 (right), parent n/2 and sibling n^1. Each branch
// has a volume V and a flow F. The FAN-ary PE tree of TLEV levels holds it in
// subtrees: an inner PE holds a subtree of DI = log2(FAN) generations, whose
// 2**(DI-1) bottom branches have the FAN child PEs' subtrees as children; a
// leaf PE holds the remaining DL = G - DI*(TLEV-1) generations. Child k of a
// PE whose subtree root is branch r has the subtree root r*FAN + k.
//
// Data RAM of a PE with R branches: two buffers of 2R words (V of local
// branch i at p*2R + i - 1, F at p*2R + R + i - 1), then halo words: the
// parent branch's F, the sibling's V, and the V of each child PE's subtree
// root. Program per step parity p: 2R computes reading buffer p (constants
// per variable and generation within the PE), each stored DP_LAT later into
// buffer 1-p, a barrier, then the transfer section, then step_end (wrap on
// parity 1). The transfer section has two phases:
//   upward:   slot 0, every PE outputs its subtree root's V; in slot k+1 each
//             parent stores it from child k;
//   downward: for each pair q of children (2q, 2q+1), the parent outputs the
//             F of their parent branch, then the V of child 2q, then the V of
//             child 2q+1; both children store the F, and each stores the
//             other's V as its sibling, one cycle after it is output.
// A value missing at the lung's boundary (the trachea's parent and sibling,
// the last generation's children) is replaced by the branch's own value.
// Checks every V and F after STEPS steps against a bit-exact reference, the
// cycle count and that each mechanism happened. Raises `finished` after its
// result line.
module tree_net_driver
  import ode_pkg::*;
#(
  parameter int FAN = 8, parameter int TLEV = 3, parameter int G = 11,
  parameter int STEPS = 3, parameter int SEED = 1,
  localparam int NPE = tree_size(FAN, TLEV),
  localparam int PEW = (NPE > 1) ? $clog2(NPE) : 1
) (
  input  logic               clk,
  output logic               rst_n,
  output logic               start,
  output logic [15:0]        num_steps,
  input  logic               busy,
  input  logic               done,
  output logic               cfg_we,
  output logic [PEW-1:0]     cfg_pe,
  output cfg_target_e        cfg_target,
  output logic [7:0]         cfg_addr,
  output logic [CFG_W-1:0]   cfg_wdata,
  output logic [PEW-1:0]     hrd_pe,
  output logic [DATA_AW-1:0] hrd_addr,
  input  word_t              hrd_data,
  input  logic [NPE-1:0]     at_sync,
  input  ctrl_word_t         pe1_cw,      // an inner PE (parent and child)
  output logic               finished
);

  localparam int DI = $clog2(FAN);
  localparam int DL = G - DI * (TLEV - 1);
  localparam int NB = 2**G - 1;
  localparam int NQ = FAN / 2;            // child pairs of an inner PE
  localparam int S0 = FAN + 1;            // first slot of the downward phase
  localparam int WATCHDOG = 400000 + 200 * NB;

  int checks = 0, failures = 0;
  int vref [NB + 1];
  int fref [NB + 1];
  int coef [NPE][2 * 8][4];               // per PE, (generation, variable)
  ctrl_word_t prog [NPE][$];
  int comp_len [NPE];
  int xfer_len [NPE];

  function automatic int lvl_of(int pe);
    int l = 0;
    while (pe >= tree_size(FAN, l + 1)) l++;
    return l;
  endfunction
  function automatic bit is_leaf(int pe);
    return lvl_of(pe) == TLEV - 1;
  endfunction
  function automatic int depth(int pe);
    return is_leaf(pe) ? DL : DI;
  endfunction
  function automatic int nbr(int pe);       // branches held by the PE
    return 2**depth(pe) - 1;
  endfunction
  function automatic int sroot(int pe);     // global subtree root
    if (pe == 0) return 1;
    return sroot((pe - 1) / FAN) * FAN + (pe - 1) % FAN;
  endfunction
  function automatic int llev(int i);       // generation of local branch i, from 0
    return $clog2(i + 1) - 1;
  endfunction
  function automatic int glob(int pe, int i);
    int l;
    l = llev(i);
    return sroot(pe) * 2**l + (i - 2**l);
  endfunction
  function automatic int vaddr(int pe, int p, int m, int i);
    return p * 2 * nbr(pe) + m * nbr(pe) + i - 1;
  endfunction
  function automatic int h_fp(int pe);
    return 4 * nbr(pe);
  endfunction
  function automatic int h_vs(int pe);
    return 4 * nbr(pe) + 1;
  endfunction
  function automatic int h_vc(int pe, int k);
    return 4 * nbr(pe) + 2 + k;
  endfunction
  // PE and local branch of global branch n
  function automatic void locate(int n, output int pe, output int i);
    pe = 0;
    i = n;
    while (1) begin
      int r, l, d;
      r = sroot(pe);
      d = depth(pe);
      // depth of n below r
      l = $clog2(n + 1) - $clog2(r + 1);
      if (l < d) begin
        i = 2**l + (n - r * 2**l);
        return;
      end
      // descend to the child PE whose subtree holds n
      pe = FAN * pe + 1 + ((n >> (l - d)) - r * FAN);
    end
  endfunction

  function automatic void gen_prog(int pe);
    ctrl_word_t w;
    ctrl_word_t tw [];
    int r, last, k, q, b;
    bit has_par, has_ch;
    r = nbr(pe);
    has_par = (pe > 0);
    has_ch  = !is_leaf(pe);
    k = (pe - 1) % FAN;
    q = k / 2;
    b = k % 2;
    prog[pe] = {};
    for (int p = 0; p < 2; p++) begin
      for (int t = 0; t < 2 * r + DP_LAT; t++) begin
        w = '0;
        if (t < 2 * r) begin
          int m, i, a_v, a_f, a1, a2, a3, a4;
          m = t / r;
          i = t % r + 1;
          a_v = vaddr(pe, p, 0, i);
          a_f = vaddr(pe, p, 1, i);
          w.compute   = 1'b1;
          w.crom_addr = CROM_AW'(2 * llev(i) + m);
          if (m == 0) begin
            // V: F_parent, V_sib, V, F
            if (i > 1)        a1 = vaddr(pe, p, 1, i / 2);
            else if (has_par) a1 = h_fp(pe);
            else              a1 = a_f;
            if (i > 1)        a2 = vaddr(pe, p, 0, i ^ 1);
            else if (has_par) a2 = h_vs(pe);
            else              a2 = a_v;
            a3 = a_v;
            a4 = a_f;
            w.rd_addr[0] = DATA_AW'(a_v);
          end else begin
            // F: V, F, V_right, V_left
            a1 = a_v;
            a2 = a_f;
            if (2 * i <= r) begin
              a3 = vaddr(pe, p, 0, 2 * i + 1);
              a4 = vaddr(pe, p, 0, 2 * i);
            end else if (has_ch) begin
              int c;
              c = 2 * (i - 2**(depth(pe) - 1));   // child PE of the left child
              a3 = h_vc(pe, c + 1);
              a4 = h_vc(pe, c);
            end else begin
              a3 = a_v;
              a4 = a_v;
            end
            w.rd_addr[0] = DATA_AW'(a_f);
          end
          w.rd_addr[1] = DATA_AW'(a1);
          w.rd_addr[2] = DATA_AW'(a2);
          w.rd_addr[3] = DATA_AW'(a3);
          w.rd_addr[4] = DATA_AW'(a4);
        end
        if (t >= DP_LAT) begin
          int m, i;
          m = (t - DP_LAT) / r;
          i = (t - DP_LAT) % r + 1;
          w.wr_en   = 1'b1;
          w.wr_addr = DATA_AW'(vaddr(pe, 1 - p, m, i));
          w.in_sel  = '0;
        end
        if (t == 2 * r + DP_LAT - 1) w.sync = 1'b1;
        prog[pe].push_back(w);
      end
      comp_len[pe] = 2 * r + DP_LAT;
      // transfer section
      tw = new[S0 + 3 * NQ + 1];
      foreach (tw[j]) tw[j] = '0;
      last = 0;
      if (has_par) begin
        tw[0].out_en     = 1'b1;
        tw[0].rd_addr[0] = DATA_AW'(vaddr(pe, 1 - p, 0, 1));
        // downward stores from the parent (mux input 1)
        tw[S0 + 3 * q + 1].wr_en   = 1'b1;
        tw[S0 + 3 * q + 1].wr_addr = DATA_AW'(h_fp(pe));
        tw[S0 + 3 * q + 1].in_sel  = SEL_W'(1);
        tw[S0 + 3 * q + 3 - b].wr_en   = 1'b1;
        tw[S0 + 3 * q + 3 - b].wr_addr = DATA_AW'(h_vs(pe));
        tw[S0 + 3 * q + 3 - b].in_sel  = SEL_W'(1);
        last = S0 + 3 * q + 3 - b;
      end
      if (has_ch) begin
        for (int c = 0; c < FAN; c++) begin
          tw[c + 1].wr_en   = 1'b1;
          tw[c + 1].wr_addr = DATA_AW'(h_vc(pe, c));
          tw[c + 1].in_sel  = SEL_W'(2 + c);
        end
        for (int qq = 0; qq < NQ; qq++) begin
          tw[S0 + 3 * qq].out_en         = 1'b1;
          tw[S0 + 3 * qq].rd_addr[0]     = DATA_AW'(vaddr(pe, 1 - p, 1, 2**(depth(pe) - 1) + qq));
          tw[S0 + 3 * qq + 1].out_en     = 1'b1;
          tw[S0 + 3 * qq + 1].rd_addr[0] = DATA_AW'(h_vc(pe, 2 * qq));
          tw[S0 + 3 * qq + 2].out_en     = 1'b1;
          tw[S0 + 3 * qq + 2].rd_addr[0] = DATA_AW'(h_vc(pe, 2 * qq + 1));
        end
        if (S0 + 3 * NQ - 1 > last) last = S0 + 3 * NQ - 1;
      end
      tw[last].step_end = 1'b1;
      tw[last].wrap     = (p == 1);
      for (int j = 0; j <= last; j++) prog[pe].push_back(tw[j]);
      xfer_len[pe] = last + 1;
    end
  endfunction

  function automatic int fm(int a, int x);
    return int'((longint'(a) * longint'(x)) >>> FRAC);
  endfunction

  function automatic void ref_step();
    int nv [NB + 1];
    int nf [NB + 1];
    for (int n = 1; n <= NB; n++) begin
      int pe, i, l, fp, vs, vr, vl;
      locate(n, pe, i);
      l = llev(i);
      fp = (n > 1) ? fref[n / 2] : fref[n];
      vs = (n > 1) ? vref[n ^ 1] : vref[n];
      vr = (2 * n <= NB) ? vref[2 * n + 1] : vref[n];
      vl = (2 * n <= NB) ? vref[2 * n] : vref[n];
      nv[n] = vref[n] + fm(coef[pe][2*l][0], fp) + fm(coef[pe][2*l][1], vs)
                      + fm(coef[pe][2*l][2], vref[n]) + fm(coef[pe][2*l][3], fref[n]);
      nf[n] = fref[n] + fm(coef[pe][2*l+1][0], vref[n]) + fm(coef[pe][2*l+1][1], fref[n])
                      + fm(coef[pe][2*l+1][2], vr) + fm(coef[pe][2*l+1][3], vl);
    end
    vref = nv;
    fref = nf;
  endfunction

  task automatic cfg_write(int pe, cfg_target_e tg, int addr, logic [CFG_W-1:0] data);
    @(negedge clk);
    cfg_we = 1'b1; cfg_pe = PEW'(pe); cfg_target = tg;
    cfg_addr = 8'(addr); cfg_wdata = data;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters, on PE 1 (has a parent and, with TLEV > 2, children)
  int n_compute = 0, n_selfstore = 0, n_upstore = 0, n_downstore = 0, n_output = 0;
  int n_wrap = 0, n_barrier = 0, n_barrier_wait = 0, n_busy = 0;
  always @(negedge clk) if (rst_n) begin
    if (pe1_cw.compute) n_compute++;
    if (pe1_cw.wr_en && pe1_cw.in_sel == '0) n_selfstore++;
    if (pe1_cw.wr_en && pe1_cw.in_sel == SEL_W'(1)) n_downstore++;
    if (pe1_cw.wr_en && pe1_cw.in_sel > SEL_W'(1)) n_upstore++;
    if (pe1_cw.out_en) n_output++;
    if (pe1_cw.wrap) n_wrap++;
    if (&at_sync) n_barrier++;
    if (|at_sync && !(&at_sync)) n_barrier_wait++;
    if (busy) n_busy++;
  end

  initial begin
    finished = 1'b0;
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    finished = 1'b1;
  end

  initial begin
    int seed_dummy, step_cycles, cmax, xmax;
    seed_dummy = $urandom(SEED);
    rst_n = 1'b0; start = 1'b0; num_steps = 16'(STEPS);
    cfg_we = 1'b0; cfg_pe = '0; cfg_target = CFG_INST; cfg_addr = '0; cfg_wdata = '0;
    hrd_pe = '0; hrd_addr = '0;
    for (int n = 0; n <= NB; n++) begin
      vref[n] = int'($urandom_range(0, 2**20)) - 2**19;
      fref[n] = int'($urandom_range(0, 2**20)) - 2**19;
    end
    // small coefficients (|a| <= 1/16), as h times the branch constants
    for (int pe = 0; pe < NPE; pe++)
      for (int e = 0; e < 16; e++)
        for (int j = 0; j < 4; j++)
          coef[pe][e][j] = int'($urandom_range(0, 2**13)) - 2**12;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int pe = 0; pe < NPE; pe++) begin
      gen_prog(pe);
      if (prog[pe].size() > 2**INST_AW) $fatal(1, "program too long");
      if ((is_leaf(pe) ? h_vs(pe) + 1 : h_vc(pe, FAN)) > 2**DATA_AW) $fatal(1, "data RAM too small");
      for (int i = 0; i < prog[pe].size(); i++)
        cfg_write(pe, CFG_INST, i, CFG_W'(prog[pe][i]));
      for (int e = 0; e < 2 * depth(pe); e++)
        cfg_write(pe, CFG_CROM, e, CFG_W'({coef[pe][e][0], coef[pe][e][1], coef[pe][e][2], coef[pe][e][3]}));
      for (int i = 1; i <= nbr(pe); i++) begin
        cfg_write(pe, CFG_DATA, vaddr(pe, 0, 0, i), CFG_W'(vref[glob(pe, i)]));
        cfg_write(pe, CFG_DATA, vaddr(pe, 0, 1, i), CFG_W'(fref[glob(pe, i)]));
      end
      // halos: initial values of the branches next to the subtree
      if (pe > 0) begin
        int r;
        r = sroot(pe);
        cfg_write(pe, CFG_DATA, h_fp(pe), CFG_W'(fref[r / 2]));
        cfg_write(pe, CFG_DATA, h_vs(pe), CFG_W'(vref[r ^ 1]));
      end
      if (!is_leaf(pe))
        for (int c = 0; c < FAN; c++)
          cfg_write(pe, CFG_DATA, h_vc(pe, c), CFG_W'(vref[sroot(FAN * pe + 1 + c)]));
    end

    cmax = 0; xmax = 0;
    for (int pe = 0; pe < NPE; pe++) begin
      if (comp_len[pe] > cmax) cmax = comp_len[pe];
      if (xfer_len[pe] > xmax) xmax = xfer_len[pe];
    end
    step_cycles = cmax + 1 + xmax + 1;

    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (done);
    repeat (2) @(negedge clk);
    check(!busy, "network idle after done");
    check(n_busy == STEPS * step_cycles,
          $sformatf("busy cycles %0d, expected %0d", n_busy, STEPS * step_cycles));

    for (int s = 0; s < STEPS; s++) ref_step();
    for (int pe = 0; pe < NPE; pe++)
      for (int i = 1; i <= nbr(pe); i++) begin
        int n;
        n = glob(pe, i);
        @(negedge clk);
        hrd_pe = PEW'(pe); hrd_addr = DATA_AW'(vaddr(pe, STEPS % 2, 0, i));
        #1;
        check(hrd_data == vref[n], $sformatf("branch %0d V: got %0d expected %0d", n, hrd_data, vref[n]));
        hrd_addr = DATA_AW'(vaddr(pe, STEPS % 2, 1, i));
        #1;
        check(hrd_data == fref[n], $sformatf("branch %0d F: got %0d expected %0d", n, hrd_data, fref[n]));
      end

    $display("steps=%0d cycles/step=%0d computes=%0d self-stores=%0d stores-from-children=%0d stores-from-parent=%0d outputs=%0d wraps=%0d barriers=%0d barrier-wait-cycles=%0d",
             STEPS, n_busy / STEPS, n_compute, n_selfstore, n_upstore, n_downstore, n_output,
             n_wrap, n_barrier, n_barrier_wait);
    check(n_compute > 0,      "compute happened");
    check(n_selfstore > 0,    "store of own result happened");
    check(n_upstore > 0,      "store from a child happened");
    check(n_downstore > 0,    "store from the parent happened");
    check(n_output > 0,       "output happened");
    check(n_wrap > 0,         "program wrap happened");
    check(n_barrier > 0,      "barrier release happened");
    check(n_barrier_wait > 0, "a PE waited at a barrier");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    finished = 1'b1;
  end

endmodule
