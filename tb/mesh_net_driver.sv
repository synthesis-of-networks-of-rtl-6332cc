// mesh_net_driver: stimulus and checker for an ode_pe_network on a mesh model
// (atrial: 3-D, six neighbours; Lutchen: a line; wave and neuron: 2-D, four
// neighbours).
//
// Acts as the off-line compiler plus host. For an NX x NY x NZ mesh of PEs with
// BX x BY x BZ cells per PE (a model of NX*BX x NY*BY x NZ*BZ cells) it
//   - partitions the cells into blocks, lays out each PE's data RAM
//     (two buffers of resident cells, then one halo face per link direction),
//   - schedules every PE's program: computes in cell order, the stores
//     DP_LAT cycles later into the other buffer, a barrier, then one transfer
//     phase per used link direction (one output per face cell, every receiver storing
//     the value one cycle after it is output), and a closing barrier;
//     two time steps (one per buffer parity) form the program, which wraps,
//   - loads programs, constants and initial values, runs STEPS steps,
//   - checks every cell against a bit-exact reference of the model's update,
//     the cycle count per step, and that each mechanism happened.
// Trailing idle words of a PE's transfer phase are dropped, so PEs reach the
// closing barrier at different times and the barrier really has to wait.
// It raises `finished` after printing its result line; the bench then calls
// $finish. A neighbour missing at the model boundary is replaced by the cell itself.
// The wave model keeps U(t-1) in the buffer the new value is written to: each
// cell reads its own U(t-1) there before its store overwrites it.
// The neuron model has three variables per cell (V, W, S), stored as three
// planes of each buffer; each step computes all of them (the control word's
// mode field picks the equation) and only S is sent over the links. Its
// constants are one entry per equation and PE (entries 0..2), so that a
// block of more than 10 neurons still fits the constant ROM.
module mesh_net_driver
  import ode_pkg::*;
#(
  parameter model_e MODEL = MODEL_ATRIAL,
  parameter int NX = 2, parameter int NY = 2, parameter int NZ = 2,
  parameter int BX = 2, parameter int BY = 2, parameter int BZ = 2,
  parameter int STEPS = 3, parameter int SEED = 1,
  localparam int NPE = NX * NY * NZ,
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
  input  ctrl_word_t         pe0_cw,
  output logic               finished     // TB_RESULT printed; the bench ends
);

  localparam int R  = BX * BY * BZ;
  localparam bit NEU = (MODEL == MODEL_NEURON);
  localparam int NV  = NEU ? 3 : 1;      // variables per cell
  localparam int XV  = NEU ? 2 : 0;      // the variable sent to neighbours
  localparam int RW  = R * NV;           // words per buffer
  localparam int GX = NX * BX, GY = NY * BY, GZ = NZ * BZ;
  localparam int NCELL = GX * GY * GZ;
  // face size per direction; an axis with one PE has no links
  localparam int FX = (NX > 1) ? BY * BZ : 0;
  localparam int FY = (NY > 1) ? BX * BZ : 0;
  localparam int FZ = (NZ > 1) ? BX * BY : 0;
  localparam int FT = 2 * (FX + FY + FZ);
  localparam int STEP_CYCLES = RW + DP_LAT + 1 + FT + 1 + 1;
  localparam int WATCHDOG = 200000 + 40 * NCELL + STEPS * STEP_CYCLES * 2;

  int checks = 0, failures = 0;

  const int DXV[6] = '{-1, 1, 0, 0, 0, 0};
  const int DYV[6] = '{0, 0, -1, 1, 0, 0};
  const int DZV[6] = '{0, 0, 0, 0, -1, 1};

  int          vref [NCELL];
  int          kc   [NCELL];
  int          ic   [NCELL];
  int          wref [NCELL];             // neuron W
  int          sref [NCELL];             // neuron S
  int          nk   [NPE][3][4];         // neuron constants per PE and equation
  ctrl_word_t  prog [NPE][$];

  function automatic int gidx(int x, int y, int z);
    return x + GX * (y + GY * z);
  endfunction
  function automatic int bufaddr(int p, int r);
    return p * RW + r;
  endfunction
  // variable m of local cell r in buffer p
  function automatic int vaddr(int p, int m, int r);
    return p * RW + m * R + r;
  endfunction
  function automatic int fsize(int d);
    return (d < 2) ? FX : (d < 4) ? FY : FZ;
  endfunction
  // first word of direction d in the halo area, and first slot of its phase
  function automatic int foff(int d);
    int o = 0;
    for (int e = 0; e < d; e++) o += fsize(e);
    return o;
  endfunction
  function automatic int halo(int d, int k);
    return 2 * RW + foff(d) + k;
  endfunction
  function automatic int lidx(int lx, int ly, int lz);
    return lx + BX * (ly + BY * lz);
  endfunction
  function automatic int face_k(int d, int lx, int ly, int lz);
    if (d < 2)      return ly + BY * lz;
    else if (d < 4) return lx + BX * lz;
    else            return lx + BX * ly;
  endfunction
  function automatic int face_cell(int d, int k);
    case (d)
      0: return lidx(0, k % BY, k / BY);
      1: return lidx(BX - 1, k % BY, k / BY);
      2: return lidx(k % BX, 0, k / BX);
      3: return lidx(k % BX, BY - 1, k / BX);
      4: return lidx(k % BX, k / BX, 0);
      default: return lidx(k % BX, k / BX, BZ - 1);
    endcase
  endfunction
  // slot j of the transfer section -> direction and face index
  function automatic void slot(int j, output int d, output int k);
    d = 0;
    while (d < 5 && j >= foff(d) + fsize(d)) d++;
    k = j - foff(d);
  endfunction
  function automatic bit has_nb(int pe, int d);
    int px = pe % NX, py = (pe / NX) % NY, pz = pe / (NX * NY);
    int qx = px + DXV[d], qy = py + DYV[d], qz = pz + DZV[d];
    return qx >= 0 && qx < NX && qy >= 0 && qy < NY && qz >= 0 && qz < NZ;
  endfunction
  // global cell index of local cell r of PE pe
  function automatic int cell_of(int pe, int r);
    int px = pe % NX, py = (pe / NX) % NY, pz = pe / (NX * NY);
    return gidx(px * BX + r % BX, py * BY + (r / BX) % BY, pz * BZ + r / (BX * BY));
  endfunction

  function automatic void gen_prog(int pe);
    ctrl_word_t w;
    ctrl_word_t tw [];
    int last;
    prog[pe] = {};
    for (int p = 0; p < 2; p++) begin
      // compute and store section
      for (int t = 0; t < RW + DP_LAT; t++) begin
        w = '0;
        if (t < RW) begin
          int lx, ly, lz, m, r, na[6];
          m = t / R; r = t % R;
          lx = r % BX; ly = (r / BX) % BY; lz = r / (BX * BY);
          w.compute      = 1'b1;
          w.crom_addr    = CROM_AW'(NEU ? m : r);
          w.rd_addr[0]   = DATA_AW'(vaddr(p, m, r));
          // neighbour addresses of the exchanged variable
          for (int d = 0; d < 6; d++) begin
            int nx, ny, nz;
            nx = lx + DXV[d]; ny = ly + DYV[d]; nz = lz + DZV[d];
            if (nx >= 0 && nx < BX && ny >= 0 && ny < BY && nz >= 0 && nz < BZ)
              na[d] = vaddr(p, XV, lidx(nx, ny, nz));
            else if (has_nb(pe, d)) na[d] = halo(d, face_k(d, lx, ly, lz));
            else                    na[d] = vaddr(p, XV, r);
          end
          // operand order of the model's datapath
          for (int d = 0; d < 6; d++) w.rd_addr[d+1] = DATA_AW'(na[d]);
          if (MODEL == MODEL_WAVE) w.rd_addr[5] = DATA_AW'(bufaddr(1 - p, t));
          if (NEU) begin
            w.mode = (m == 0) ? NEU_V : (m == 1) ? NEU_W : NEU_S;
            // V reads W, W and S read V; V's neighbour S follow in 2..5
            w.rd_addr[1] = DATA_AW'(vaddr(p, (m == 0) ? 1 : 0, r));
            for (int d = 0; d < 4; d++) w.rd_addr[d+2] = DATA_AW'(na[d]);
            w.rd_addr[6] = '0;
          end
        end
        if (t >= DP_LAT) begin
          w.wr_en   = 1'b1;
          w.wr_addr = DATA_AW'(bufaddr(1 - p, t - DP_LAT));
          w.in_sel  = '0;
        end
        if (t == RW + DP_LAT - 1) w.sync = 1'b1;
        prog[pe].push_back(w);
      end
      // data-transfer section
      tw = new[FT + 1];
      last = 0;
      for (int j = 0; j <= FT; j++) begin
        int d, k;
        tw[j] = '0;
        if (j < FT) begin
          slot(j, d, k);
          if (has_nb(pe, d)) begin
            tw[j].out_en     = 1'b1;
            tw[j].rd_addr[0] = DATA_AW'(vaddr(1 - p, XV, face_cell(d, k)));
            last = j;
          end
        end
        if (j >= 1) begin
          slot(j - 1, d, k);
          if (has_nb(pe, d ^ 1)) begin
            tw[j].wr_en   = 1'b1;
            tw[j].wr_addr = DATA_AW'(halo(d ^ 1, k));
            tw[j].in_sel  = SEL_W'(1 + (d ^ 1));
            last = j;
          end
        end
      end
      tw[last].step_end = 1'b1;
      tw[last].wrap     = (p == 1);
      for (int j = 0; j <= last; j++) prog[pe].push_back(tw[j]);
    end
  endfunction

  int vprev [NCELL];                   // U(t-1) of the wave model

  function automatic int fm(int a, int b);
    return int'((longint'(a) * longint'(b)) >>> FRAC);
  endfunction

  function automatic int pe_of(int c);
    int x, y, z;
    x = c % GX; y = (c / GX) % GY; z = c / (GX * GY);
    return x / BX + NX * (y / BY + NY * (z / BZ));
  endfunction

  function automatic void ref_step();
    int nv [NCELL];
    int nw [NCELL];
    int ns [NCELL];
    for (int z = 0; z < GZ; z++)
      for (int y = 0; y < GY; y++)
        for (int x = 0; x < GX; x++) begin
          longint s, pr, v;
          longint nb [6];
          int c;
          s = 0;
          c = gidx(x, y, z);
          v = longint'(vref[c]);
          for (int d = 0; d < 6; d++) begin
            int qx, qy, qz;
            qx = x + DXV[d]; qy = y + DYV[d]; qz = z + DZV[d];
            if (qx >= 0 && qx < GX && qy >= 0 && qy < GY && qz >= 0 && qz < GZ)
              nb[d] = longint'(vref[gidx(qx, qy, qz)]);
            else
              nb[d] = v;
          end
          if (NEU) begin
            int ssum, q, g, e, x0;
            int nsv [4];
            e = pe_of(c);
            x0 = vref[c];
            for (int d = 0; d < 4; d++) begin
              int qx, qy;
              qx = x + DXV[d]; qy = y + DYV[d];
              if (qx >= 0 && qx < GX && qy >= 0 && qy < GY) nsv[d] = sref[gidx(qx, qy, z)];
              else                                           nsv[d] = sref[c];
            end
            ssum = nsv[0] + nsv[1] + nsv[2] + nsv[3];
            g = fm(nk[e][0][2], ssum);
            q = fm(g, x0 - nk[e][0][3]);
            nv[c] = x0 + fm(nk[e][0][0], x0) + fm(nk[e][0][1], wref[c]) - q;
            nw[c] = wref[c] + fm(nk[e][1][0], wref[c]) - fm(nk[e][1][1], x0);
            g = fm(nk[e][2][0], (1 << FRAC) - sref[c]);
            ns[c] = sref[c] - fm(nk[e][2][2], sref[c]) + fm(g, x0 - nk[e][2][1]);
          end else if (MODEL == MODEL_LUTCHEN) begin
            longint pa, pb;
            pa = ((nb[0] - v) * longint'(kc[c])) >>> FRAC;
            pb = ((nb[1] - v) * longint'(ic[c])) >>> FRAC;
            nv[c] = int'(v + longint'(int'(longint'(int'(pa)) - longint'(int'(pb)))));
          end else if (MODEL == MODEL_WAVE) begin
            longint p1, p2;
            p1 = ((nb[0] + nb[1] + nb[2] + nb[3]) * longint'(kc[c])) >>> FRAC;
            p2 = (v * longint'(ic[c])) >>> FRAC;
            nv[c] = int'(longint'(int'(p1)) + longint'(int'(p2)) - longint'(vprev[c]));
          end else begin
            for (int d = 0; d < 6; d++) s += v - nb[d];
            pr = (s * longint'(kc[c])) >>> FRAC;
            nv[c] = int'(v - longint'(int'(pr)) - longint'(ic[c]));
          end
        end
    vprev = vref;
    vref = nv;
    if (NEU) begin
      wref = nw;
      sref = ns;
    end
  endfunction

  task automatic cfg_write(int pe, cfg_target_e tg, int addr, logic [CFG_W-1:0] data);
    @(negedge clk);
    cfg_we = 1'b1; cfg_pe = PEW'(pe); cfg_target = tg;
    cfg_addr = 8'(addr); cfg_wdata = data;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // mechanism counters
  int n_compute = 0, n_selfstore = 0, n_nbstore = 0, n_output = 0, n_wrap = 0;
  int n_barrier = 0, n_barrier_wait = 0, n_busy = 0;
  int n_mode [4] = '{0, 0, 0, 0};
  always @(negedge clk) if (rst_n) begin
    if (pe0_cw.compute) n_mode[pe0_cw.mode]++;
    if (pe0_cw.compute) n_compute++;
    if (pe0_cw.wr_en && pe0_cw.in_sel == '0) n_selfstore++;
    if (pe0_cw.wr_en && pe0_cw.in_sel != '0) n_nbstore++;
    if (pe0_cw.out_en) n_output++;
    if (pe0_cw.wrap) n_wrap++;
    if (&at_sync) n_barrier++;
    if (|at_sync && !(&at_sync)) n_barrier_wait++;
    if (busy) n_busy++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    finished = 1'b0;
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    finished = 1'b1;
  end

  initial begin
    int seed_dummy;
    seed_dummy = $urandom(SEED);
    rst_n = 1'b0; start = 1'b0; num_steps = 16'(STEPS);
    cfg_we = 1'b0; cfg_pe = '0; cfg_target = CFG_INST; cfg_addr = '0; cfg_wdata = '0;
    hrd_pe = '0; hrd_addr = '0;
    // model state and constants: |V| < 16 and small, stable coefficients
    for (int c = 0; c < NCELL; c++) begin
      vref[c]  = int'($urandom_range(0, 2**21)) - 2**20;
      vprev[c] = int'($urandom_range(0, 2**21)) - 2**20;
      if (MODEL == MODEL_WAVE) begin
        kc[c] = int'($urandom_range(0, 2**14));         // C1 <= 1/4
        ic[c] = int'($urandom_range(0, 2**17));         // C2 <= 2
      end else if (MODEL == MODEL_LUTCHEN) begin
        kc[c] = int'($urandom_range(0, 2**14));         // Ka, Kb <= 1/4
        ic[c] = int'($urandom_range(0, 2**14));
      end else if (NEU) begin
        wref[c] = int'($urandom_range(0, 2**18)) - 2**17;
        sref[c] = int'($urandom_range(0, 2**16));       // 0 <= S <= 1
        kc[c] = 0; ic[c] = 0;
      end else begin
        kc[c] = int'($urandom_range(0, 2**13));         // K <= 1/8
        ic[c] = int'($urandom_range(0, 2**11)) - 2**10; // |Ioff| <= 1/64
      end
    end
    // neuron: small rates, |k| <= 1/16; k4 (V threshold) and k2 of S within +-1
    for (int e = 0; e < NPE; e++)
      for (int m = 0; m < 3; m++) begin
        nk[e][m][0] = int'($urandom_range(0, 2**13)) - 2**12;
        nk[e][m][1] = int'($urandom_range(0, 2**13)) - 2**12;
        nk[e][m][2] = int'($urandom_range(0, 2**12));
        nk[e][m][3] = int'($urandom_range(0, 2**17)) - 2**16;
      end
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int pe = 0; pe < NPE; pe++) begin
      gen_prog(pe);
      if (prog[pe].size() > 2**INST_AW) $fatal(1, "program too long");
      for (int i = 0; i < prog[pe].size(); i++)
        cfg_write(pe, CFG_INST, i, CFG_W'(prog[pe][i]));
      for (int r = 0; r < R; r++) begin
        int c;
        c = cell_of(pe, r);
        if (!NEU) cfg_write(pe, CFG_CROM, r, CFG_W'({kc[c], ic[c]}));
        cfg_write(pe, CFG_DATA, bufaddr(0, r), CFG_W'(vref[c]));
        if (MODEL == MODEL_WAVE) cfg_write(pe, CFG_DATA, bufaddr(1, r), CFG_W'(vprev[c]));
        if (NEU) begin
          cfg_write(pe, CFG_DATA, vaddr(0, 1, r), CFG_W'(wref[c]));
          cfg_write(pe, CFG_DATA, vaddr(0, 2, r), CFG_W'(sref[c]));
        end
      end
      if (NEU)
        for (int m = 0; m < 3; m++)
          cfg_write(pe, CFG_CROM, m, CFG_W'({nk[pe][m][0], nk[pe][m][1], nk[pe][m][2], nk[pe][m][3]}));
      // halos hold the neighbours' initial values
      for (int d = 0; d < 6; d++) if (has_nb(pe, d)) begin
        int q;
        q = pe + DXV[d] + NX * (DYV[d] + NY * DZV[d]);
        for (int k = 0; k < fsize(d); k++)
          cfg_write(pe, CFG_DATA, halo(d, k),
                    CFG_W'(NEU ? sref[cell_of(q, face_cell(d ^ 1, k))] : vref[cell_of(q, face_cell(d ^ 1, k))]));
      end
    end

    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (done);
    repeat (2) @(negedge clk);
    check(!busy, "network idle after done");
    check(n_busy == STEPS * STEP_CYCLES,
          $sformatf("busy cycles %0d, expected %0d", n_busy, STEPS * STEP_CYCLES));

    for (int s = 0; s < STEPS; s++) ref_step();
    for (int pe = 0; pe < NPE; pe++)
      for (int r = 0; r < R; r++) begin
        int c;
        c = cell_of(pe, r);
        @(negedge clk);
        hrd_pe = PEW'(pe); hrd_addr = DATA_AW'(bufaddr(STEPS % 2, r));
        #1;
        check(hrd_data == vref[c],
              $sformatf("PE %0d cell %0d: got %0d expected %0d", pe, r, hrd_data, vref[c]));
        if (NEU) begin
          @(negedge clk);
          hrd_addr = DATA_AW'(vaddr(STEPS % 2, 1, r));
          #1;
          check(hrd_data == wref[c], $sformatf("PE %0d cell %0d W: got %0d expected %0d", pe, r, hrd_data, wref[c]));
          hrd_addr = DATA_AW'(vaddr(STEPS % 2, 2, r));
          #1;
          check(hrd_data == sref[c], $sformatf("PE %0d cell %0d S: got %0d expected %0d", pe, r, hrd_data, sref[c]));
        end
      end

    $display("steps=%0d cycles/step=%0d computes=%0d self-stores=%0d neighbour-stores=%0d outputs=%0d wraps=%0d barriers=%0d barrier-wait-cycles=%0d",
             STEPS, n_busy / STEPS, n_compute, n_selfstore, n_nbstore, n_output, n_wrap,
             n_barrier, n_barrier_wait);
    check(n_compute > 0,      "compute happened");
    check(n_selfstore > 0,    "store of own result happened");
    check(n_nbstore > 0,      "store from a neighbour happened");
    check(n_output > 0,       "output happened");
    check(n_wrap > 0,         "program wrap happened");
    check(n_barrier > 0,      "barrier release happened");
    check(n_barrier_wait > 0, "a PE waited at a barrier");
    if (NEU) begin
      $display("neuron computes by mode: V=%0d W=%0d S=%0d", n_mode[NEU_V], n_mode[NEU_W], n_mode[NEU_S]);
      check(n_mode[NEU_V] > 0 && n_mode[NEU_W] > 0 && n_mode[NEU_S] > 0, "all three neuron modes used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    finished = 1'b1;
  end

endmodule
