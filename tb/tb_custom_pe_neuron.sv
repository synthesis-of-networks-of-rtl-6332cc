// tb_custom_pe_neuron: one PE built with the neuron datapath (MODEL_NEURON),
// closing its own barrier. It checks that the control word's mode field
// reaches the datapath and picks the right equation inside a whole PE.
// Four neurons live in the PE, each with V, W and S. Buffer b holds
// V at 16b+i, W at 16b+4+i, S at 16b+8+i. Word 40 is a halo S that stands in
// for a neuron in another PE. A neuron's V update sums the S of the other
// three neurons and the halo. The program covers two steps: step p reads
// buffer p and writes buffer 1-p. Per step it has 12 computes (W, S, V of
// each neuron, each with its own constant entry), each stored 4 words later,
// and then step_end on the last store; the second step wraps.
// Two steps are run from random start values. The test checks all twelve
// variables of the final buffer and the second-step halo against a 64-bit
// reference, and checks the cycle count (16 words + 1 barrier per step).
module tb_custom_pe_neuron;
  import ode_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, start, all_sync, at_sync, busy, done, cfg_we;
  logic [15:0] num_steps;
  word_t [NNB-1:0] din;
  word_t dout, hrd_data;
  cfg_target_e cfg_target;
  logic [7:0] cfg_addr;
  logic [CFG_W-1:0] cfg_wdata;
  logic [DATA_AW-1:0] hrd_addr;
  int checks = 0, failures = 0;

  custom_pe #(.MODEL(MODEL_NEURON)) dut (.*);
  assign all_sync = at_sync;

  localparam int HALO = 40;
  int k [12][4];          // constant entry 3*i + {0: W, 1: S, 2: V}
  int v [4], w [4], s [4];
  int halo;

  function automatic int fm(int a, int b);
    return int'((longint'(a) * longint'(b)) >>> FRAC);
  endfunction

  function automatic int upd_v(int x, int y, int ssum, int e);
    int r, g, t, q;
    r = fm(k[e][0], x) + fm(k[e][1], y);
    g = fm(k[e][2], ssum);
    t = x - k[e][3];
    q = fm(g, t);
    return x + r - q;
  endfunction

  function automatic int upd_w(int x, int y, int e);
    return x + fm(k[e][0], x) - fm(k[e][1], y);
  endfunction

  function automatic int upd_s(int x, int y, int e);
    int g, t;
    g = fm(k[e][0], (1 << FRAC) - x);
    t = y - k[e][1];
    return x - fm(k[e][2], x) + fm(g, t);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cfg(cfg_target_e tg, int a, logic [CFG_W-1:0] val);
    @(negedge clk);
    cfg_we = 1; cfg_target = tg; cfg_addr = 8'(a); cfg_wdata = val;
    @(negedge clk) cfg_we = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int busy_cycles = 0;
  always @(negedge clk) if (rst_n && busy) busy_cycles++;

  initial begin
    ctrl_word_t p [32];
    int src, dst, i, m, c, ssum;
    int nv [4], nw [4], ns [4];
    rst_n = 0; start = 0; num_steps = 16'd2; cfg_we = 0; cfg_target = CFG_INST;
    cfg_addr = '0; cfg_wdata = '0; hrd_addr = '0;
    for (int j = 0; j < NNB; j++) din[j] = '0;
    for (int e = 0; e < 12; e++) begin
      k[e][0] = int'($urandom_range(0, 2**13)) - 2**12;
      k[e][1] = int'($urandom_range(0, 2**13)) - 2**12;
      k[e][2] = int'($urandom_range(0, 2**12));
      k[e][3] = int'($urandom_range(0, 2**17)) - 2**16;
    end
    for (int j = 0; j < 4; j++) begin
      v[j] = int'($urandom_range(0, 2**18)) - 2**17;
      w[j] = int'($urandom_range(0, 2**18)) - 2**17;
      s[j] = int'($urandom_range(0, 2**16));
    end
    halo = int'($urandom_range(0, 2**16));
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int a = 0; a < 32; a++) p[a] = '0;
    for (int par = 0; par < 2; par++) begin
      src = 16 * par;
      dst = 16 * (1 - par);
      for (int cc = 0; cc < 12; cc++) begin
        c = 16 * par + cc;
        i = cc / 3;
        m = cc % 3;
        p[c].compute = 1;
        p[c].crom_addr = CROM_AW'(cc);
        case (m)
          0: begin  // W
            p[c].mode = NEU_W;
            p[c].rd_addr[0] = DATA_AW'(src + 4 + i);
            p[c].rd_addr[1] = DATA_AW'(src + i);
          end
          1: begin  // S
            p[c].mode = NEU_S;
            p[c].rd_addr[0] = DATA_AW'(src + 8 + i);
            p[c].rd_addr[1] = DATA_AW'(src + i);
          end
          default: begin  // V
            p[c].mode = NEU_V;
            p[c].rd_addr[0] = DATA_AW'(src + i);
            p[c].rd_addr[1] = DATA_AW'(src + 4 + i);
            p[c].rd_addr[2] = DATA_AW'(src + 8 + (i + 1) % 4);
            p[c].rd_addr[3] = DATA_AW'(src + 8 + (i + 2) % 4);
            p[c].rd_addr[4] = DATA_AW'(src + 8 + (i + 3) % 4);
            p[c].rd_addr[5] = DATA_AW'(HALO);
          end
        endcase
        p[c + DP_LAT].wr_en = 1;
        p[c + DP_LAT].in_sel = '0;
        p[c + DP_LAT].wr_addr = DATA_AW'(dst + (m == 0 ? 4 + i : m == 1 ? 8 + i : i));
      end
      p[16 * par + 15].step_end = 1;
    end
    p[31].wrap = 1;

    for (int a = 0; a < 32; a++) cfg(CFG_INST, a, CFG_W'(p[a]));
    for (int e = 0; e < 12; e++) cfg(CFG_CROM, e, CFG_W'({k[e][0], k[e][1], k[e][2], k[e][3]}));
    for (int j = 0; j < 4; j++) begin
      cfg(CFG_DATA, j, CFG_W'(v[j]));
      cfg(CFG_DATA, 4 + j, CFG_W'(w[j]));
      cfg(CFG_DATA, 8 + j, CFG_W'(s[j]));
    end
    cfg(CFG_DATA, HALO, CFG_W'(halo));

    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    repeat (2) @(negedge clk);

    // reference: two Euler steps from the old values
    for (int st = 0; st < 2; st++) begin
      for (int j = 0; j < 4; j++) begin
        ssum = s[(j + 1) % 4] + s[(j + 2) % 4] + s[(j + 3) % 4] + halo;
        nw[j] = upd_w(w[j], v[j], 3 * j);
        ns[j] = upd_s(s[j], v[j], 3 * j + 1);
        nv[j] = upd_v(v[j], w[j], ssum, 3 * j + 2);
      end
      v = nv; w = nw; s = ns;
    end

    for (int j = 0; j < 4; j++) begin
      hrd_addr = DATA_AW'(j);     #1 check(hrd_data == v[j], $sformatf("V%0d = %0d, expected %0d", j, hrd_data, v[j]));
      hrd_addr = DATA_AW'(4 + j); #1 check(hrd_data == w[j], $sformatf("W%0d = %0d, expected %0d", j, hrd_data, w[j]));
      hrd_addr = DATA_AW'(8 + j); #1 check(hrd_data == s[j], $sformatf("S%0d = %0d, expected %0d", j, hrd_data, s[j]));
    end
    hrd_addr = DATA_AW'(HALO); #1 check(hrd_data == halo, "halo word untouched");
    check(busy_cycles == 2 * 17, $sformatf("busy cycles %0d", busy_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
