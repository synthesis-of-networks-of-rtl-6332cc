// tb_custom_pe: one atrial PE on its own (its at_sync closes its barrier).
// The host loads eight data words, two constant entries and this program:
//   0 compute cell A (V=d[0], neighbours d[1..5] and d[8] = a halo)
//   1 compute cell B (V=d[1], neighbours d[0], d[2], and itself x4)
//   2 store din[2] (mux input 3) into word 10
//   3 no-op
//   4 store datapath result (A) into word 20
//   5 store datapath result (B) into word 21, output word 0
//   6 output word 20, end of step, wrap
// Two steps are run. Checks the stored words against a reference, the neighbour
// store, the value and timing of dout (one cycle after the output word), the
// write-after-read rule (step 2 reads the old A in word 0 even though word 20
// holds A' ) and the cycle count.
module tb_custom_pe;
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

  custom_pe dut (.*);
  assign all_sync = at_sync;

  int d [9];
  int kc [2];
  int ic [2];

  function automatic int ref_cell(int v, int n1, int n2, int n3, int n4, int n5, int n6, int k, int i);
    longint s;
    s = (longint'(v) - n1) + (longint'(v) - n2) + (longint'(v) - n3) +
        (longint'(v) - n4) + (longint'(v) - n5) + (longint'(v) - n6);
    return int'(longint'(v) - longint'(int'((s * longint'(k)) >>> FRAC)) - longint'(i));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cfg(cfg_target_e tg, int a, logic [CFG_W-1:0] v);
    @(negedge clk);
    cfg_we = 1; cfg_target = tg; cfg_addr = 8'(a); cfg_wdata = v;
    @(negedge clk) cfg_we = 0;
  endtask

  function automatic ctrl_word_t rd7(int a0, int a1, int a2, int a3, int a4, int a5, int a6);
    ctrl_word_t w = '0;
    w.rd_addr[0] = DATA_AW'(a0); w.rd_addr[1] = DATA_AW'(a1); w.rd_addr[2] = DATA_AW'(a2);
    w.rd_addr[3] = DATA_AW'(a3); w.rd_addr[4] = DATA_AW'(a4); w.rd_addr[5] = DATA_AW'(a5);
    w.rd_addr[6] = DATA_AW'(a6);
    return w;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // dout trace: value seen in each busy cycle
  int dout_trace[$];
  int busy_cycles = 0;
  always @(negedge clk) if (rst_n && busy) begin
    busy_cycles++;
    dout_trace.push_back(dout);
  end

  initial begin
    ctrl_word_t p [7];
    int a1, b1, a2, b2;
    rst_n = 0; start = 0; num_steps = 16'd2; cfg_we = 0; cfg_target = CFG_INST;
    cfg_addr = '0; cfg_wdata = '0; hrd_addr = '0;
    for (int k = 0; k < NNB; k++) din[k] = 32'(1000 * (k + 1) + 7);
    for (int i = 0; i < 9; i++) d[i] = int'($urandom_range(0, 2**21)) - 2**20;
    for (int i = 0; i < 2; i++) begin
      kc[i] = int'($urandom_range(0, 2**13)); ic[i] = int'($urandom_range(0, 2**11)) - 2**10;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    p[0] = rd7(0, 1, 2, 3, 4, 5, 8); p[0].compute = 1; p[0].crom_addr = 0;
    p[1] = rd7(1, 0, 2, 1, 1, 1, 1); p[1].compute = 1; p[1].crom_addr = 1;
    p[2] = '0; p[2].wr_en = 1; p[2].wr_addr = 10; p[2].in_sel = 3;
    p[3] = '0;
    p[4] = '0; p[4].wr_en = 1; p[4].wr_addr = 20;
    p[5] = rd7(0, 0, 0, 0, 0, 0, 0); p[5].wr_en = 1; p[5].wr_addr = 21; p[5].out_en = 1;
    p[6] = rd7(20, 0, 0, 0, 0, 0, 0); p[6].out_en = 1; p[6].step_end = 1; p[6].wrap = 1;
    for (int i = 0; i < 7; i++) cfg(CFG_INST, i, CFG_W'(p[i]));
    for (int i = 0; i < 2; i++) cfg(CFG_CROM, i, CFG_W'({kc[i], ic[i]}));
    for (int i = 0; i < 9; i++) cfg(CFG_DATA, i, CFG_W'(d[i]));

    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    repeat (2) @(negedge clk);

    // the program never changes words 0..8, so both steps compute the same
    a1 = ref_cell(d[0], d[1], d[2], d[3], d[4], d[5], d[8], kc[0], ic[0]);
    b1 = ref_cell(d[1], d[0], d[2], d[1], d[1], d[1], d[1], kc[1], ic[1]);
    hrd_addr = 20; #1 check(hrd_data == a1, $sformatf("word 20 = %0d, expected %0d", hrd_data, a1));
    hrd_addr = 21; #1 check(hrd_data == b1, $sformatf("word 21 = %0d, expected %0d", hrd_data, b1));
    hrd_addr = 10; #1 check(hrd_data == 32'(3007), "neighbour store into word 10");
    hrd_addr = 0;  #1 check(hrd_data == d[0], "word 0 untouched");
    // 7 words + 1 barrier cycle per step
    check(busy_cycles == 2 * 8, $sformatf("busy cycles %0d", busy_cycles));
    // dout: word 5 issued in busy cycle 5 -> d[0] from cycle 6; word 6 -> A from cycle 7
    check(dout_trace.size() == 16, "trace length");
    if (dout_trace.size() == 16) begin
      check(dout_trace[6] == d[0], "dout after output of word 0");
      check(dout_trace[7] == a1,   "dout after output of word 20");
      check(dout_trace[14] == d[0], "dout in step 2");
      check(dout_trace[15] == a1,   "dout in step 2 after word 20");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
