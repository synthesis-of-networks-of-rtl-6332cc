// tb_ode_dp_neuron: drives the neuron datapath with random V, W and S
// computes (random mode each cycle) and compares every result with a 64-bit
// reference of the three Euler updates written out in the datapath's header.
// Checks the DP_LAT = 4 latency and full throughput.
module tb_ode_dp_neuron;
  import ode_pkg::*;
  localparam int CD = 2**CROM_AW;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, out_valid, crom_ld_en;
  logic [1:0] mode;
  word_t [NRD-1:0] opnd;
  word_t result;
  logic [CROM_AW-1:0] crom_addr, crom_ld_addr;
  logic [CROM4_W-1:0] crom_ld_data;
  int k [CD][4];
  int checks = 0, failures = 0, cycle = 0;
  int n_mode [3] = '{0, 0, 0};
  int exp_q[$];
  int due_q[$];

  ode_dp_neuron dut (.*);

  function automatic int fm(longint a, longint b);
    return int'((longint'(int'(a)) * longint'(int'(b))) >>> FRAC);
  endfunction

  function automatic int ref_model(logic [1:0] m, word_t o [NRD], int a);
    int x, y, s, g, t, q, r;
    x = o[0]; y = o[1];
    case (m)
      NEU_V: begin
        s = int'(o[2] + o[3] + o[4] + o[5]);
        r = fm(k[a][0], x) + fm(k[a][1], y);
        g = fm(k[a][2], s); t = x - k[a][3];
        q = fm(g, t);
        return x + r - q;
      end
      NEU_W: begin
        r = fm(k[a][0], x) + (-fm(k[a][1], y));
        return x + r;
      end
      default: begin
        r = -fm(k[a][2], x);
        g = fm(k[a][0], (1 << FRAC) - x); t = y - k[a][1];
        q = fm(g, t);
        return x + r + q;
      end
    endcase
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle++;

  always @(negedge clk) if (rst_n) begin
    if (due_q.size() > 0 && due_q[0] == cycle) begin
      checks++;
      if (!out_valid || result !== exp_q[0]) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: got %0d expected %0d", cycle, result, exp_q[0]);
      end
      void'(due_q.pop_front());
      void'(exp_q.pop_front());
    end else if (out_valid) begin
      failures++;
      $display("FAIL: unexpected out_valid in cycle %0d", cycle);
    end
  end

  initial begin
    word_t o [NRD];
    rst_n = 0; in_valid = 0; opnd = '0; crom_addr = '0; mode = NEU_V;
    crom_ld_en = 0; crom_ld_addr = '0; crom_ld_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < CD; a++) begin
      for (int j = 0; j < 4; j++) k[a][j] = int'($urandom_range(0, 2**18)) - 2**17;
      @(negedge clk);
      crom_ld_en = 1; crom_ld_addr = CROM_AW'(a);
      crom_ld_data = {k[a][0], k[a][1], k[a][2], k[a][3]};
    end
    @(negedge clk) crom_ld_en = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = (i < 200) ? 1'b1 : 1'($urandom_range(0, 1));
      mode = 2'($urandom_range(0, 2));
      for (int j = 0; j < NRD; j++) begin
        o[j] = int'($urandom_range(0, 2**20)) - 2**19;   // |x| < 8
        opnd[j] = o[j];
      end
      crom_addr = CROM_AW'($urandom);
      if (in_valid) begin
        n_mode[mode]++;
        exp_q.push_back(ref_model(mode, o, int'(crom_addr)));
        due_q.push_back(cycle + DP_LAT);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (DP_LAT + 2) @(negedge clk);
    checks++;
    if (due_q.size() != 0 || n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
