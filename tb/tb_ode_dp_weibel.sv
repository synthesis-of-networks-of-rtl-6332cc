// tb_ode_dp_weibel: drives the Weibel datapath with random operands and
// coefficient entries on random cycles and compares each result with a
// 64-bit reference of X + sum_k (a_k * opnd[k] >>> FRAC) (truncated to 32
// bits per product, wrapping sum). Checks the DP_LAT = 4 latency and full
// throughput; one pass uses coefficients built from branch constants C1..C7
// in the V and F forms.
module tb_ode_dp_weibel;
  import ode_pkg::*;
  localparam int CD = 2**CROM_AW;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, out_valid, crom_ld_en;
  word_t [NRD-1:0] opnd;
  word_t result;
  logic [CROM_AW-1:0] crom_addr, crom_ld_addr;
  logic [CROM4_W-1:0] crom_ld_data;
  int coef [CD][4];
  int checks = 0, failures = 0, cycle = 0;
  int exp_q[$];
  int due_q[$];

  ode_dp_weibel dut (.*);

  function automatic int ref_model(word_t o [NRD], int a);
    longint acc;
    acc = longint'(o[0]);
    for (int k = 0; k < 4; k++)
      acc += longint'(int'((longint'(o[k+1]) * longint'(coef[a][k])) >>> FRAC));
    return int'(acc);
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
    rst_n = 0; in_valid = 0; opnd = '0; crom_addr = '0;
    crom_ld_en = 0; crom_ld_addr = '0; crom_ld_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < CD; a++) begin
      if (a < 2) begin
        // h = 1/64 and constants C1..C7 in Q16.16
        int h, c[8];
        h = 1024;
        for (int j = 1; j <= 7; j++) c[j] = int'($urandom_range(0, 4 << FRAC));
        if (a == 0) coef[a] = '{int'((longint'(h) * c[1]) >>> FRAC), int'((longint'(h) * c[2]) >>> FRAC),
                               -int'((longint'(h) * c[2]) >>> FRAC), h};
        else        coef[a] = '{int'((longint'(h) * c[3]) >>> FRAC), -int'((longint'(h) * (c[4] + c[7])) >>> FRAC),
                               -int'((longint'(h) * (c[5] + c[6])) >>> FRAC), int'((longint'(h) * c[5]) >>> FRAC)};
      end else
        for (int k = 0; k < 4; k++) coef[a][k] = int'($urandom);
      @(negedge clk);
      crom_ld_en = 1; crom_ld_addr = CROM_AW'(a);
      crom_ld_data = {coef[a][0], coef[a][1], coef[a][2], coef[a][3]};
    end
    @(negedge clk) crom_ld_en = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = (i < 200) ? 1'b1 : 1'($urandom_range(0, 1));
      for (int j = 0; j < NRD; j++) begin
        o[j] = $signed($urandom) >>> 4;
        opnd[j] = o[j];
      end
      crom_addr = CROM_AW'((i % 3 == 0) ? i % 2 : $urandom);
      if (in_valid) begin
        exp_q.push_back(ref_model(o, int'(crom_addr)));
        due_q.push_back(cycle + DP_LAT);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (DP_LAT + 2) @(negedge clk);
    checks++;
    if (due_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
