// tb_ode_dp_wave: drives the wave datapath with random operands on random
// cycles and compares every result with a 64-bit reference of
//   C1*(sum of 4 neighbours) + C2*U - U(t-1)
// (Q16.16, product shifted right by FRAC, truncated to 32 bits). Also checks
// that each result appears exactly DP_LAT cycles after its operands and that
// back-to-back operands give back-to-back results.
module tb_ode_dp_wave;
  import ode_pkg::*;
  localparam int CD = 2**CROM_AW;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, out_valid, crom_ld_en;
  word_t [NRD-1:0] opnd;
  word_t result;
  logic [CROM_AW-1:0] crom_addr, crom_ld_addr;
  logic [CROM_W-1:0] crom_ld_data;
  int c_hi [CD];
  int c_lo [CD];
  int checks = 0, failures = 0, cycle = 0;
  int exp_q[$];
  int due_q[$];

  ode_dp_wave dut (.*);

  function automatic int ref_model(word_t o [NRD], int c1, int c0);
    longint p1, p2;
    p1 = ((longint'(o[1]) + o[2] + o[3] + o[4]) * longint'(c1)) >>> FRAC;
    p2 = (longint'(o[0]) * longint'(c0)) >>> FRAC;
    return int'(longint'(int'(p1)) + longint'(int'(p2)) - longint'(o[5]));
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle++;

  // result monitor: sampled before the edge
  always @(negedge clk) if (rst_n) begin
    if (due_q.size() > 0 && due_q[0] == cycle) begin
      checks++;
      if (!out_valid || result !== exp_q[0]) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: got %0d (valid %0b) expected %0d",
                                     cycle, result, out_valid, exp_q[0]);
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
      @(negedge clk);
      c_hi[a] = int'($urandom); c_lo[a] = int'($urandom);
      crom_ld_en = 1; crom_ld_addr = CROM_AW'(a); crom_ld_data = {c_hi[a], c_lo[a]};
    end
    @(negedge clk) crom_ld_en = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = (i < 200) ? 1'b1 : 1'($urandom_range(0, 1));
      for (int j = 0; j < NRD; j++) begin
        o[j] = $signed($urandom) >>> 5;  // keeps the reference within 64 bits
        if (i % 7 == 3) o[j] = o[0] + (j - 3) * 4096;
        opnd[j] = o[j];
      end
      crom_addr = CROM_AW'($urandom);
      if (in_valid) begin
        exp_q.push_back(ref_model(o, c_hi[crom_addr], c_lo[crom_addr]));
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
