// tb_pe_controller: runs a six-word program for three time steps.
//   0 compute   1 output+sync   2 store   3 step_end   4 compute   5 step_end+wrap
// The barrier partner (the rest of the network) releases all_sync only after
// the controller has waited HOLD cycles. Checks the exact order of issued
// words including the wrap, that no-ops are issued while waiting, the total
// cycle count, the steps_done count and a single done pulse.
module tb_pe_controller;
  import ode_pkg::*;
  localparam int HOLD = 2;
  localparam int STEPS = 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, start, all_sync, at_sync, busy, done, prog_we;
  logic [15:0] num_steps, steps_done;
  ctrl_word_t cw, prog_data;
  logic [INST_AW-1:0] prog_addr;
  int checks = 0, failures = 0;
  int hold_cnt = 0;

  pe_controller dut (.*);

  // barrier partner
  always_ff @(posedge clk) hold_cnt <= at_sync ? hold_cnt + 1 : 0;
  assign all_sync = at_sync && hold_cnt >= HOLD;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int issued[$];
  int nops_in_wait = 0, busy_cycles = 0, done_pulses = 0;
  always @(negedge clk) if (rst_n) begin
    if (cw != '0) issued.push_back(int'(cw.crom_addr) - 1);
    if (at_sync && cw == '0) nops_in_wait++;
    if (at_sync && cw != '0) failures++;
    if (busy) busy_cycles++;
    if (done) done_pulses++;
  end

  initial begin
    ctrl_word_t w;
    int exp_order[$];
    rst_n = 0; start = 0; num_steps = 16'(STEPS); prog_we = 0; prog_addr = '0; prog_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6; i++) begin
      w = '0;
      w.crom_addr = CROM_AW'(i + 1);   // tags the word
      case (i)
        0, 4: w.compute = 1;
        1: begin w.out_en = 1; w.sync = 1; end
        2: w.wr_en = 1;
        3: w.step_end = 1;
        5: begin w.step_end = 1; w.wrap = 1; end
        default: ;
      endcase
      @(negedge clk);
      prog_we = 1; prog_addr = INST_AW'(i); prog_data = w;
    end
    @(negedge clk) prog_we = 0;
    check(!busy, "idle after load");
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    repeat (2) @(negedge clk);
    exp_order = '{0, 1, 2, 3, 4, 5, 0, 1, 2, 3};
    check(issued.size() == exp_order.size(), $sformatf("issued %0d words", issued.size()));
    for (int i = 0; i < exp_order.size() && i < issued.size(); i++)
      check(issued[i] == exp_order[i], $sformatf("word %0d is %0d", i, issued[i]));
    // 10 words, 5 barriers of HOLD+1 cycles each
    check(busy_cycles == 10 + 5 * (HOLD + 1), $sformatf("busy cycles %0d", busy_cycles));
    check(nops_in_wait == 5 * (HOLD + 1), $sformatf("wait cycles %0d", nops_in_wait));
    check(steps_done == 16'(STEPS), "steps_done");
    check(done_pulses == 1, "one done pulse");
    check(!busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
