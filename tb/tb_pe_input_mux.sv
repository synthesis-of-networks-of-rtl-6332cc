// tb_pe_input_mux: every select value with random inputs; an out-of-range
// select must give zero.
module tb_pe_input_mux;
  localparam int N = 7, W = 32, SW = $clog2(N);
  logic [N-1:0][W-1:0] din;
  logic [SW-1:0] sel;
  logic [W-1:0] dout;
  int checks = 0, failures = 0;

  pe_input_mux #(.N(N), .W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      logic [W-1:0] exp;
      for (int k = 0; k < N; k++) din[k] = $urandom;
      sel = SW'($urandom_range(0, 2**SW - 1));
      #1;
      exp = (int'(sel) < N) ? din[sel] : '0;
      checks++;
      if (dout !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL sel=%0d", sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
