// tb_pe_const_rom: loads random constants, then reads random addresses and
// checks each word appears exactly one cycle after its address.
module tb_pe_const_rom;
  localparam int DEPTH = 32, DW = 64, AW = $clog2(DEPTH);
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [AW-1:0] rd_addr, ld_addr;
  logic [DW-1:0] rd_data, ld_data;
  logic ld_en;
  logic [DW-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  pe_const_rom #(.DEPTH(DEPTH), .DW(DW)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] prev;
    ld_en = 0; rd_addr = '0; ld_addr = '0; ld_data = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      ld_en = 1; ld_addr = AW'(a); ld_data = {$urandom, $urandom}; shadow[a] = ld_data;
    end
    @(negedge clk) ld_en = 0;
    rd_addr = '0;
    for (int i = 0; i < 500; i++) begin
      @(posedge clk);
      prev = rd_addr;
      @(negedge clk);
      checks++;
      if (rd_data !== shadow[prev]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d", prev);
      end
      rd_addr = AW'($urandom);
      #1;
      checks++;                        // registered: no change before the edge
      if (rd_data !== shadow[prev]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
