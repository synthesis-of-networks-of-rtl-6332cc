// tb_pe_data_ram: checks the multi-port data RAM against a shadow array:
// random writes, random reads on every port, and that a read in the cycle of
// a write to the same word still returns the old word (write after read).
module tb_pe_data_ram;
  localparam int DEPTH = 128, W = 32, NRP = 8, AW = $clog2(DEPTH);
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NRP-1:0][AW-1:0] rd_addr;
  logic [NRP-1:0][W-1:0]  rd_data;
  logic wr_en;
  logic [AW-1:0] wr_addr;
  logic [W-1:0]  wr_data;
  logic [W-1:0]  shadow [DEPTH];
  int checks = 0, failures = 0;

  pe_data_ram #(.DEPTH(DEPTH), .W(W), .NRP(NRP)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_addr = '0; wr_data = '0; rd_addr = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = $urandom; shadow[a] = wr_data;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1); wr_addr = AW'($urandom); wr_data = $urandom;
      for (int p = 0; p < NRP; p++) rd_addr[p] = AW'($urandom);
      rd_addr[0] = wr_addr;            // port 0 reads the word being written
      #1;
      for (int p = 0; p < NRP; p++) begin
        checks++;
        if (rd_data[p] !== shadow[rd_addr[p]]) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d addr %0d", p, rd_addr[p]);
        end
      end
      @(posedge clk);
      if (wr_en) shadow[wr_addr] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
