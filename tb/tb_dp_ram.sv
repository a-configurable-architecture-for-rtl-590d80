// tb_dp_ram: the buffer RAM at a reduced size (60-bit words, 100 entries). Random writes and
// reads against a model; read data is checked one cycle after rd_en, including a read of the
// address written in the same cycle (old word expected).
module tb_dp_ram;
  localparam int DW = 60, DEPTH = 100, AW = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en, rd_en;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [DW-1:0] wr_data, rd_data;
  logic [DW-1:0] model [DEPTH];
  logic [DW-1:0] want;
  logic pend;
  int checks = 0, failures = 0;
  dp_ram #(.DW(DW), .DEPTH(DEPTH)) dut (.*);
  initial begin
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0; pend = 0;
    for (int a = 0; a < DEPTH; a++) begin
      wr_en = 1; wr_addr = AW'(a); wr_data = {$urandom, $urandom} ; model[a] = wr_data;
      @(negedge clk);
    end
    for (int i = 0; i < 1000; i++) begin
      wr_en = $urandom_range(0, 1); wr_addr = AW'($urandom_range(0, DEPTH - 1));
      wr_data = {$urandom, $urandom};
      rd_en = 1; rd_addr = (i % 5 == 0) ? wr_addr : AW'($urandom_range(0, DEPTH - 1));
      want = model[rd_addr];
      @(negedge clk);
      if (wr_en) model[wr_addr] = wr_data;
      checks++;
      if (rd_data != want) begin failures++; $display("FAIL read %0d", rd_addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
