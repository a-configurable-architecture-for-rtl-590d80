// tb_mm_multiplier: signed products of a 40-bit data and a 12-bit coefficient mantissa
// (product width 51) and scale-factor sums, registered one cycle, against the simulator's
// own arithmetic on 64-bit integers. Operands are kept symmetric as the design guarantees.
module tb_mm_multiplier;
  localparam int W = 40, CW = 12, AW = W + CW - 1, SFW = 10;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [1:0] in_tag, out_tag;
  logic [W-1:0] data; logic [CW-1:0] coef; logic [AW-1:0] prod;
  logic [SFW-1:0] data_sf, coef_sf, prod_sf;
  int checks = 0, failures = 0;
  mm_multiplier #(.W(W), .CW(CW), .AW(AW), .SFW(SFW), .TW(2)) dut (.*);
  initial begin
    in_valid = 0; in_tag = 0; data = 0; coef = 0; data_sf = 0; coef_sf = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 500; i++) begin
      longint d, c, p;
      d = longint'($urandom_range(0, 32'h7fff_ffff)) * 256 + $urandom_range(0, 255);
      if ($urandom_range(0, 1)) d = -d;
      c = $urandom_range(0, 2047); if ($urandom_range(0, 1)) c = -c;
      if (i == 0) begin d = (longint'(1) << 39) - 1; c = -2047; end
      data = W'(d); coef = CW'(c); data_sf = SFW'($urandom_range(0, 400));
      coef_sf = SFW'($urandom_range(0, 400)); in_valid = 1; in_tag = 2'(i);
      p = d * c;
      @(negedge clk);
      checks++;
      if (!out_valid || out_tag != 2'(i) || $signed(prod) != AW'(p)
          || prod_sf != data_sf + coef_sf) begin
        failures++; $display("FAIL %0d * %0d", d, c);
      end
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
