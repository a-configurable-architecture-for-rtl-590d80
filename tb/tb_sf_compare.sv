// tb_sf_compare: running maximum of scale-factors with clear; random sequences against a
// model, result one cycle after the last input.
module tb_sf_compare;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic clr, in_valid;
  logic [13:0] in_sf, max_sf;
  int checks = 0, failures = 0;
  int m = 0;
  sf_compare #(.SFW(14)) dut (.*);
  initial begin
    clr = 0; in_valid = 0; in_sf = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      clr = (i % 50 == 0);
      in_valid = $urandom_range(0, 1);
      in_sf = 14'($urandom_range(0, 1000));
      @(negedge clk);
      if (clr) m = 0;
      else if (in_valid && int'(in_sf) > m) m = in_sf;
      checks++;
      if (int'(max_sf) != m) begin failures++; $display("FAIL max %0d want %0d", max_sf, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
