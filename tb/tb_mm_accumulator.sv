// tb_mm_accumulator: pseudo floating-point sums with a 24-bit mantissa.
// Part 1: sums of small products all at scale-factor 0 must be exact.
// Part 2: sums of terms with random scale-factors, including carries out of the 24-bit range
// (forcing the halving path): the result times 2**sf must be within the rounding bound
// (terms * 2**(sf-1) + 2**sf) of the exact sum computed with 128-bit integers.
module tb_mm_accumulator;
  localparam int AW = 24, SFW = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid, in_first, in_last, out_valid;
  logic [AW-1:0] in_data, out_data;
  logic [SFW-1:0] in_sf, out_sf;
  int checks = 0, failures = 0;
  mm_accumulator #(.AW(AW), .SFW(SFW)) dut (.*);
  logic signed [127:0] exact, got, diff, bound;
  int nterms, n_halved = 0;
  initial begin
    in_valid = 0; in_first = 0; in_last = 0; in_data = 0; in_sf = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 200; t++) begin
      automatic bit exact_mode = (t < 60);
      nterms = $urandom_range(1, 12);
      exact = 0;
      for (int k = 0; k < nterms; k++) begin
        int m, e;
        m = exact_mode ? $urandom_range(0, 20000) : $urandom_range(0, (1 << (AW - 1)) - 1);
        if ((exact_mode || t >= 130) && $urandom_range(0, 2) == 0) m = -m;
        e = exact_mode ? 0 : $urandom_range(0, 6);
        in_valid = 1; in_first = (k == 0); in_last = (k == nterms - 1);
        in_data = AW'(m); in_sf = SFW'(e);
        exact += 128'(signed'(m)) <<< e;
        @(negedge clk);
        in_valid = 0;
        if (k != nterms - 1 && $urandom_range(0, 3) == 0) @(negedge clk);   // gap
      end
      checks++;
      if (!out_valid) begin failures++; $display("FAIL no result one cycle after the last term"); end
      got = 128'($signed(out_data)) <<< out_sf;
      if (out_sf > 6) n_halved++;
      diff = got - exact; if (diff < 0) diff = -diff;
      bound = exact_mode ? 0 : (128'(nterms + 2) <<< out_sf);
      checks++;
      if (diff > bound) begin
        failures++; $display("FAIL sum %0d got %0d (sf %0d)", exact, got, out_sf);
      end
      @(negedge clk);
    end
    checks++;
    if (n_halved == 0) begin failures++; $display("FAIL halving never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
