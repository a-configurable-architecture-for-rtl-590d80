// tb_gm_full: the generator at its default size (270-bit filter operands, 302-bit
// accumulator, 14-bit scale-factors, 512x512 images, order 59 in both directions) computing
// all 3600 moments of one 512x512 image whose pixels are all 0xFF, the uniform test image of
// the error evaluation. The configuration after reset is already the largest one, so the
// testbench only waits for image_ready, pulses start and sends 262,144 pixels without gaps.
// Reference: m(p,q) = 255 * S(p) * S(q) with S(p) = sum_{x<512} x**p, in 1200-bit integers.
// Checks: every moment arrives once, in q-major order; moments with q >= 1 are positive and
// within 2 % of the reference (1.7 % is reached, at m(58,1)); the mean relative error over all 3600 is
// below 2 %. The column q = 0 is only counted in the mean: its order-0 column filter output
// shares the scale-factor of the order-59 output of the same column operation and keeps few
// bits, and the conversion to m(p,0) amplifies that for large p. The filtering of the
// image takes w*h + (K+1)*h + 4K + 7 cycles (no input gaps, no intermediate RAM wait); the
// last moment arrives before the matrix multiplication bound 2*(K+1)**2*(K+2)/2 issues plus
// coefficient waits, taken here as 400,000 cycles after filtering ends.
module tb_gm_full;
  localparam int K = 59, WD = 512, HT = 512;
  localparam int RW = 1200;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic cfg_we = 0, start = 0, pixel_valid = 0;
  logic image_ready, moment_valid;
  logic [7:0] pixel = 8'hFF;
  logic [301:0] moment;
  logic [13:0] moment_sf;
  logic [5:0] moment_p, moment_q;
  logic [5:0] cfg_order = '0;
  logic [9:0] cfg_w = '0, cfg_h = '0;

  gm_top dut (.clk, .rst, .cfg_we, .cfg_order, .cfg_w, .cfg_h, .start, .image_ready,
    .pixel_valid, .pixel, .pixel_sf('0), .moment_valid, .moment, .moment_sf, .moment_p,
    .moment_q);

  int checks = 0, failures = 0;
  logic [RW-1:0] spow [K+1];
  int n_mom = 0, n_big = 0;
  longint err_sum = 0;          // relative errors in units of 1e-6
  int err_max = 0, err_max_q1 = 0;
  longint cyc = 0, t_start = 0, t_fdone = 0, t_last = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (dut.filt_start) t_start = cyc;
  always @(posedge clk) if (dut.filt_done) t_fdone = cyc;

  always @(posedge clk) if (!rst && moment_valid) begin
    automatic logic signed [RW-1:0] e = RW'(255) * spow[moment_p] * spow[moment_q];
    automatic logic signed [RW-1:0] g = RW'($signed(moment)) <<< moment_sf;
    automatic logic signed [RW-1:0] d = g - e;
    automatic logic [RW-1:0] q;
    automatic int ppm;
    if (d < 0) d = -d;
    q = d * RW'(1000000) / e;
    ppm = (q > RW'(1000000000)) ? 1000000000 : int'(q[31:0]);
    err_sum += ppm;
    if (ppm > err_max) err_max = ppm;
    checks++;
    if (int'(moment_q) != n_mom / (K + 1) || int'(moment_p) != n_mom % (K + 1)) begin
      failures++; $display("FAIL moment %0d arrived as m(%0d,%0d)", n_mom, moment_p, moment_q);
    end
    if (moment_q != 0 && ppm > err_max_q1) err_max_q1 = ppm;
    checks++;
    if (moment_q != 0 && (g <= 0 || ppm > 20000)) begin
      failures++;
      $display("FAIL m(%0d,%0d) relative error %0d ppm", moment_p, moment_q, ppm);
    end
    if (ppm > 20000) n_big++;
    if ((moment_p % 20 == 0 || moment_p == K) && (moment_q % 20 == 0 || moment_q == K))
      $display("m(%0d,%0d) = %0d * 2**%0d, relative error %0d ppm", moment_p, moment_q,
               $signed(moment), moment_sf, ppm);
    n_mom++;
    t_last = cyc;
  end

  initial begin
    for (int p = 0; p <= K; p++) begin
      spow[p] = '0;
      for (int x = 0; x < WD; x++) begin
        automatic logic [RW-1:0] t = RW'(1);
        for (int i = 0; i < p; i++) t = t * RW'(x);
        spow[p] = spow[p] + t;
      end
    end
    repeat (3) @(negedge clk);
    rst = 0;
    while (!image_ready) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    pixel_valid = 1;
    repeat (WD * HT) @(negedge clk);
    pixel_valid = 0;
    while (n_mom < (K + 1) * (K + 1)) @(negedge clk);
    repeat (10) @(negedge clk);
    $display("filtering %0d cycles, matrix multiplication done %0d cycles later",
             t_fdone - t_start, t_last - t_fdone);
    $display("mean relative error %0d ppm, max %0d ppm (q >= 1: %0d ppm), %0d moments above 2 %%",
             err_sum / n_mom, err_max, err_max_q1, n_big);
    checks++;
    if (n_mom != (K + 1) * (K + 1)) begin failures++; $display("FAIL moment count"); end
    checks++;
    if (err_sum / n_mom > 20000) begin failures++; $display("FAIL mean error above 2 %%"); end
    checks++;
    if (t_fdone - t_start != WD * HT + (K + 1) * HT + 4 * K + 7) begin
      failures++; $display("FAIL filtering time");
    end
    checks++;
    if (t_last - t_fdone > 400000) begin failures++; $display("FAIL matrix multiplication time"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
