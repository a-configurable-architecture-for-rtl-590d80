// tb_matmul: the matrix multiplication module at MAXORD = 4 (order 4) with full widths.
// The intermediate RAM is modelled by the tb (one-cycle read latency) and filled with
// Y(r,s) = sum f(x,y) C(x+r,r) C(y+s,s) of a random 6x5 image.
// Run 1: all scale-factors 0; every moment must equal sum f(x,y) x**p y**q exactly.
// Run 2: even r stored as 8*Y with scale-factor 0, odd r as Y with scale-factor 3 (both mean
// 8*Y), so alignment of mixed scale-factors is used; moments must be exactly 8x the reference.
// Also checked: (K+1)**2 moments per run in order q-major, release before done, the number
// of multiply-accumulate issues (K+1)**2 (K+2) per image, no intermediate RAM read after
// release.
module tb_matmul;
  localparam int MAXORD = 4, NST = MAXORD + 1, K = 4;
  localparam int OW = $clog2(NST + 1), IAW = $clog2(NST * NST);
  localparam int W = 270, SFW = 14, AW = 302;
  localparam int WD = 6, HT = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start, idle, release_ib, done, ib_rd_en, moment_valid;
  logic [IAW-1:0] ib_rd_addr;
  logic [SFW+W-1:0] ib_rd_data;
  logic [AW-1:0] moment;
  logic [SFW-1:0] moment_sf;
  logic [OW-1:0] moment_p, moment_q;
  int checks = 0, failures = 0;
  matmul #(.MAXORD(MAXORD)) dut (.clk, .rst, .cfg_order(OW'(K)), .start, .idle, .release_ib,
    .done, .ib_rd_en, .ib_rd_addr, .ib_rd_data, .moment_valid, .moment, .moment_sf,
    .moment_p, .moment_q);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic longint binom(input int n, input int k);
    longint r = 1;
    for (int i = 1; i <= k; i++) r = r * (n - k + i) / i;
    return r;
  endfunction

  logic [SFW+W-1:0] ibmem [NST*NST];
  always @(posedge clk) if (ib_rd_en) ib_rd_data <= ibmem[ib_rd_addr];

  logic [7:0] img [HT][WD];
  logic signed [127:0] mref [NST][NST];
  longint yv [NST][NST];
  int run = 0, n_mom = 0, n_iss = 0;
  bit released = 0, read_after_release = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.iss_valid) n_iss++;
    if (release_ib) released = 1;
    if (ib_rd_en && released) read_after_release = 1;
    if (moment_valid) begin
      automatic logic signed [127:0] g = 128'($signed(moment)) <<< moment_sf;
      automatic logic signed [127:0] e = mref[moment_p][moment_q] * ((run == 2) ? 8 : 1);
      chk(int'(moment_q) == n_mom / (K + 1) && int'(moment_p) == n_mom % (K + 1), "moment order");
      chk(g == e, $sformatf("run %0d m(%0d,%0d) got %0d want %0d", run, moment_p, moment_q, g, e));
      n_mom++;
    end
  end

  task automatic do_run(input int r);
    run = r; n_mom = 0; n_iss = 0; released = 0; read_after_release = 0;
    for (int a = 0; a <= K; a++) for (int b = 0; b <= K; b++)
      ibmem[a * NST + b] = (r == 1) ? {14'd0, 270'(yv[a][b])}
                         : (a % 2 == 0) ? {14'd0, 270'(yv[a][b] * 8)} : {14'd3, 270'(yv[a][b])};
    start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    chk(n_mom == (K + 1) * (K + 1), "moment count");
    chk(released && !read_after_release, "release");
    chk(n_iss == (K + 1) * (K + 1) * (K + 2), $sformatf("issues %0d", n_iss));
    chk(idle, "idle after done");
  endtask

  initial begin
    start = 0;
    for (int y = 0; y < HT; y++) for (int x = 0; x < WD; x++) img[y][x] = 8'($urandom_range(0, 255));
    for (int a = 0; a <= K; a++) for (int b = 0; b <= K; b++) begin
      automatic longint yy = 0;
      automatic logic signed [127:0] mm = 0;
      for (int y = 0; y < HT; y++) for (int x = 0; x < WD; x++) begin
        automatic logic signed [127:0] t = 128'(img[y][x]);
        yy += longint'(img[y][x]) * binom(x + a, a) * binom(y + b, b);
        for (int i = 0; i < a; i++) t = t * x;
        for (int i = 0; i < b; i++) t = t * y;
        mm += t;
      end
      yv[a][b] = yy;
      mref[a][b] = mm;
    end
    repeat (2) @(negedge clk);
    rst = 0;
    do_run(1);
    do_run(2);
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
