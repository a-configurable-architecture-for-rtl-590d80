// tb_digital_filter: the digital filter module with its full 270-bit datapath at MAXORD = 4 on
// 10x7 images (order 4), and with a 16-bit datapath on the same pixels.
// The intermediate RAM writes are captured by the tb. With the 270-bit datapath no overflow
// occurs and every Y(r,s) must equal sum_x sum_y f(x,y) C(x+r,r) C(y+s,s) exactly (64-bit
// reference). With 16 bits the rows and columns overflow; Y(r,s)*2**sf must be within 1 % of
// the reference for the highest orders r = s = 4 (the largest value of each column, whose
// relative rounding error is smallest), and the scale-factor must be above zero.
// Timing: from start to done, gap-free, w*h + (K+1)*h + 4K + 7 cycles.
module tb_digital_filter;
  localparam int MAXORD = 4, NMAX = 12, MMAX = 12, NST = MAXORD + 1;
  localparam int OW = $clog2(NST + 1), XW = $clog2(NMAX + 1), YW = $clog2(MMAX + 1);
  localparam int IAW = $clog2(NST * NST);
  localparam int K = 4, WD = 10, HT = 7;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic cfg_load, start, col_go, ready_a, done_a, ready_b, done_b, pix_valid;
  logic [7:0] pixel;
  logic ibw_a, ibw_b;
  logic [IAW-1:0] iba_a, iba_b;
  logic [14+270-1:0] ibd_a;
  logic [14+16-1:0] ibd_b;
  int checks = 0, failures = 0;

  digital_filter #(.W(270), .MAXORD(MAXORD), .NMAX(NMAX), .MMAX(MMAX)) dut_a (
    .clk, .rst, .cfg_order(OW'(K)), .cfg_w(XW'(WD)), .cfg_h(YW'(HT)), .cfg_load, .start, .col_go,
    .ready(ready_a), .done(done_a), .pix_valid, .pixel, .pixel_sf(14'd0),
    .ib_wr_en(ibw_a), .ib_wr_addr(iba_a), .ib_wr_data(ibd_a));
  digital_filter #(.W(16), .MAXORD(MAXORD), .NMAX(NMAX), .MMAX(MMAX)) dut_b (
    .clk, .rst, .cfg_order(OW'(K)), .cfg_w(XW'(WD)), .cfg_h(YW'(HT)), .cfg_load, .start, .col_go,
    .ready(ready_b), .done(done_b), .pix_valid, .pixel, .pixel_sf(14'd0),
    .ib_wr_en(ibw_b), .ib_wr_addr(iba_b), .ib_wr_data(ibd_b));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic longint binom(input int n, input int k);
    longint r = 1;
    for (int i = 1; i <= k; i++) r = r * (n - k + i) / i;
    return r;
  endfunction

  logic [7:0] img [HT][WD];
  longint yref [NST][NST];
  int n_a = 0, n_b = 0, t0, t1;
  always @(posedge clk) if (!rst && ibw_a) begin
    automatic int r = int'(iba_a) / NST, s = int'(iba_a) % NST;
    n_a++;
    chk(ibd_a[283:270] == 0 && longint'(ibd_a[269:0]) == yref[r][s],
        $sformatf("Y(%0d,%0d) got %0d want %0d", r, s, ibd_a[269:0], yref[r][s]));
  end
  int maxsf = 0;
  always @(posedge clk) if (!rst && ibw_b) begin
    automatic int r = int'(iba_b) / NST, s = int'(iba_b) % NST;
    automatic longint g = longint'(ibd_b[15:0]) << ibd_b[29:16];
    automatic longint e = yref[r][s];
    automatic longint d = g > e ? g - e : e - g;
    n_b++;
    if (int'(ibd_b[29:16]) > maxsf) maxsf = ibd_b[29:16];
    if (r == K && s == K) chk(d * 100 <= e, $sformatf("scaled Y(%0d,%0d) %0d vs %0d", r, s, g, e));
  end
  always @(posedge clk) if (start) t0 = int'($time / 10);
  always @(posedge clk) if (done_a) t1 = int'($time / 10);

  initial begin
    cfg_load = 0; start = 0; col_go = 1; pix_valid = 0; pixel = 0;
    for (int y = 0; y < HT; y++) for (int x = 0; x < WD; x++) img[y][x] = 8'($urandom_range(0, 255));
    for (int r = 0; r <= K; r++) for (int s = 0; s <= K; s++) begin
      automatic longint acc = 0;
      for (int y = 0; y < HT; y++) for (int x = 0; x < WD; x++)
        acc += longint'(img[y][x]) * binom(x + r, r) * binom(y + s, s);
      yref[r][s] = acc;
    end
    repeat (2) @(negedge clk);
    rst = 0;
    cfg_load = 1; @(negedge clk); cfg_load = 0;
    while (!ready_a) @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    for (int y = HT - 1; y >= 0; y--) for (int x = WD - 1; x >= 0; x--) begin
      pixel = img[y][x]; pix_valid = 1; @(negedge clk);
    end
    pix_valid = 0;
    while (!ready_a || !ready_b) @(negedge clk);
    repeat (2) @(negedge clk);
    chk(n_a == (K + 1) * (K + 1) && n_b == (K + 1) * (K + 1), "all words written");
    chk(maxsf > 0, "16-bit datapath scaled");
    chk(t1 - t0 == WD * HT + (K + 1) * HT + 4 * K + 7, $sformatf("filtering cycles %0d", t1 - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
