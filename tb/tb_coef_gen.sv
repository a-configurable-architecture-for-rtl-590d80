// tb_coef_gen: coefficient rows 0..8 with a 10-bit coefficient mantissa (so that
// normalisation is exercised: c(8,8) = 8! = 40320 does not fit).
// The reference rows are built by the tb with the same recurrence in 128-bit integers and
// checked against powers: sum_r c(p,r) C(u+r,r) = u**p for several u. Every coefficient read
// must satisfy |mant * 2**sf - c| <= 2**(sf-1), |mant| < 2**9, and |mant| >= 2**8 when sf > 0.
// The row handshake is exercised with fast and slow consumers: the consumer advancing faster
// than generation must see row_valid drop (counted), and rows must arrive in order.
module tb_coef_gen;
  localparam int MAXORD = 8, CW = 10, SFW = 8, EW = 40;
  localparam int OW = $clog2(MAXORD + 2);
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [OW-1:0] cfg_order, row_idx, rd_idx;
  logic restart, advance, row_valid, rd_en;
  logic [CW-1:0] coef; logic [SFW-1:0] coef_sf;
  int checks = 0, failures = 0, waits = 0;
  coef_gen #(.MAXORD(MAXORD), .CW(CW), .SFW(SFW), .EW(EW)) dut (.*);

  longint cref [MAXORD+1][MAXORD+1];

  function automatic longint binom(input int n, input int k);
    longint r = 1;
    for (int i = 1; i <= k; i++) r = r * (n - k + i) / i;
    return r;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (!rst && restart === 1'b0 && !row_valid && dut.started) waits++;

  task automatic run(input int k, input int slow);
    restart = 1; @(negedge clk); restart = 0;
    for (int p = 0; p <= k; p++) begin
      while (!row_valid) @(negedge clk);
      chk(int'(row_idx) == p, $sformatf("row order %0d != %0d", row_idx, p));
      for (int r = 0; r <= p; r++) begin
        longint c, g, d, half;
        rd_en = 1; rd_idx = OW'(r);
        @(negedge clk); rd_en = 0;
        @(negedge clk);
        c = cref[p][r];
        g = longint'($signed(coef)) <<< coef_sf;
        d = (g > c) ? g - c : c - g;
        half = (coef_sf == 0) ? 0 : (longint'(1) << (coef_sf - 1));
        chk(d <= half, $sformatf("c(%0d,%0d)=%0d got %0d*2^%0d", p, r, c, $signed(coef), coef_sf));
        chk($signed(coef) < 512 && $signed(coef) > -512 &&
            (coef_sf == 0 || $signed(coef) >= 256 || $signed(coef) <= -256), "normalised");
        repeat (slow) @(negedge clk);
      end
      advance = 1; @(negedge clk); advance = 0;
    end
  endtask

  initial begin
    cfg_order = MAXORD; restart = 0; advance = 0; rd_en = 0; rd_idx = 0;
    cref[0][0] = 1;
    for (int p = 1; p <= MAXORD; p++)
      for (int r = 0; r <= p; r++) begin
        longint a, b;
        a = (r > 0) ? cref[p-1][r-1] : 0;
        b = (r < p) ? cref[p-1][r] : 0;
        cref[p][r] = r * (a - b) - b;
      end
    for (int p = 0; p <= MAXORD; p++)
      for (int u = 0; u < 6; u++) begin
        automatic longint s = 0, pw = 1;
        for (int r = 0; r <= p; r++) s += cref[p][r] * binom(u + r, r);
        for (int i = 0; i < p; i++) pw *= u;
        chk(s == pw, "reference rows reproduce powers");
      end
    repeat (2) @(negedge clk);
    rst = 0;
    run(MAXORD, 0);
    chk(waits > 0, "fast consumer never waited");
    run(MAXORD, 12);
    cfg_order = 4;
    run(4, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
