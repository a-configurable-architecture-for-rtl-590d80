// tb_cascaded_filters: the cascade of MAXORD+1 = 5 stages driven like the single scaler
// would drive it, with the two slots alternating.
// Part 1 (32-bit operands, configured order 3): the document's example of four unit samples
// must give 4, 10, 20, 35; then random back-to-back operations of 4..9 samples with gaps must
// give y_r = sum_k x(k) C(N-k+r, r) for r = 0..3, in order, with the last word flagged.
// Part 2 (12-bit operands): large samples force overflows; the tb increments the slot's
// scale-factor like the scaler, and each output times 2**sf must be within 1 % of the exact
// value plus 16 units of the final scale (the roundings of one operation); the scale-factor
// must be above zero. In part 2 a single scaler aligns the samples.
// Latency: the first word of an operation appears cfg_order+1 cycles after its last sample.
module tb_cascaded_filters;
  localparam int MAXORD = 4;
  localparam int OW = $clog2(MAXORD + 2);
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic longint binom(input int n, input int k);
    longint r = 1;
    for (int i = 1; i <= k; i++) r = r * (n - k + i) / i;
    return r;
  endfunction

  // ---------- shared stimulus ----------
  logic [OW-1:0] cfg_order;
  logic mask3_clr, mask3_shift;
  logic [31:0] x;
  logic v, f, l, slot;
  logic [13:0] sf_next [2];
  logic [13:0] sf_q [2];

  // exact part
  logic [1:0] ovf_a;
  logic [31:0] od_a; logic [13:0] osf_a; logic [OW-1:0] oi_a; logic ov_a, ol_a;
  cascaded_filters #(.W(32), .SFW(14), .MAXORD(MAXORD)) dut_a (
    .clk, .rst, .cfg_order, .mask3_clr, .mask3_shift, .in_data(x), .in_valid(v), .in_first(f),
    .in_last(l), .in_slot(slot), .sf_next, .ovf(ovf_a), .out_data(od_a), .out_sf(osf_a),
    .out_idx(oi_a), .out_valid(ov_a), .out_last(ol_a));
  // overflowing part
  logic [1:0] ovf_b;
  logic [11:0] od_b; logic [13:0] osf_b; logic [OW-1:0] oi_b; logic ov_b, ol_b;
  logic [11:0] xb;
  logic [13:0] sfb_next [2];
  logic [11:0] sc_d; logic sc_v, sc_f, sc_l, sc_s;
  // in part 2 the samples reach the cascade through a single scaler, which keeps them
  // aligned with the scale-factor of their operation
  single_scaler #(.W(12), .SFW(14), .PIXW(11)) u_sc (
    .clk, .rst, .sel_col(1'b0), .pixel(xb[10:0]), .pixel_sf(14'd0), .rf_data('0), .rf_sf('0),
    .in_valid(v), .in_first(f), .in_last(l), .start_sf(14'd0), .ovf(ovf_b),
    .out_data(sc_d), .out_valid(sc_v), .out_first(sc_f), .out_last(sc_l), .out_slot(sc_s),
    .sf_next(sfb_next));
  cascaded_filters #(.W(12), .SFW(14), .MAXORD(MAXORD)) dut_b (
    .clk, .rst, .cfg_order, .mask3_clr, .mask3_shift, .in_data(sc_d), .in_valid(sc_v),
    .in_first(sc_f), .in_last(sc_l), .in_slot(sc_s), .sf_next(sfb_next), .ovf(ovf_b), .out_data(od_b),
    .out_sf(osf_b), .out_idx(oi_b), .out_valid(ov_b), .out_last(ol_b));

  // part 1 scale-factor bookkeeping (no overflow expected: must stay 0)
  always_comb for (int s = 0; s < 2; s++) begin
    sf_next[s]  = sf_q[s] + 14'(ovf_a[s]);
  end
  always @(posedge clk) begin
    for (int s = 0; s < 2; s++) begin
      sf_q[s]  <= (v && f && slot == 1'(s)) ? 14'd0 : sf_next[s];
    end
  end

  // expected outputs
  longint exp_q [$];
  int exp_ops [$];
  int order_now;
  int t_last, t_first_out, lat_checked = 0;
  bit part_b = 0;
  int opb = 0;
  longint expb [$];
  // xb samples scaled: since each cascade works at its own scale, dut_b gets the samples as is
  // and the tb checks value*2**sf against the exact sum (within 1 %).

  always @(posedge clk) if (!rst && ov_a && !part_b) begin
    automatic longint e = exp_q.pop_front();
    chk(od_a == 32'(e) && osf_a == 0, $sformatf("exact output idx %0d got %0d want %0d", oi_a, od_a, e));
    chk(ol_a == (oi_a == OW'(order_now)), "last flag");
  end
  int maxsf_b = 0;
  always @(posedge clk) if (!rst && ov_b && part_b) begin
    automatic longint e = expb.pop_front();
    automatic longint g = longint'(od_b) << osf_b;
    automatic longint d = (g > e) ? g - e : e - g;
    if (osf_b > maxsf_b) maxsf_b = osf_b;
    chk(d * 100 <= e + 1600 * (longint'(1) << osf_b), $sformatf("scaled output got %0d*2^%0d want %0d", od_b, osf_b, e));
  end

  task automatic op(input int n, input bit gaps, input int maxv);
    int xs [];
    xs = new[n];
    for (int k = 0; k < n; k++) xs[k] = (maxv == 0) ? 1 : $urandom_range(0, maxv);
    for (int r = 0; r <= order_now; r++) begin
      longint s = 0;
      for (int k = 1; k <= n; k++) s += longint'(xs[k-1]) * binom(n - k + r, r);
      if (part_b) expb.push_back(s); else exp_q.push_back(s);
    end
    slot = ~slot;
    for (int k = 0; k < n; k++) begin
      while (gaps && $urandom_range(0, 2) == 0) begin v = 0; @(negedge clk); end
      v = 1; f = (k == 0); l = (k == n - 1); x = 32'(xs[k]); xb = 12'(xs[k]);
      @(negedge clk);
    end
    v = 0; f = 0; l = 0;
  endtask

  always @(posedge clk) if (v && l && !part_b) t_last = $time;
  always @(posedge clk) if (ov_a && oi_a == 0 && !part_b && lat_checked == 0) begin
    lat_checked = 1;
    chk(($time - t_last) / 10 == order_now + 1, $sformatf("latency %0d", ($time - t_last) / 10));
  end

  initial begin
    v = 0; f = 0; l = 0; x = 0; xb = 0; slot = 1; mask3_clr = 0; mask3_shift = 0;
    cfg_order = 3; order_now = 3;
    repeat (2) @(negedge clk);
    rst = 0;
    mask3_clr = 1; @(negedge clk); mask3_clr = 0;
    mask3_shift = 1; repeat (4) @(negedge clk); mask3_shift = 0;
    op(4, 0, 0);                       // unit samples: 4, 10, 20, 35
    chk(exp_q[0] == 4 && exp_q[1] == 10 && exp_q[2] == 20 && exp_q[3] == 35, "example values");
    repeat (10) @(negedge clk);
    for (int i = 0; i < 12; i++) op($urandom_range(4, 9), i % 3 == 1, 200);
    repeat (30) @(negedge clk);
    chk(exp_q.size() == 0, "all words delivered");
    part_b = 1;
    for (int i = 0; i < 10; i++) op($urandom_range(5, 9), i % 2 == 1, 1500);
    repeat (30) @(negedge clk);
    chk(expb.size() == 0, "all scaled words delivered");
    chk(maxsf_b > 0, "overflow scaling happened");
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
