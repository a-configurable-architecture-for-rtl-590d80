// tb_gm_top: end-to-end test of the geometric moment generator.
// Two generators get the same host traffic: one with the full 270-bit datapath (no overflow
// at these image sizes, so its moments must be exact) and one with a 24-bit filter datapath,
// which overflows in row and column filtering and must stay within 2 % of the exact moments.
// Reference: m(p,q) = sum f(x,y) x**p y**q in 512-bit integers. Traffic: three images at
// order 5 (16x12, pixels with random gaps, sent back to back so that filtering of one image
// overlaps the matrix multiplication of the previous one), then a reconfiguration to order 3
// on 8x6 images. Every mechanism (overflows in both slots, both output chains, column
// alignment shifts, coefficient waits, semaphore stalls, overlap, input gaps,
// reconfiguration: the reset configuration plus two writes) is counted and must occur. The cycle count of gap-free filtering is
// checked against w*h + (K+1)*h + 4K + 7 (row pass, column pass, pipeline fill) plus the
// cycles column filtering waited for the intermediate RAM.
module tb_gm_top;
  localparam int MAXORD = 5;
  localparam int NMAX = 16, MMAX = 16;
  localparam int SFW = 14, CW = 33;
  localparam int OW = $clog2(MAXORD + 2);
  localparam int XW = $clog2(NMAX + 1), YW = $clog2(MMAX + 1);
  localparam int RW = 512;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic cfg_we, start, pixel_valid;
  logic [OW-1:0] cfg_order;
  logic [XW-1:0] cfg_w;
  logic [YW-1:0] cfg_h;
  logic [7:0] pixel;
  logic image_ready_a, image_ready_b;
  logic mv_a, mv_b;
  logic [269+CW-1:0] mom_a;
  logic [23+CW-1:0]  mom_b;
  logic [SFW-1:0] msf_a, msf_b;
  logic [OW-1:0] mp_a, mq_a, mp_b, mq_b;

  gm_top #(.W(270), .AW(270+CW-1), .MAXORD(MAXORD), .NMAX(NMAX), .MMAX(MMAX)) dut_a (
    .clk, .rst, .cfg_we, .cfg_order, .cfg_w, .cfg_h, .start, .image_ready(image_ready_a),
    .pixel_valid, .pixel, .pixel_sf('0), .moment_valid(mv_a), .moment(mom_a),
    .moment_sf(msf_a), .moment_p(mp_a), .moment_q(mq_a));
  gm_top #(.W(24), .AW(24+CW-1), .MAXORD(MAXORD), .NMAX(NMAX), .MMAX(MMAX)) dut_b (
    .clk, .rst, .cfg_we, .cfg_order, .cfg_w, .cfg_h, .start, .image_ready(image_ready_b),
    .pixel_valid, .pixel, .pixel_sf('0), .moment_valid(mv_b), .moment(mom_b),
    .moment_sf(msf_b), .moment_p(mp_b), .moment_q(mq_b));

  int checks = 0, failures = 0;
  logic [7:0] img [8][MMAX][NMAX];
  int img_k [8];
  logic [RW-1:0] ref_m [8][MAXORD+1][MAXORD+1];
  int got_a = 0, got_b = 0;
  int n_images = 0;
  real max_err_b = 0.0;

  // mechanism counters
  int c_ovf0, c_ovf1, c_chain0, c_chain1, c_align, c_coefwait, c_semwait, c_overlap, c_gap, c_cfg;
  initial begin
    c_ovf0 = 0; c_ovf1 = 0; c_chain0 = 0; c_chain1 = 0; c_align = 0; c_coefwait = 0;
    c_semwait = 0; c_overlap = 0; c_gap = 0; c_cfg = 0;
  end
  always @(posedge clk) if (!rst) begin
    if (dut_b.u_filt.ovf[0]) c_ovf0++;
    if (dut_b.u_filt.ovf[1]) c_ovf1++;
    if (dut_a.u_filt.u_casc.busy[0]) c_chain0++;
    if (dut_a.u_filt.u_casc.busy[1]) c_chain1++;
    if (dut_b.u_filt.u_scaler.sel_col && dut_b.u_filt.u_scaler.in_valid
        && dut_b.u_filt.u_scaler.sh != 0) c_align++;
    if (dut_a.u_mm.u_ag2.st == 2'd1 && !dut_a.u_mm.u_ag2.iss_valid) c_coefwait++;
    if (dut_a.u_filt.u_ag1.state == 3'd3 && !dut_a.u_filt.col_go) c_semwait++;
    if (dut_a.u_filt.u_ag1.state == 3'd2 && !dut_a.u_mm.idle) c_overlap++;
    if (dut_a.u_filt.u_ag1.state == 3'd2 && !pixel_valid) c_gap++;
    if (dut_a.cfg_load) c_cfg++;
  end

  function automatic logic [RW-1:0] pw(input int b, input int e);
    logic [RW-1:0] r = 1;
    for (int i = 0; i < e; i++) r = r * RW'(b);
    return r;
  endfunction

  task automatic make_ref(input int n, input int w, input int h, input int k);
    for (int p = 0; p <= k; p++)
      for (int q = 0; q <= k; q++) begin
        logic [RW-1:0] s = 0;
        for (int y = 0; y < h; y++)
          for (int x = 0; x < w; x++)
            s += RW'(img[n][y][x]) * pw(x, p) * pw(y, q);
        ref_m[n][p][q] = s;
      end
  endtask

  // value of a mantissa/scale-factor pair as a wide signed integer
  function automatic logic signed [RW-1:0] val(input logic signed [RW-1:0] m, input int sf);
    return m <<< sf;
  endfunction

  always @(posedge clk) if (!rst && mv_a) begin
    automatic logic signed [RW-1:0] v = val(RW'($signed(mom_a)), int'(msf_a));
    automatic int im = got_a_img();
    checks++;
    if (v != $signed(ref_m[im][mp_a][mq_a])) begin
      failures++;
      $display("FAIL exact image %0d m(%0d,%0d) got %0d sf %0d want %0d", im, mp_a, mq_a,
               $signed(mom_a), msf_a, ref_m[im][mp_a][mq_a]);
    end
    got_a++;
  end

  always @(posedge clk) if (!rst && mv_b) begin
    automatic int im = got_b_img();
    automatic logic signed [RW-1:0] v = val(RW'($signed(mom_b)), int'(msf_b));
    automatic logic signed [RW-1:0] d = v - $signed(ref_m[im][mp_b][mq_b]);
    automatic real rel;
    automatic logic [RW-1:0] q;
    if (d < 0) d = -d;
    q = d * RW'(100000) / ref_m[im][mp_b][mq_b];
    rel = real'(q[31:0]) / 1000.0;   // percent
    if (rel > max_err_b) max_err_b = rel;
    checks++;
    if (d * RW'(50) > ref_m[im][mp_b][mq_b]) begin
      failures++;
      $display("FAIL scaled image %0d m(%0d,%0d) error %f %%", im, mp_b, mq_b, rel);
    end
    got_b++;
  end

  function automatic int img_of(input int cnt);
    int acc = 0;
    for (int i = 0; i < 8; i++) begin
      acc += (img_k[i] + 1) ** 2;
      if (cnt < acc) return i;
    end
    return 7;
  endfunction
  function automatic int got_a_img(); return img_of(got_a); endfunction
  function automatic int got_b_img(); return img_of(got_b); endfunction

  task automatic configure(input int k, input int w, input int h);
    @(negedge clk);
    cfg_order = OW'(k); cfg_w = XW'(w); cfg_h = YW'(h);
    cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic send_image(input int k, input int w, input int h, input bit gaps);
    int n = n_images;
    img_k[n] = k;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) img[n][y][x] = 8'($urandom_range(1, 255));
    make_ref(n, w, h, k);
    n_images++;
    while (!(image_ready_a && image_ready_b)) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int y = h - 1; y >= 0; y--)
      for (int x = w - 1; x >= 0; x--) begin
        while (gaps && $urandom_range(0, 3) == 0) @(negedge clk);
        pixel = img[n][y][x];
        pixel_valid = 1;
        @(negedge clk);
        pixel_valid = 0;
      end
  endtask

  int t_start, t_done, expect_total, wc_img;
  always @(posedge clk) if (dut_a.filt_start) begin t_start = $time / 10; wc_img = 0; end
  always @(posedge clk) if (dut_a.u_filt.u_ag1.state == 3'd3) wc_img++;
  always @(posedge clk) if (dut_a.filt_done) t_done = $time / 10;

  initial begin
    cfg_we = 0; start = 0; pixel_valid = 0; pixel = 0;
    cfg_order = '0; cfg_w = '0; cfg_h = '0;
    for (int i = 0; i < 8; i++) img_k[i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    configure(5, 16, 12);
    send_image(5, 16, 12, 1'b1);
    send_image(5, 16, 12, 1'b1);
    send_image(5, 16, 12, 1'b0);
    while (got_a < 3 * 36 || got_b < 3 * 36) @(negedge clk);
    // gap-free filtering time of image 3: row pass + column pass + pipeline fill
    expect_total = 16 * 12 + 6 * 12 + 4 * 5 + 7 + (wc_img - 1);
    checks++;
    if (t_done - t_start != expect_total) begin
      failures++;
      $display("FAIL filtering took %0d cycles, expected %0d", t_done - t_start, expect_total);
    end
    configure(3, 8, 6);
    send_image(3, 8, 6, 1'b0);
    send_image(3, 8, 6, 1'b1);
    while (got_a < 3 * 36 + 2 * 16 || got_b < 3 * 36 + 2 * 16) @(negedge clk);
    repeat (20) @(negedge clk);
    $display("mechanisms: ovf0=%0d ovf1=%0d chain0=%0d chain1=%0d align=%0d coefwait=%0d semwait=%0d overlap=%0d gaps=%0d cfg=%0d",
             c_ovf0, c_ovf1, c_chain0, c_chain1, c_align, c_coefwait, c_semwait, c_overlap, c_gap, c_cfg);
    $display("max error of the 24-bit datapath: %f %%", max_err_b);
    checks++; if (c_ovf0 == 0)     begin failures++; $display("FAIL no slot-0 overflow"); end
    checks++; if (c_ovf1 == 0)     begin failures++; $display("FAIL no slot-1 overflow"); end
    checks++; if (c_chain0 == 0)   begin failures++; $display("FAIL chain 0 unused"); end
    checks++; if (c_chain1 == 0)   begin failures++; $display("FAIL chain 1 unused"); end
    checks++; if (c_align == 0)    begin failures++; $display("FAIL no column alignment shift"); end
    checks++; if (c_coefwait == 0) begin failures++; $display("FAIL no coefficient wait"); end
    checks++; if (c_semwait == 0)  begin failures++; $display("FAIL no semaphore stall"); end
    checks++; if (c_overlap == 0)  begin failures++; $display("FAIL no filter/matmul overlap"); end
    checks++; if (c_gap == 0)      begin failures++; $display("FAIL no input gap"); end
    checks++; if (c_cfg != 3)      begin failures++; $display("FAIL configuration count %0d", c_cfg); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
