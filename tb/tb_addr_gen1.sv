// tb_addr_gen1: the digital filter sequencer at MAXORD = 5, configured order 3, 6x5 images,
// with the cascade modelled by the tb (order+1 output words, 5 cycles after an operation's
// last sample). Checks: cfg_load clears and then shifts the third masking signal for
// order+1 cycles; rows are cut every 6 pixels (first/last); row words are written at
// row*(MAXORD+1)+idx and reported to the scale-factor compare unit once per row; column
// filtering waits for col_go, reads j*(MAXORD+1)+r for r outer, j inner, one cycle ahead of
// the scaler token; column words go to r*(MAXORD+1)+s of the intermediate RAM; done pulses
// once after the last word.
module tb_addr_gen1;
  localparam int MAXORD = 5, NMAX = 8, MMAX = 8, NST = MAXORD + 1;
  localparam int OW = $clog2(NST + 1), XW = $clog2(NMAX + 1), YW = $clog2(MMAX + 1);
  localparam int RAW = $clog2(MMAX * NST), IAW = $clog2(NST * NST);
  localparam int K = 3, WD = 6, HT = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [OW-1:0] cfg_order, c_idx;
  logic [XW-1:0] cfg_w;
  logic [YW-1:0] cfg_h;
  logic cfg_load, start, col_go, ready, done, pix_valid, sel_col, s_valid, s_first, s_last;
  logic mask3_clr, mask3_shift, c_valid, c_last, rb_wr_en, rb_rd_en, sfc_clr, sfc_valid, ib_wr_en;
  logic [RAW-1:0] rb_wr_addr, rb_rd_addr;
  logic [IAW-1:0] ib_wr_addr;
  int checks = 0, failures = 0;
  addr_gen1 #(.MAXORD(MAXORD), .NMAX(NMAX), .MMAX(MMAX)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // cascade model: after an operation's last sample, emit K+1 words 5 cycles later
  int emit_at [$];
  int cyc = 0, emit_idx = -1;
  always @(posedge clk) begin
    cyc++;
    if (!rst && s_valid && s_last) emit_at.push_back(cyc + 5);
    if (emit_idx < 0 && emit_at.size() > 0 && emit_at[0] == cyc) begin
      void'(emit_at.pop_front());
      emit_idx <= 0;
    end else if (emit_idx >= 0) emit_idx <= (emit_idx == K) ? -1 : emit_idx + 1;
  end
  assign c_valid = (emit_idx >= 0);
  assign c_idx = OW'(emit_idx < 0 ? 0 : emit_idx);
  assign c_last = c_valid && emit_idx == K;

  // expectations
  int n_shift = 0, n_clr = 0, n_sfc = 0, n_done = 0, n_first = 0, n_last = 0;
  int rbw = 0, rbr = 0, ibw = 0;
  bit col_seen_early = 0;
  logic rd_pend; int rd_j;
  always @(posedge clk) if (!rst) begin
    if (mask3_shift) n_shift++;
    if (mask3_clr) n_clr++;
    if (sfc_valid) n_sfc++;
    if (done) n_done++;
    if (s_valid && !sel_col && s_first) n_first++;
    if (s_valid && !sel_col && s_last) n_last++;
    if (rb_wr_en) begin
      chk(int'(rb_wr_addr) == (rbw / (K + 1)) * NST + rbw % (K + 1), "row buffer write address");
      rbw++;
    end
    if (sel_col && s_valid) begin
      chk(s_first == ((rbr - 1) % HT == 0) && s_last == ((rbr - 1) % HT == HT - 1), "column token");
    end
    if (rb_rd_en) begin
      chk(col_go, "column read without col_go");
      chk(int'(rb_rd_addr) == (rbr % HT) * NST + rbr / HT, "row buffer read address");
      rbr++;
    end
    if (ib_wr_en) begin
      chk(int'(ib_wr_addr) == (ibw / (K + 1)) * NST + ibw % (K + 1), "intermediate write address");
      ibw++;
    end
  end

  initial begin
    cfg_order = K; cfg_w = WD; cfg_h = HT; cfg_load = 0; start = 0; col_go = 0; pix_valid = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    cfg_load = 1; @(negedge clk); cfg_load = 0;
    while (!ready) @(negedge clk);
    chk(n_clr == 1 && n_shift == K + 1, $sformatf("mask load clr %0d shifts %0d", n_clr, n_shift));
    start = 1; @(negedge clk); start = 0;
    for (int i = 0; i < WD * HT; i++) begin
      if (i % 4 == 3) @(negedge clk);
      pix_valid = 1; @(negedge clk); pix_valid = 0;
    end
    repeat (40) @(negedge clk);
    chk(rbr == 0, "column filtering started without col_go");
    chk(n_first == HT && n_last == HT && n_sfc == HT && rbw == HT * (K + 1), "row pass");
    col_go = 1;
    while (!ready) @(negedge clk);
    repeat (3) @(negedge clk);
    chk(rbr == HT * (K + 1) && ibw == (K + 1) * (K + 1), "column pass");
    chk(n_done == 1, "done once");
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
