// tb_addr_gen2: the matrix multiplication sequencer at MAXORD = 6, configured order 4, with a
// coefficient generator model that needs 3 cycles after each advance. Every issued operation
// (phase, address, coefficient index, first/last, destination) is compared with the loop
// nest written out independently; release must come after the last phase-1 issue and before
// any phase-2 issue, done after the last one; issue stalls while the row is not ready.
module tb_addr_gen2;
  localparam int MAXORD = 6, NST = MAXORD + 1;
  localparam int OW = $clog2(NST + 1), IAW = $clog2(NST * NST);
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [OW-1:0] cfg_order, coef_row_idx, iss_cidx, iss_di, iss_dj;
  logic start, idle, release_ib, done, coef_restart, coef_advance, coef_row_valid;
  logic iss_valid, iss_phase, iss_first, iss_last;
  logic [IAW-1:0] iss_addr;
  int checks = 0, failures = 0;
  addr_gen2 #(.MAXORD(MAXORD)) dut (.*);

  typedef struct packed { logic ph; logic [IAW-1:0] a; logic [OW-1:0] c; logic f, l; logic [OW-1:0] i, j; } op_t;
  op_t expq [$];
  int wait_cnt = 0, stalls = 0;
  bit released = 0, finished = 0;
  int n_issue = 0;

  // coefficient generator model
  always @(posedge clk) begin
    if (rst) begin coef_row_valid <= 0; coef_row_idx <= 0; wait_cnt <= 0; end
    else if (coef_restart) begin coef_row_valid <= 0; coef_row_idx <= 0; wait_cnt <= 3; end
    else if (coef_advance) begin coef_row_valid <= 0; coef_row_idx <= coef_row_idx + 1; wait_cnt <= 3; end
    else if (wait_cnt > 0) begin wait_cnt <= wait_cnt - 1; if (wait_cnt == 1) coef_row_valid <= 1; end
  end

  always @(posedge clk) if (!rst) begin
    if (dut.st == 1 && !iss_valid) stalls++;
    if (release_ib) begin
      checks++;
      if (released || expq.size() == 0 || expq[0].ph != 1) begin failures++; $display("FAIL release timing"); end
      released = 1;
    end
    if (done) finished = 1;
    if (iss_valid) begin
      automatic op_t e = expq.pop_front();
      automatic op_t g = '{iss_phase, iss_addr, iss_cidx, iss_first, iss_last, iss_di, iss_dj};
      n_issue++;
      checks++;
      if (g != e) begin failures++; $display("FAIL issue %0d: got %h want %h", n_issue, g, e); end
      if (iss_phase && !released) begin failures++; $display("FAIL phase 2 before release"); end
    end
  end

  initial begin
    int k = 4;
    cfg_order = OW'(k); start = 0;
    for (int ph = 0; ph < 2; ph++)
      for (int o = 0; o <= k; o++)
        for (int i = 0; i <= k; i++)
          for (int kk = 0; kk <= o; kk++)
            expq.push_back('{1'(ph), ph ? IAW'(i * NST + kk) : IAW'(kk * NST + i), OW'(kk),
                             kk == 0, kk == o, ph ? OW'(i) : OW'(o), ph ? OW'(o) : OW'(i)});
    repeat (2) @(negedge clk);
    rst = 0;
    start = 1; @(negedge clk); start = 0;
    while (!finished) @(negedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL %0d issues missing", expq.size()); end
    checks++; if (!released) begin failures++; $display("FAIL no release"); end
    checks++; if (stalls == 0) begin failures++; $display("FAIL never stalled"); end
    checks++; if (!idle) begin failures++; $display("FAIL not idle at end"); end
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
