// tb_single_scaler: alignment of samples to their operation's scale-factor.
// Checks the toggle (slot alternates on each first sample), loading of start_sf, increments on
// the slot's overflow, and the right-shift-and-round by (updated scale-factor - sample's
// scale-factor) against an independent computation, for both the pixel and the row-result
// source; the output is registered (one cycle).
module tb_single_scaler;
  localparam int W = 20, SFW = 6, PIXW = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic sel_col, in_valid, in_first, in_last;
  logic [PIXW-1:0] pixel;
  logic [SFW-1:0] pixel_sf, rf_sf, start_sf;
  logic [W-1:0] rf_data, out_data;
  logic [1:0] ovf;
  logic out_valid, out_first, out_last, out_slot;
  logic [SFW-1:0] sf_next [2];
  int checks = 0, failures = 0;
  single_scaler #(.W(W), .SFW(SFW), .PIXW(PIXW)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int rsr(input int v, input int n);   // round(v / 2**n), half up
    if (n == 0) return v;
    return (v + (1 << (n - 1))) >> n;
  endfunction

  int model_sf [2];
  int model_slot;
  initial begin
    sel_col = 0; in_valid = 0; in_first = 0; in_last = 0; pixel = 0; pixel_sf = 0;
    rf_sf = 0; start_sf = 0; rf_data = 0; ovf = 0;
    model_sf[0] = 0; model_sf[1] = 0; model_slot = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      int sh, want, din, dsf;
      automatic bit first = (i % 7 == 0);
      sel_col = (i >= 150);
      start_sf = SFW'($urandom_range(4, 9));
      din = sel_col ? $urandom_range(0, (1 << (W - 1)) - 1) : $urandom_range(0, 255);
      dsf = sel_col ? $urandom_range(0, 4) : 0;
      pixel = PIXW'(din); pixel_sf = SFW'(dsf); rf_data = W'(din); rf_sf = SFW'(dsf);
      ovf = 2'($urandom_range(0, 3)) & {$urandom_range(0, 4) == 0, $urandom_range(0, 4) == 0};
      in_valid = 1; in_first = first; in_last = 0;
      if (first) model_slot = 1 - model_slot;
      sh = (first ? int'(start_sf) : model_sf[model_slot] + int'(ovf[model_slot])) - dsf;
      if (!first && sh < 0) begin ovf = 0; sh = model_sf[model_slot] - dsf; end
      if (sh < 0) sh = 0;
      want = rsr(din, sh);
      @(negedge clk);
      for (int s = 0; s < 2; s++) model_sf[s] += int'(ovf[s]);
      if (first) model_sf[model_slot] = int'(start_sf);
      chk(out_valid && out_first == first && out_slot == 1'(model_slot), "token");
      chk(int'(out_data) == want, $sformatf("data %0d want %0d (shift %0d)", out_data, want, sh));
      chk(int'(sf_next[0]) == model_sf[0] + int'(ovf[0]) && int'(sf_next[1]) == model_sf[1] + int'(ovf[1]), "scale-factors");
      ovf = 0;
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
