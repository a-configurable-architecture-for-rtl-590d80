// tb_gm_control: host handshake and semaphores of the control unit, with the two modules
// modelled by the tb. Checks: a configuration written while the matrix module is busy is
// applied only once everything is idle (cfg_load one cycle, new values visible after it),
// image_ready low from cfg_we until then, start passed on only while ready, col_go low while
// the intermediate RAM is full, exactly one mm_start per filled RAM, release empties it.
module tb_gm_control;
  localparam int MAXORD = 59, NMAX = 512, MMAX = 512;
  localparam int OW = 6, XW = 10, YW = 10;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic cfg_we, start, image_ready, cfg_load, filt_ready, filt_done, filt_start, col_go;
  logic mm_idle, mm_release, mm_start;
  logic [OW-1:0] cfg_order_in, cfg_order;
  logic [XW-1:0] cfg_w_in, cfg_w;
  logic [YW-1:0] cfg_h_in, cfg_h;
  int checks = 0, failures = 0, n_mm_start = 0;
  gm_control #(.MAXORD(MAXORD), .NMAX(NMAX), .MMAX(MMAX)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(posedge clk) if (!rst && mm_start) n_mm_start++;

  initial begin
    cfg_we = 0; start = 0; filt_ready = 1; filt_done = 0; mm_idle = 1; mm_release = 0;
    cfg_order_in = 0; cfg_w_in = 0; cfg_h_in = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // configuration while idle
    cfg_order_in = 7; cfg_w_in = 64; cfg_h_in = 32; cfg_we = 1; #1;
    chk(!image_ready && !cfg_load, "ready low during cfg_we");
    @(negedge clk); cfg_we = 0; #1;
    chk(cfg_load, "load when idle");
    @(negedge clk);
    chk(cfg_order == 7 && cfg_w == 64 && cfg_h == 32, "configuration applied");
    chk(image_ready, "ready after load");
    // start handshake
    start = 1; #1; chk(filt_start, "start passed on"); @(negedge clk); start = 0;
    filt_ready = 0; start = 1; #1; chk(!filt_start && !image_ready, "start ignored when busy");
    @(negedge clk); start = 0;
    // end of column filtering fills the intermediate RAM
    filt_done = 1; @(negedge clk); filt_done = 0; filt_ready = 1; #1;
    chk(!col_go, "col_go low while full");
    chk(mm_start, "matrix module started");
    @(negedge clk); mm_idle = 0; #1;
    chk(!mm_start, "single start");
    // a configuration now must wait
    cfg_order_in = 3; cfg_w_in = 8; cfg_h_in = 8; cfg_we = 1; @(negedge clk); cfg_we = 0;
    repeat (5) begin #1; chk(!cfg_load && !image_ready, "configuration held while busy"); @(negedge clk); end
    mm_release = 1; @(negedge clk); mm_release = 0; #1;
    chk(col_go, "released");
    chk(!cfg_load, "still busy (matrix phase 2)");
    repeat (3) @(negedge clk);
    mm_idle = 1; #1;
    chk(cfg_load, "delayed load");
    @(negedge clk);
    chk(cfg_order == 3 && cfg_w == 8 && image_ready, "new configuration");
    chk(n_mm_start == 1, "one mm_start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
