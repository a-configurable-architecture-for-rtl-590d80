// gm_control: the control of the geometric moment generator.
//
// Host side: the host writes the run-time configurable parameters (moment order K, image
// width and height) with cfg_we. They are held in a shadow register and applied once both
// modules are idle and the intermediate RAM is empty (earlier images finish with the old
// settings); the third masking signal of the cascade is then loaded (cfg_load). image_ready
// stays low from cfg_we until that load is complete (K+1 cycles after it). Reset selects
// the largest configuration (MAXORD, NMAX x MMAX) and loads it the same way. While
// image_ready is high the host asserts start (start row filtering) and sends the image.
// Inside, a semaphore marks the intermediate RAM as full from the end of column filtering
// (filt_done) to the moment the matrix multiplication has read it (mm_release). Column
// filtering of the next image may begin only while it is empty (col_go), and phase 1 of the
// matrix multiplication is started (mm_start) when it is full and the module is idle.
// So row filtering of image i+1 overlaps the matrix multiplication of image i.
// All outputs but cfg_* are combinational from registered state.
// The host handshake and the semaphores follow the document; the encodings are this design's.
module gm_control #(
  parameter int MAXORD = gm_pkg::MAXORD,
  parameter int NMAX   = gm_pkg::NMAX,
  parameter int MMAX   = gm_pkg::MMAX,
  localparam int NST   = MAXORD + 1,
  localparam int OW    = $clog2(NST + 1),
  localparam int XW    = $clog2(NMAX + 1),
  localparam int YW    = $clog2(MMAX + 1)
) (
  input  logic          clk,
  input  logic          rst,
  // host
  input  logic          cfg_we,
  input  logic [OW-1:0] cfg_order_in,
  input  logic [XW-1:0] cfg_w_in,
  input  logic [YW-1:0] cfg_h_in,
  input  logic          start,
  output logic          image_ready,
  // configuration to the modules
  output logic [OW-1:0] cfg_order,
  output logic [XW-1:0] cfg_w,
  output logic [YW-1:0] cfg_h,
  output logic          cfg_load,
  // digital filter module
  input  logic          filt_ready,
  input  logic          filt_done,
  output logic          filt_start,
  output logic          col_go,
  // matrix multiplication module
  input  logic          mm_idle,
  input  logic          mm_release,
  output logic          mm_start
);

  logic ib_full;
  logic mm_claimed;
  logic all_idle;
  logic cfg_pend;
  logic [OW-1:0] sh_order;
  logic [XW-1:0] sh_w;
  logic [YW-1:0] sh_h;

  assign all_idle    = filt_ready && mm_idle && !ib_full;
  assign cfg_load    = cfg_pend && !cfg_we && all_idle;
  assign image_ready = filt_ready && !cfg_we && !cfg_pend;
  assign filt_start  = start && image_ready;
  assign col_go      = !ib_full;
  assign mm_start    = ib_full && !mm_claimed && mm_idle;

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg_order  <= OW'(MAXORD);
      cfg_w      <= XW'(NMAX);
      cfg_h      <= YW'(MMAX);
      ib_full    <= 1'b0;
      mm_claimed <= 1'b0;
      cfg_pend   <= 1'b1;             // load the reset configuration's mask too
      sh_order   <= OW'(MAXORD);
      sh_w       <= XW'(NMAX);
      sh_h       <= YW'(MMAX);
    end else begin
      if (cfg_we) begin
        sh_order <= cfg_order_in;
        sh_w     <= cfg_w_in;
        sh_h     <= cfg_h_in;
        cfg_pend <= 1'b1;
      end else if (cfg_load) begin
        cfg_order <= sh_order;
        cfg_w     <= sh_w;
        cfg_h     <= sh_h;
        cfg_pend  <= 1'b0;
      end
      if (filt_done)      ib_full <= 1'b1;
      else if (mm_release) ib_full <= 1'b0;
      if (mm_start)        mm_claimed <= 1'b1;
      else if (mm_release) mm_claimed <= 1'b0;
    end
  end

  a_cfg_range: assert property (@(posedge clk) disable iff (rst)
      cfg_we |-> (cfg_order_in <= OW'(MAXORD) && cfg_w_in > XW'(cfg_order_in)
                  && cfg_h_in > YW'(cfg_order_in) && cfg_w_in <= XW'(NMAX) && cfg_h_in <= YW'(MMAX)))
    else $error("configuration out of range");
  a_no_double_fill: assert property (@(posedge clk) disable iff (rst) filt_done |-> !ib_full)
    else $error("intermediate RAM overwritten before it was read");

endmodule
