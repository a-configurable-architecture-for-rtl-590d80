// gm_top: geometric moment generator. Computes the full set of geometric moments
//   m(p,q) = sum_x sum_y f(x,y) * x**p * y**q,   0 <= p, q <= K
// of an 8-bit image of up to NMAX x MMAX pixels, with K (up to MAXORD) and the image size set
// at run time. The digital filter module turns the image into binomial-weighted sums with one
// time-shared cascade of accumulators (row filtering, then column filtering of the row
// results); the intermediate RAM hands these to the matrix multiplication module, which
// converts them into moments with generated coefficients. The two modules run concurrently on
// consecutive images.
//
// Host protocol: write cfg_order/cfg_w/cfg_h with cfg_we while idle, wait for image_ready,
// pulse start and send cfg_w*cfg_h pixels with pixel_valid in reversed raster order (the
// pixel at x = cfg_w-1, y = cfg_h-1 first; x decreases fastest). Moments come out later as
// moment * 2**moment_sf (moment is two's complement) with indices moment_p, moment_q and
// moment_valid, (K+1)**2 of them per image. cfg_w and cfg_h must exceed cfg_order.
// After reset the largest configuration (MAXORD, NMAX x MMAX) is loaded by itself.
// One clock domain, synchronous active-high reset.
// The split into two modules joined by an intermediate RAM, the widths and the host
// signals follow the document; the single clock (the document synthesises the two modules in
// two clock domains), the output order (q-major) and the port encodings are this design's.
module gm_top #(
  parameter int W      = gm_pkg::W,
  parameter int SFW    = gm_pkg::SFW,
  parameter int PIXW   = gm_pkg::PIXW,
  parameter int CW     = gm_pkg::CW,
  parameter int AW     = gm_pkg::AW,
  parameter int MAXORD = gm_pkg::MAXORD,
  parameter int NMAX   = gm_pkg::NMAX,
  parameter int MMAX   = gm_pkg::MMAX,
  parameter int EW     = gm_pkg::COEF_EW,
  localparam int NST   = MAXORD + 1,
  localparam int OW    = $clog2(NST + 1),
  localparam int XW    = $clog2(NMAX + 1),
  localparam int YW    = $clog2(MMAX + 1),
  localparam int IAW   = $clog2(NST * NST)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            cfg_we,
  input  logic [OW-1:0]   cfg_order,
  input  logic [XW-1:0]   cfg_w,
  input  logic [YW-1:0]   cfg_h,
  input  logic            start,
  output logic            image_ready,
  input  logic            pixel_valid,
  input  logic [PIXW-1:0] pixel,
  input  logic [SFW-1:0]  pixel_sf,
  output logic            moment_valid,
  output logic [AW-1:0]   moment,
  output logic [SFW-1:0]  moment_sf,
  output logic [OW-1:0]   moment_p,
  output logic [OW-1:0]   moment_q
);

  logic [OW-1:0]    k_q;
  logic [XW-1:0]    w_q;
  logic [YW-1:0]    h_q;
  logic             cfg_load, filt_ready, filt_done, filt_start, col_go;
  logic             mm_idle, mm_release, mm_start, mm_done;
  logic             ib_wr_en, ib_rd_en;
  logic [IAW-1:0]   ib_wr_addr, ib_rd_addr;
  logic [SFW+W-1:0] ib_wr_data, ib_rd_data;

  gm_control #(.MAXORD(MAXORD), .NMAX(NMAX), .MMAX(MMAX)) u_ctrl (
    .clk, .rst, .cfg_we, .cfg_order_in(cfg_order), .cfg_w_in(cfg_w), .cfg_h_in(cfg_h),
    .start, .image_ready, .cfg_order(k_q), .cfg_w(w_q), .cfg_h(h_q), .cfg_load,
    .filt_ready, .filt_done, .filt_start, .col_go,
    .mm_idle, .mm_release, .mm_start
  );

  digital_filter #(.W(W), .SFW(SFW), .PIXW(PIXW), .MAXORD(MAXORD), .NMAX(NMAX), .MMAX(MMAX)) u_filt (
    .clk, .rst, .cfg_order(k_q), .cfg_w(w_q), .cfg_h(h_q), .cfg_load,
    .start(filt_start), .col_go, .ready(filt_ready), .done(filt_done),
    .pix_valid(pixel_valid), .pixel, .pixel_sf,
    .ib_wr_en, .ib_wr_addr, .ib_wr_data
  );

  // intermediate RAM: column filtering results, one {scale-factor, data} word per Y(r,s)
  dp_ram #(.DW(SFW + W), .DEPTH(NST * NST)) u_inter_ram (
    .clk, .wr_en(ib_wr_en), .wr_addr(ib_wr_addr), .wr_data(ib_wr_data),
    .rd_en(ib_rd_en), .rd_addr(ib_rd_addr), .rd_data(ib_rd_data)
  );

  matmul #(.W(W), .SFW(SFW), .CW(CW), .AW(AW), .MAXORD(MAXORD), .EW(EW)) u_mm (
    .clk, .rst, .cfg_order(k_q), .start(mm_start), .idle(mm_idle), .release_ib(mm_release),
    .done(mm_done), .ib_rd_en, .ib_rd_addr, .ib_rd_data,
    .moment_valid, .moment, .moment_sf, .moment_p, .moment_q
  );

endmodule
