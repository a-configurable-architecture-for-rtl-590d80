// digital_filter: the digital filter module. Pixels of an image, sent in reversed raster
// order (last pixel first), are filtered row by row in the cascaded filters; the row results
// (orders 0..cfg_order per row, one scale-factor per row) are kept in the row buffer (the RAM
// for the digital filters). Then the same cascade filters each order's column of row results,
// all aligned by the single scaler to the largest row scale-factor, and the column results
// Y(r,s) with one scale-factor per column operation are written to the intermediate RAM,
// which lies outside this module.
//
// With pixel f(x,y) (x < cfg_w, y < cfg_h) the results are
//   Y(r,s) * 2**sf(r) ~= sum_x sum_y f(x,y) * C(x+r, r) * C(y+s, s)
// (C = binomial coefficient), because reversing the sample order makes the cascade weight of
// sample x equal to C(x+r, r).
// Interface: ready/start/done handshake, pix_valid/pixel/pixel_sf stream (gaps allowed),
// col_go permits column filtering (intermediate RAM free), ib_* is the intermediate RAM
// write port, word = {scale-factor, data}.
// Timing: with pixels on every cycle after start and the intermediate RAM free, done pulses
// cfg_w*cfg_h + (cfg_order+1)*cfg_h + 4*cfg_order + 7 cycles after start (row pass, column
// pass, and twice the cascade depth plus the output shift for the pipeline fill).
// Module partition follows the document's top-level drawing.
module digital_filter #(
  parameter int W      = gm_pkg::W,
  parameter int SFW    = gm_pkg::SFW,
  parameter int PIXW   = gm_pkg::PIXW,
  parameter int MAXORD = gm_pkg::MAXORD,
  parameter int NMAX   = gm_pkg::NMAX,
  parameter int MMAX   = gm_pkg::MMAX,
  localparam int NST   = MAXORD + 1,
  localparam int OW    = $clog2(NST + 1),
  localparam int XW    = $clog2(NMAX + 1),
  localparam int YW    = $clog2(MMAX + 1),
  localparam int RAW   = $clog2(MMAX * NST),
  localparam int IAW   = $clog2(NST * NST)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [OW-1:0]   cfg_order,
  input  logic [XW-1:0]   cfg_w,
  input  logic [YW-1:0]   cfg_h,
  input  logic            cfg_load,
  input  logic            start,
  input  logic            col_go,
  output logic            ready,
  output logic            done,
  input  logic            pix_valid,
  input  logic [PIXW-1:0] pixel,
  input  logic [SFW-1:0]  pixel_sf,
  output logic            ib_wr_en,
  output logic [IAW-1:0]  ib_wr_addr,
  output logic [SFW+W-1:0] ib_wr_data
);

  logic           sel_col, s_valid, s_first, s_last;
  logic           mask3_clr, mask3_shift;
  logic           c_valid, c_last;
  logic [OW-1:0]  c_idx;
  logic [W-1:0]   c_data;
  logic [SFW-1:0] c_sf;
  logic           rb_wr_en, rb_rd_en;
  logic [RAW-1:0] rb_wr_addr, rb_rd_addr;
  logic [SFW+W-1:0] rb_rd_data;
  logic           sfc_clr, sfc_valid;
  logic [SFW-1:0] max_sf;
  logic [W-1:0]   sc_data;
  logic           sc_valid, sc_first, sc_last, sc_slot;
  logic [SFW-1:0] sf_next [2];
  logic [1:0]     ovf;

  addr_gen1 #(.MAXORD(MAXORD), .NMAX(NMAX), .MMAX(MMAX)) u_ag1 (
    .clk, .rst, .cfg_order, .cfg_w, .cfg_h, .cfg_load, .start, .col_go, .ready, .done,
    .pix_valid, .sel_col, .s_valid, .s_first, .s_last, .mask3_clr, .mask3_shift,
    .c_valid, .c_idx, .c_last, .rb_wr_en, .rb_wr_addr, .rb_rd_en, .rb_rd_addr,
    .sfc_clr, .sfc_valid, .ib_wr_en, .ib_wr_addr
  );

  single_scaler #(.W(W), .SFW(SFW), .PIXW(PIXW)) u_scaler (
    .clk, .rst, .sel_col, .pixel, .pixel_sf,
    .rf_data(rb_rd_data[W-1:0]), .rf_sf(rb_rd_data[SFW+W-1:W]),
    .in_valid(s_valid), .in_first(s_first), .in_last(s_last),
    .start_sf(sel_col ? max_sf : pixel_sf), .ovf,
    .out_data(sc_data), .out_valid(sc_valid), .out_first(sc_first), .out_last(sc_last),
    .out_slot(sc_slot), .sf_next
  );

  cascaded_filters #(.W(W), .SFW(SFW), .MAXORD(MAXORD)) u_casc (
    .clk, .rst, .cfg_order, .mask3_clr, .mask3_shift,
    .in_data(sc_data), .in_valid(sc_valid), .in_first(sc_first), .in_last(sc_last),
    .in_slot(sc_slot), .sf_next, .ovf,
    .out_data(c_data), .out_sf(c_sf), .out_idx(c_idx), .out_valid(c_valid), .out_last(c_last)
  );

  dp_ram #(.DW(SFW + W), .DEPTH(MMAX * NST)) u_row_ram (
    .clk, .wr_en(rb_wr_en), .wr_addr(rb_wr_addr), .wr_data({c_sf, c_data}),
    .rd_en(rb_rd_en), .rd_addr(rb_rd_addr), .rd_data(rb_rd_data)
  );

  sf_compare #(.SFW(SFW)) u_sfc (
    .clk, .rst, .clr(sfc_clr), .in_valid(sfc_valid), .in_sf(c_sf), .max_sf
  );

  assign ib_wr_data = {c_sf, c_data};

endmodule
