// addr_gen1: address generator 1, the sequencer of the digital filter module.
//
// Per image it runs two passes through the one set of cascaded filters:
//  * row filtering: pixels arrive (reversed raster order, pix_valid may have gaps) and are cut
//    into rows of cfg_w samples (first/last flags to the scaler). The cascade returns
//    cfg_order+1 words per row, written to the row buffer at row*(MAXORD+1)+order; each row's
//    scale-factor goes to the scale-factor compare unit.
//  * column filtering, once col_go says the intermediate RAM is free: for each row order r the
//    cfg_h row results of order r are read back (address j*(MAXORD+1)+r, j = 0..cfg_h-1) and
//    streamed back into the scaler as one filtering operation. The cascade's words are written
//    to the intermediate RAM at r*(MAXORD+1)+s. When the last is written, done pulses.
// cfg_load (configuration written) first clears the third masking signal and shifts it down
// for cfg_order+1 cycles. ready is high while idle: the host may then pulse start.
// Operations are issued back to back, so column filtering takes about (cfg_order+1)*cfg_h
// cycles plus the cascade latency. The document names this unit; the loop order and the
// address layout are this design's own.
module addr_gen1 #(
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
  input  logic           clk,
  input  logic           rst,
  input  logic [OW-1:0]  cfg_order,
  input  logic [XW-1:0]  cfg_w,
  input  logic [YW-1:0]  cfg_h,
  input  logic           cfg_load,
  input  logic           start,
  input  logic           col_go,
  output logic           ready,
  output logic           done,
  // pixels
  input  logic           pix_valid,
  // scaler control
  output logic           sel_col,
  output logic           s_valid,
  output logic           s_first,
  output logic           s_last,
  // third masking signal control
  output logic           mask3_clr,
  output logic           mask3_shift,
  // cascade output words
  input  logic           c_valid,
  input  logic [OW-1:0]  c_idx,
  input  logic           c_last,
  // row buffer
  output logic           rb_wr_en,
  output logic [RAW-1:0] rb_wr_addr,
  output logic           rb_rd_en,
  output logic [RAW-1:0] rb_rd_addr,
  // scale-factor compare
  output logic           sfc_clr,
  output logic           sfc_valid,
  // intermediate RAM
  output logic           ib_wr_en,
  output logic [IAW-1:0] ib_wr_addr
);

  typedef enum logic [2:0] {S_IDLE, S_MLOAD, S_ROW, S_WAITCOL, S_COL, S_DRAIN} state_t;
  state_t state;

  logic [XW-1:0] x_cnt;
  logic [YW-1:0] y_cnt;    // row of the pixel stream / row read in column filtering
  logic [OW-1:0] r_cnt;    // order being read in column filtering
  logic [YW-1:0] wo_cnt;   // output operation counter (rows, then columns)
  logic [OW-1:0] ml_cnt;
  logic          rd_v, rd_f, rd_l;

  assign ready       = (state == S_IDLE);
  assign mask3_shift = (state == S_MLOAD);
  assign mask3_clr   = cfg_load && (state == S_IDLE);
  assign sel_col     = (state == S_COL) || (state == S_DRAIN);
  assign sfc_clr     = start && (state == S_IDLE);

  always_comb begin
    if (sel_col) begin
      s_valid = rd_v;
      s_first = rd_f;
      s_last  = rd_l;
    end else begin
      s_valid = (state == S_ROW) && pix_valid && (y_cnt != cfg_h);
      s_first = (x_cnt == '0);
      s_last  = (x_cnt == cfg_w - 1'b1);
    end
    rb_rd_en   = (state == S_COL);
    rb_rd_addr = RAW'(y_cnt) * RAW'(NST) + RAW'(r_cnt);
    rb_wr_en   = c_valid && (state == S_ROW || state == S_WAITCOL);
    rb_wr_addr = RAW'(wo_cnt) * RAW'(NST) + RAW'(c_idx);
    sfc_valid  = rb_wr_en && c_last;
    ib_wr_en   = c_valid && sel_col;
    ib_wr_addr = IAW'(wo_cnt) * IAW'(NST) + IAW'(c_idx);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      x_cnt  <= '0;
      y_cnt  <= '0;
      r_cnt  <= '0;
      wo_cnt <= '0;
      ml_cnt <= '0;
      rd_v   <= 1'b0;
      rd_f   <= 1'b0;
      rd_l   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      rd_v <= rb_rd_en;
      rd_f <= (y_cnt == '0);
      rd_l <= (y_cnt == cfg_h - 1'b1);
      unique case (state)
        S_IDLE: begin
          x_cnt  <= '0;
          y_cnt  <= '0;
          r_cnt  <= '0;
          wo_cnt <= '0;
          ml_cnt <= '0;
          if (cfg_load)   state <= S_MLOAD;
          else if (start) state <= S_ROW;
        end
        S_MLOAD: begin
          ml_cnt <= ml_cnt + 1'b1;
          if (ml_cnt == cfg_order) state <= S_IDLE;
        end
        S_ROW, S_WAITCOL: begin
          if (s_valid) begin
            if (s_last) begin
              x_cnt <= '0;
              y_cnt <= y_cnt + 1'b1;
            end else begin
              x_cnt <= x_cnt + 1'b1;
            end
          end
          if (c_valid && c_last) begin
            if (wo_cnt == cfg_h - 1'b1) begin
              wo_cnt <= '0;
              state  <= S_WAITCOL;
            end else begin
              wo_cnt <= wo_cnt + 1'b1;
            end
          end
          if (state == S_WAITCOL && col_go) begin
            y_cnt <= '0;
            state <= S_COL;
          end
        end
        S_COL: begin
          if (y_cnt == cfg_h - 1'b1) begin
            y_cnt <= '0;
            r_cnt <= r_cnt + 1'b1;
            if (r_cnt == cfg_order) state <= S_DRAIN;
          end else begin
            y_cnt <= y_cnt + 1'b1;
          end
          if (c_valid && c_last) wo_cnt <= wo_cnt + 1'b1;
        end
        S_DRAIN: begin
          if (c_valid && c_last) begin
            wo_cnt <= wo_cnt + 1'b1;
            if (wo_cnt == YW'(cfg_order)) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
