// coef_gen: coefficient generator of the matrix multiplication module.
//
// The filters deliver binomial-weighted sums sum_u f(u)*C(u+r, r). Geometric moments need
// powers, u**p = sum_{r<=p} c(p,r) * C(u+r, r), with integer coefficients obeying
//   c(0,0) = 1,   c(p+1, r) = r*(c(p,r-1) - c(p,r)) - c(p,r)      (c = 0 outside 0<=r<=p)
// (c(p,r) = (-1)**(p-r) * r! * S(p+1, r+1), S = Stirling numbers of the second kind).
// The generator keeps exact rows in two dual-port RAMs of MAXORD+1 words: while one RAM holds
// row p and serves the multiplier (port A) and the generator (port B), the generator derives
// row p+1 into the other RAM. No multiplier is used: the factor r (at most MAXORD) is applied
// by shift-and-add over its bits, one addition per cycle, OW+3 cycles per coefficient.
// Each coefficient read out is normalised to a CW-bit mantissa with a scale-factor.
//
// Interface: restart begins at row 0; row_valid says that row row_idx can be read; advance
// (consumer finished with the row) moves to row_idx+1, dropping row_valid until that row is
// complete. rd_en/rd_idx read c(row_idx, rd_idx); coef/coef_sf follow two cycles later.
// The ping-pong RAMs and addition-only generation follow the document; the recurrence, the
// shift-and-add schedule and the exact-integer storage are this design's own.
module coef_gen #(
  parameter int MAXORD = gm_pkg::MAXORD,
  parameter int CW     = gm_pkg::CW,
  parameter int SFW    = gm_pkg::SFW,
  parameter int EW     = gm_pkg::COEF_EW,
  localparam int NST   = MAXORD + 1,
  localparam int OW    = $clog2(NST + 1)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [OW-1:0]  cfg_order,
  input  logic           restart,
  input  logic           advance,
  output logic           row_valid,
  output logic [OW-1:0]  row_idx,
  input  logic           rd_en,
  input  logic [OW-1:0]  rd_idx,
  output logic [CW-1:0]  coef,
  output logic [SFW-1:0] coef_sf
);

  typedef enum logic [2:0] {G_IDLE, G_RD, G_INIT, G_MUL, G_WR} gstate_t;

  logic [EW-1:0] ram0 [NST];
  logic [EW-1:0] ram1 [NST];
  logic          cur;          // RAM holding row row_idx
  logic          adv_pend;
  logic          next_ready;
  logic          started;
  gstate_t       gst;
  logic [OW-1:0] gr;           // index of the coefficient being generated
  logic [$clog2(OW)-1:0] bit_i;
  logic [EW-1:0] a_q, b_q, d_q, acc_q;
  logic [EW-1:0] pa_data, pb_data;
  logic [CW-1:0] n_mant;
  logic [SFW-1:0] n_shift;
  logic          wr_en;
  logic [EW-1:0] b_new;

  assign row_valid = started && !adv_pend;
  assign wr_en     = (gst == G_WR);

  // the two dual-port RAMs: port A reads for the multiplier, port B reads for the generator,
  // the generator writes the RAM not holding the current row
  always_ff @(posedge clk) begin
    if (wr_en && cur)  ram0[gr] <= acc_q;
    if (wr_en && !cur) ram1[gr] <= acc_q;
    if (rd_en)         pa_data <= cur ? ram1[rd_idx] : ram0[rd_idx];
    if (gst == G_RD)   pb_data <= cur ? ram1[gr] : ram0[gr];
  end

  sf_normalize #(.IW(EW), .OW(CW), .SFW(SFW)) u_norm (.in(pa_data), .mant(n_mant), .shift(n_shift));

  always_ff @(posedge clk) begin
    coef    <= n_mant;
    coef_sf <= n_shift;
  end

  assign b_new = (gr > row_idx) ? '0 : pb_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      cur        <= 1'b0;
      adv_pend   <= 1'b0;
      next_ready <= 1'b0;
      started    <= 1'b0;
      row_idx    <= '0;
      gst        <= G_IDLE;
      gr         <= '0;
      bit_i      <= '0;
      a_q        <= '0;
      b_q        <= '0;
      d_q        <= '0;
      acc_q      <= '0;
    end else if (restart) begin
      // row 0 = [1], written through the generator's write port into RAM 0
      cur        <= 1'b1;
      row_idx    <= '0;
      started    <= 1'b0;
      adv_pend   <= 1'b1;
      next_ready <= 1'b0;
      gr         <= '0;
      acc_q      <= EW'(1);
      gst        <= G_WR;
    end else begin
      if (advance) adv_pend <= 1'b1;
      unique case (gst)
        G_IDLE: begin
          if (adv_pend && next_ready) begin
            cur        <= ~cur;
            row_idx    <= started ? row_idx + 1'b1 : row_idx;
            started    <= 1'b1;
            adv_pend   <= 1'b0;
            next_ready <= 1'b0;
          end else if (started && !next_ready && row_idx < cfg_order && !adv_pend) begin
            gr  <= '0;
            a_q <= '0;
            gst <= G_RD;
          end
        end
        G_RD:   gst <= G_INIT;
        G_INIT: begin
          b_q   <= b_new;
          d_q   <= a_q - b_new;
          acc_q <= '0 - b_new;
          bit_i <= '0;
          gst   <= G_MUL;
        end
        G_MUL: begin
          if (gr[bit_i]) acc_q <= acc_q + (d_q << bit_i);
          bit_i <= bit_i + 1'b1;
          if (bit_i == $clog2(OW)'(OW - 1)) gst <= G_WR;
        end
        G_WR: begin
          a_q <= b_q;
          if (!started || gr == row_idx + 1'b1) begin
            next_ready <= 1'b1;
            gst        <= G_IDLE;
          end else begin
            gr  <= gr + 1'b1;
            gst <= G_RD;
          end
        end
        default: gst <= G_IDLE;
      endcase
    end
  end

endmodule
