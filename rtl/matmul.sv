// matmul: the matrix multiplication module. Converts the column filtering results Y(r,s)
// (read from the intermediate RAM) into geometric moments in two phases,
//   T = C * Y          (phase 1, written to the phase-1 buffer, the RAM of this module)
//   m = T * C^T        (phase 2, sent to the moment output)
// with C the lower-triangular coefficient matrix of the coefficient generator, so that
// m(p,q) = sum_x sum_y f(x,y) x**p y**q. One multiplier and one accumulator are shared by
// both phases; address generator 2 sequences them.
// Number format: every operand is a mantissa with a scale-factor. Phase-1 sums (AW bits) are
// normalised back to W bits before they are stored, so phase 2 reads the same format as
// phase 1.
// Interface: start begins phase 1 (the intermediate RAM must hold a complete image);
// release_ib pulses once phase 1 has read the last word of the intermediate RAM; done pulses
// after the last moment. Moments leave as (moment, moment_sf, moment_p, moment_q) with
// moment_valid, value = moment * 2**moment_sf, in order q-major, p-minor.
// Pipeline: issue, RAM/coefficient read (2 cycles), multiply (1), accumulate (1).
// Structure follows the document's top-level drawing; the normalisation point and the
// pipeline are this design's choices.
module matmul #(
  parameter int W      = gm_pkg::W,
  parameter int SFW    = gm_pkg::SFW,
  parameter int CW     = gm_pkg::CW,
  parameter int AW     = gm_pkg::AW,
  parameter int MAXORD = gm_pkg::MAXORD,
  parameter int EW     = gm_pkg::COEF_EW,
  localparam int NST   = MAXORD + 1,
  localparam int OW    = $clog2(NST + 1),
  localparam int IAW   = $clog2(NST * NST)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [OW-1:0]    cfg_order,
  input  logic             start,
  output logic             idle,
  output logic             release_ib,
  output logic             done,
  // intermediate RAM read port
  output logic             ib_rd_en,
  output logic [IAW-1:0]   ib_rd_addr,
  input  logic [SFW+W-1:0] ib_rd_data,
  // moments
  output logic             moment_valid,
  output logic [AW-1:0]    moment,
  output logic [SFW-1:0]   moment_sf,
  output logic [OW-1:0]    moment_p,
  output logic [OW-1:0]    moment_q
);

  logic           coef_restart, coef_advance, coef_row_valid;
  logic [OW-1:0]  coef_row_idx;
  logic           iss_valid, iss_phase, iss_first, iss_last;
  logic [IAW-1:0] iss_addr;
  logic [OW-1:0]  iss_cidx, iss_di, iss_dj;
  logic [CW-1:0]  coef;
  logic [SFW-1:0] coef_sf;
  logic [SFW+W-1:0] mb_rd_data;
  logic [SFW+W-1:0] rd_word_q;
  logic [1:0]     v_d, ph_d;
  logic [1:0]     tag_d [2];
  logic [2*OW-1:0] dst_d [4];
  logic [3:0]     dv_d;
  logic [3:0]     dph_d;
  logic           m_valid;
  logic [1:0]     m_tag;
  logic [AW-1:0]  m_prod;
  logic [SFW-1:0] m_sf;
  logic           a_valid;
  logic [AW-1:0]  a_data;
  logic [SFW-1:0] a_sf;
  logic [W-1:0]   n_mant;
  logic [SFW-1:0] n_shift;
  logic [OW-1:0]  wr_p, wr_s;

  addr_gen2 #(.MAXORD(MAXORD)) u_ag2 (
    .clk, .rst, .cfg_order, .start, .idle, .release_ib, .done,
    .coef_restart, .coef_advance, .coef_row_valid, .coef_row_idx,
    .iss_valid, .iss_phase, .iss_addr, .iss_cidx, .iss_first, .iss_last, .iss_di, .iss_dj
  );

  coef_gen #(.MAXORD(MAXORD), .CW(CW), .SFW(SFW), .EW(EW)) u_cg (
    .clk, .rst, .cfg_order, .restart(coef_restart), .advance(coef_advance),
    .row_valid(coef_row_valid), .row_idx(coef_row_idx),
    .rd_en(iss_valid), .rd_idx(iss_cidx), .coef, .coef_sf
  );

  assign ib_rd_en   = iss_valid && !iss_phase;
  assign ib_rd_addr = iss_addr;

  // phase-1 output buffer (RAM for the matrix multiplication module)
  dp_ram #(.DW(SFW + W), .DEPTH(NST * NST)) u_mm_ram (
    .clk,
    .wr_en(a_valid && !dph_d[3]), .wr_addr(IAW'(wr_p) * IAW'(NST) + IAW'(wr_s)),
    .wr_data({a_sf + n_shift, n_mant}),
    .rd_en(iss_valid && iss_phase), .rd_addr(iss_addr), .rd_data(mb_rd_data)
  );

  sf_normalize #(.IW(AW), .OW(W), .SFW(SFW)) u_norm (.in(a_data), .mant(n_mant), .shift(n_shift));

  // align the RAM word with the two-cycle coefficient read
  always_ff @(posedge clk) begin
    if (rst) begin
      v_d      <= '0;
      ph_d     <= '0;
      tag_d[0] <= '0;
      tag_d[1] <= '0;
      dv_d     <= '0;
      dph_d    <= '0;
      for (int j = 0; j < 4; j++) dst_d[j] <= '0;
      rd_word_q <= '0;
    end else begin
      v_d      <= {v_d[0], iss_valid};
      ph_d     <= {ph_d[0], iss_phase};
      tag_d[0] <= {iss_first, iss_last};
      tag_d[1] <= tag_d[0];
      rd_word_q <= ph_d[0] ? mb_rd_data : ib_rd_data;
      dst_d[0] <= {iss_di, iss_dj};
      for (int j = 1; j < 4; j++) dst_d[j] <= dst_d[j-1];
      dv_d     <= {dv_d[2:0], iss_valid};
      dph_d    <= {dph_d[2:0], iss_phase};
    end
  end

  mm_multiplier #(.W(W), .CW(CW), .AW(AW), .SFW(SFW), .TW(2)) u_mul (
    .clk, .rst, .in_valid(v_d[1]), .in_tag(tag_d[1]),
    .data(rd_word_q[W-1:0]), .data_sf(rd_word_q[SFW+W-1:W]), .coef, .coef_sf,
    .out_valid(m_valid), .out_tag(m_tag), .prod(m_prod), .prod_sf(m_sf)
  );

  mm_accumulator #(.AW(AW), .SFW(SFW)) u_acc (
    .clk, .rst, .in_valid(m_valid), .in_first(m_tag[1]), .in_last(m_tag[0]),
    .in_data(m_prod), .in_sf(m_sf), .out_valid(a_valid), .out_data(a_data), .out_sf(a_sf)
  );

  assign {wr_p, wr_s}  = dst_d[3];
  assign moment_valid  = a_valid && dph_d[3];
  assign moment        = a_data;
  assign moment_sf     = a_sf;
  assign moment_p      = wr_p;
  assign moment_q      = wr_s;

endmodule
