// cascaded_filters: the m+1 cascaded filter structures, their overflow network and the
// shift-out of the two one-in-serial-out output chains.
//
// Stage 0 takes the scaled data and its token from the single scaler; stage r takes stage r-1's
// registered output. After an operation of N input samples, stage r holds
//   y_r = sum_k x(k) * C(N-k+r, r)          (k = 1..N, x(k) the k-th sample)
// which is captured into the serial chain selected by the operation's slot. The overflow
// conditions of all stages are ORed per slot (ovf[0], ovf[1]) and returned to every stage and
// to the single scaler. When the last active stage (index cfg_order) has captured, the chain
// of that slot is shifted towards stage 0 for cfg_order+1 cycles; stage 0's serial register is
// the filter data output, orders 0..cfg_order in that order, each word accompanied by the
// operation's final scale-factor (sf_next of the slot, latched at the final capture) and its
// order index.
//
// Third masking signal: mask3_clr clears it in every stage, and each cycle of mask3_shift
// shifts a one into stage 0, so shifting cfg_order+1 cycles activates stages 0..cfg_order.
//
// Rules the controller keeps (asserted): an operation has at least cfg_order+1 samples, so a
// chain is never captured while it is still shifting and the two chains never shift at once.
// Latency: the first output word appears cfg_order+1 cycles after stage 0 saw the last
// sample. Cascade, overflow OR and serial chains follow the document; the output timing is
// this design's choice.
module cascaded_filters #(
  parameter int W      = gm_pkg::W,
  parameter int SFW    = gm_pkg::SFW,
  parameter int MAXORD = gm_pkg::MAXORD,
  localparam int NST   = MAXORD + 1,
  localparam int OW    = $clog2(NST + 1)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [OW-1:0]  cfg_order,
  input  logic           mask3_clr,
  input  logic           mask3_shift,
  // scaled data token from the single scaler
  input  logic [W-1:0]   in_data,
  input  logic           in_valid,
  input  logic           in_first,
  input  logic           in_last,
  input  logic           in_slot,
  // updated scale-factors of the two slots (scale-factor + overflow) from the scaler
  input  logic [SFW-1:0] sf_next [2],
  output logic [1:0]     ovf,
  // filter data out
  output logic [W-1:0]   out_data,
  output logic [SFW-1:0] out_sf,
  output logic [OW-1:0]  out_idx,
  output logic           out_valid,
  output logic           out_last
);

  logic [W-1:0] d   [NST+1];
  logic         v   [NST+1];
  logic         f   [NST+1];
  logic         l   [NST+1];
  logic         sl  [NST+1];
  logic         m3  [NST+1];
  logic [1:0]   cond [NST];
  logic [1:0]   mask [NST];
  logic [W-1:0] ser  [NST+1][2];
  logic [W-1:0] ser_q [NST][2];
  logic [1:0]   shift;

  logic [1:0]     busy;
  logic [OW-1:0]  cnt   [2];
  logic [SFW-1:0] sf_lat [2];
  logic [1:0]     done_cap;

  assign d[0]  = in_data;
  assign v[0]  = in_valid;
  assign f[0]  = in_first;
  assign l[0]  = in_last;
  assign sl[0] = in_slot;
  assign m3[0] = 1'b1;
  assign ser[NST][0] = '0;
  assign ser[NST][1] = '0;

  for (genvar r = 0; r < NST; r++) begin : g_stage
    filter_structure #(.W(W)) u_fs (
      .clk, .rst,
      .in_data(d[r]), .in_valid(v[r]), .in_first(f[r]), .in_last(l[r]), .in_slot(sl[r]),
      .out_data(d[r+1]), .out_valid(v[r+1]), .out_first(f[r+1]), .out_last(l[r+1]),
      .out_slot(sl[r+1]),
      .ovf_in(ovf), .ovf_cond(cond[r]), .mask_q(mask[r]),
      .mask3_clr, .mask3_shift, .mask3_in(m3[r]), .mask3_q(m3[r+1]),
      .shift, .ser_in(ser[r+1]), .ser_q(ser_q[r])
    );
    assign ser[r][0] = ser_q[r][0];
    assign ser[r][1] = ser_q[r][1];
  end

  // overflow 0 / overflow 1: OR of the masked stage conditions
  always_comb begin
    ovf = '0;
    for (int r = 0; r < NST; r++) ovf |= cond[r];
  end

  // the last active stage captures its final output in this cycle
  always_comb begin
    done_cap = '0;
    for (int r = 0; r < NST; r++)
      if (OW'(r) == cfg_order && v[r] && l[r]) done_cap[sl[r]] = 1'b1;
  end

  assign shift = busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= '0;
      cnt[0]    <= '0;
      cnt[1]    <= '0;
      sf_lat[0] <= '0;
      sf_lat[1] <= '0;
    end else begin
      for (int s = 0; s < 2; s++) begin
        if (done_cap[s]) begin
          busy[s]   <= 1'b1;
          cnt[s]    <= '0;
          sf_lat[s] <= sf_next[s];
        end else if (busy[s]) begin
          cnt[s] <= cnt[s] + 1'b1;
          if (cnt[s] == cfg_order) busy[s] <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    out_valid = busy[0] | busy[1];
    out_data  = busy[1] ? ser_q[0][1] : ser_q[0][0];
    out_sf    = busy[1] ? sf_lat[1] : sf_lat[0];
    out_idx   = busy[1] ? cnt[1] : cnt[0];
    out_last  = out_valid && out_idx == cfg_order;
  end

  a_one_chain: assert property (@(posedge clk) disable iff (rst) !(busy[0] && busy[1]))
    else $error("both output chains shifting at once");
  a_no_recapture: assert property (@(posedge clk) disable iff (rst) (busy & done_cap) == '0)
    else $error("output chain captured while shifting");

endmodule
