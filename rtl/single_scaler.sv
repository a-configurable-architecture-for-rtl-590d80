// single_scaler: aligns every sample entering the cascaded filters to the scale-factor of the
// filtering operation it belongs to.
//
// Two scale-factor registers (scale-factor_0/1) serve the at most two filtering operations
// present in the cascade; a toggle flag selects the slot of the operation now entering and is
// inverted when a new operation starts (in_first). At the start the new slot's register is
// loaded with start_sf: the maximum row scale-factor for column filtering, the pixel
// scale-factor for row filtering. Each register is incremented when its operation overflows
// (ovf[0]/ovf[1] from the cascade). The incoming sample is right-shifted and rounded by the
// updated scale-factor of its slot minus the sample's own scale-factor, so it arrives in stage 0
// at the same exponent as the registers of its operation.
//
// A multiplexer selects the source: pixels (sel_col=0) or row filtering output data read back
// from the row buffer (sel_col=1), each with its scale-factor.
// Timing: one register stage; out_* is valid one cycle after in_valid. sf_next gives the
// scale-factors each slot will have after this clock edge, for the cascade's output tagging.
// Structure (toggle, two registers, subtract, right-shift and round, input multiplexers)
// follows the document; the exact rounding (round half up) is this design's choice.
module single_scaler #(
  parameter int W    = gm_pkg::W,
  parameter int SFW  = gm_pkg::SFW,
  parameter int PIXW = gm_pkg::PIXW
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            sel_col,
  input  logic [PIXW-1:0] pixel,
  input  logic [SFW-1:0]  pixel_sf,
  input  logic [W-1:0]    rf_data,
  input  logic [SFW-1:0]  rf_sf,
  input  logic            in_valid,
  input  logic            in_first,
  input  logic            in_last,
  input  logic [SFW-1:0]  start_sf,
  input  logic [1:0]      ovf,
  output logic [W-1:0]    out_data,
  output logic            out_valid,
  output logic            out_first,
  output logic            out_last,
  output logic            out_slot,
  output logic [SFW-1:0]  sf_next [2]
);

  logic           toggle;
  logic [SFW-1:0] sf_q [2];
  logic           slot;
  logic [SFW-1:0] cur_sf;
  logic [W-1:0]   din;
  logic [SFW-1:0] din_sf;
  logic [SFW:0]   sh;
  logic [W:0]     shifted;

  always_comb begin
    din    = sel_col ? rf_data : W'(pixel);
    din_sf = sel_col ? rf_sf : pixel_sf;
    slot   = (in_valid && in_first) ? ~toggle : toggle;
    for (int s = 0; s < 2; s++) sf_next[s] = sf_q[s] + SFW'(ovf[s]);
    cur_sf = (in_valid && in_first) ? start_sf : sf_next[slot];
    sh     = {1'b0, cur_sf} - {1'b0, din_sf};
    if (sh[SFW] || sh == '0) begin
      shifted = {1'b0, din};                      // no shift (a negative difference never occurs)
    end else if (sh > (SFW+1)'(W)) begin
      shifted = '0;
    end else begin
      shifted = (({1'b0, din} >> (sh - 1'b1)) + 1'b1) >> 1;   // right-shift and round
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      toggle    <= 1'b1;
      sf_q[0]   <= '0;
      sf_q[1]   <= '0;
      out_data  <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      out_slot  <= 1'b0;
    end else begin
      for (int s = 0; s < 2; s++) sf_q[s] <= sf_next[s];
      if (in_valid && in_first) begin
        toggle     <= ~toggle;
        sf_q[slot] <= start_sf;
      end
      out_data  <= shifted[W-1:0];
      out_valid <= in_valid;
      out_first <= in_first;
      out_last  <= in_last;
      out_slot  <= slot;
    end
  end

  a_no_negative_shift: assert property (@(posedge clk) disable iff (rst) in_valid |-> !sh[SFW])
    else $error("sample scale-factor above its operation's scale-factor");

endmodule
