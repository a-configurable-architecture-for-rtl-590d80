// filter_structure: one stage of the cascaded feed-forward accumulator filters.
//
// The stage computes y(n) = B + y(n-1), where B is the previous stage's registered output (or
// the scaled input sample for stage 0), so no adder of the cascade depends on another adder in
// the same cycle. A token travels down the cascade with each partial sum: in_valid marks a new
// partial sum on in_data, in_first restarts the accumulation (the stage belongs to a new
// filtering operation), in_last marks the final partial sum of the operation, and in_slot tells
// which of the two filtering operations that can share the micro-pipeline it belongs to.
// The stage sums exactly one value per valid token, so after the last token its register holds
// the filter output for its order, which is captured into serial register ser_q[slot].
//
// Overflow: the operand range is kept non-negative below 2**(W-1), so the design's data can be
// used as two's complement later. If a sum reaches 2**(W-1), the stage raises ovf_cond[slot].
// The cascade ORs these into ovf_in[0/1]; every stage that currently belongs to an overflowing
// operation then divides its result by two with rounding (the divide-by-two-and-round circuit),
// including a stage that only holds its value this cycle, and so do the serial registers of
// that operation's chain. The scale-factor of the operation is incremented by one at the same
// clock edge in the single scaler.
//
// Masking signals: mask_q[0] and mask_q[1] (first and second masking signal) say that the
// stage currently belongs to the slot-0 or slot-1 operation; they are pipelined with the data
// tokens. mask3_q (third masking signal) is shifted down the cascade by the controller before
// computation starts and activates the stage; an inactive stage reports no overflow and
// captures nothing.
//
// Serial chains: ser_q[s] loads the stage output at capture, shifts in ser_in[s] from the next
// stage when shift[s] is high, otherwise holds (halving on that chain's overflow).
// Timing: all outputs are registered; one cycle of latency per stage.
// The adder, divide-by-two-and-round, maskers and two serial registers follow the document's
// stage drawing; the token encoding and the halving of held and captured values are this
// design's own way of keeping every value of an operation at one scale-factor.
module filter_structure #(
  parameter int W = gm_pkg::W
) (
  input  logic         clk,
  input  logic         rst,
  // filter structure input data and its token
  input  logic [W-1:0] in_data,
  input  logic         in_valid,
  input  logic         in_first,
  input  logic         in_last,
  input  logic         in_slot,
  // filter structure output data and pipelined token
  output logic [W-1:0] out_data,
  output logic         out_valid,
  output logic         out_first,
  output logic         out_last,
  output logic         out_slot,
  // overflow signals of the two operations (OR over the cascade) and this stage's conditions
  input  logic [1:0]   ovf_in,
  output logic [1:0]   ovf_cond,
  // first/second masking signals (stage belongs to slot 0 / slot 1 operation)
  output logic [1:0]   mask_q,
  // third masking signal chain
  input  logic         mask3_clr,
  input  logic         mask3_shift,
  input  logic         mask3_in,
  output logic         mask3_q,
  // one-in-serial-out chains
  input  logic [1:0]   shift,
  input  logic [W-1:0] ser_in  [2],
  output logic [W-1:0] ser_q   [2]
);

  logic [W:0]   sum;
  logic         add_ovf;
  logic         my_ovf;
  logic [W-1:0] acc_next;
  logic         capture;

  function automatic logic [W-1:0] half_round(input logic [W:0] v);
    logic [W+1:0] t;
    t = ({1'b0, v} + 1'b1) >> 1;
    return t[W-1:0];
  endfunction

  // overflow conditions: masker 1 (slot 0) and masker 2 (slot 1)
  assign sum         = (in_first ? '0 : {1'b0, out_data}) + {1'b0, in_data};
  assign add_ovf     = sum[W-1] | sum[W];
  assign ovf_cond[0] = in_valid && mask3_q && !in_slot && add_ovf;
  assign ovf_cond[1] = in_valid && mask3_q && in_slot && add_ovf;

  // masker 3: this stage's operation overflowed somewhere in the cascade
  always_comb begin
    my_ovf   = ovf_in[in_slot];
    acc_next = my_ovf ? half_round(sum) : sum[W-1:0];
    capture  = in_valid && in_last && mask3_q;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_data  <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      out_slot  <= 1'b0;
      mask_q    <= '0;
      mask3_q   <= 1'b0;
      ser_q[0]  <= '0;
      ser_q[1]  <= '0;
    end else begin
      out_valid <= in_valid;
      out_first <= in_first;
      out_last  <= in_last;
      out_slot  <= in_slot;
      if (in_valid) begin
        out_data <= acc_next;
      end else if ((mask_q[0] && ovf_in[0]) || (mask_q[1] && ovf_in[1])) begin
        out_data <= half_round({1'b0, out_data});
      end
      // masking signals: the stage belongs to an operation from its first to its last token
      for (int s = 0; s < 2; s++) begin
        if (in_valid && in_slot == 1'(s)) begin
          if (in_last)       mask_q[s] <= 1'b0;
          else if (in_first) mask_q[s] <= mask3_q;
        end
      end
      if (mask3_clr)        mask3_q <= 1'b0;
      else if (mask3_shift) mask3_q <= mask3_in;
      for (int s = 0; s < 2; s++) begin
        if (capture && in_slot == 1'(s)) ser_q[s] <= acc_next;
        else if (shift[s])               ser_q[s] <= ser_in[s];
        else if (ovf_in[s])              ser_q[s] <= half_round({1'b0, ser_q[s]});
      end
    end
  end

endmodule
