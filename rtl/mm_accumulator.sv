// mm_accumulator: pseudo floating-point accumulator of the matrix multiplication module.
// Sums a sequence of products (AW-bit mantissa, scale-factor) delimited by in_first/in_last.
// Each addition aligns the operand with the smaller scale-factor to the larger one by an
// arithmetic right shift with rounding; if the sum leaves the AW-bit range it is halved
// with rounding and the scale-factor is incremented, so no bits are lost at the top.
// The register keeps the partial sum; at in_last the finished sum appears on out_data/out_sf
// with out_valid one cycle later.
// Width follows the document's parameter table; the alignment rules are this design's own.
module mm_accumulator #(
  parameter int AW  = gm_pkg::AW,
  parameter int SFW = gm_pkg::SFW
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic           in_first,
  input  logic           in_last,
  input  logic [AW-1:0]  in_data,
  input  logic [SFW-1:0] in_sf,
  output logic           out_valid,
  output logic [AW-1:0]  out_data,
  output logic [SFW-1:0] out_sf
);

  logic [AW-1:0]  acc;
  logic [SFW-1:0] acc_sf;
  logic [AW-1:0]  base;
  logic [SFW-1:0] base_sf;
  logic [AW+1:0]  a, b, sum;
  logic [AW-1:0]  nxt;
  logic [SFW-1:0] nxt_sf;

  // arithmetic right shift with rounding of a sign-extended (AW+2)-bit value
  function automatic logic [AW+1:0] asr_round(input logic [AW+1:0] v, input logic [SFW-1:0] n);
    logic [AW+1:0] t;
    if (n == 0) return v;
    if (n > SFW'(AW + 1)) return '0;
    t = $signed(v) >>> (n - 1'b1);
    t = t + 1'b1;
    return $signed(t) >>> 1;
  endfunction

  always_comb begin
    base    = in_first ? '0 : acc;
    base_sf = in_first ? in_sf : acc_sf;
    if (in_sf >= base_sf) begin
      a      = asr_round({{2{base[AW-1]}}, base}, in_sf - base_sf);
      b      = {{2{in_data[AW-1]}}, in_data};
      nxt_sf = in_sf;
    end else begin
      a      = {{2{base[AW-1]}}, base};
      b      = asr_round({{2{in_data[AW-1]}}, in_data}, base_sf - in_sf);
      nxt_sf = base_sf;
    end
    sum = a + b;
    if (sum[AW+1:AW-1] != '0 && sum[AW+1:AW-1] != '1) begin
      sum    = asr_round(sum, SFW'(1));
      nxt_sf = nxt_sf + 1'b1;
    end
    nxt = sum[AW-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc       <= '0;
      acc_sf    <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sf    <= '0;
    end else begin
      out_valid <= in_valid && in_last;
      if (in_valid) begin
        acc    <= nxt;
        acc_sf <= nxt_sf;
        if (in_last) begin
          out_data <= nxt;
          out_sf   <= nxt_sf;
        end
      end
    end
  end

endmodule
