// mm_multiplier: the multiplier of the matrix multiplication module. Multiplies a W-bit
// two's complement data mantissa by a CW-bit coefficient mantissa and adds their
// scale-factors. Both mantissas are symmetric (never the most negative code), so the
// product fits AW = W+CW-1 bits. Tag bits (first/last of a sum) travel with the product.
// Timing: one register stage, out_* valid one cycle after in_valid.
// Widths follow the document's parameter table; the single-stage timing is this design's.
module mm_multiplier #(
  parameter int W   = gm_pkg::W,
  parameter int CW  = gm_pkg::CW,
  parameter int AW  = gm_pkg::AW,
  parameter int SFW = gm_pkg::SFW,
  parameter int TW  = 2
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic [TW-1:0]  in_tag,
  input  logic [W-1:0]   data,
  input  logic [SFW-1:0] data_sf,
  input  logic [CW-1:0]  coef,
  input  logic [SFW-1:0] coef_sf,
  output logic           out_valid,
  output logic [TW-1:0]  out_tag,
  output logic [AW-1:0]  prod,
  output logic [SFW-1:0] prod_sf
);

  logic signed [W+CW-1:0] full;

  assign full = $signed(data) * $signed(coef);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      prod      <= '0;
      prod_sf   <= '0;
    end else begin
      out_valid <= in_valid;
      out_tag   <= in_tag;
      prod      <= full[AW-1:0];
      prod_sf   <= data_sf + coef_sf;
    end
  end

endmodule
