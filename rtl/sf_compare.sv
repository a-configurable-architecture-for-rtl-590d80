// sf_compare: scale-factor compare unit. Keeps the maximum of the scale-factors of the row
// filtering operations of one image; the single scaler starts every column filtering
// operation at this maximum, so all rows of a column are summed at one exponent.
// clr starts a new image; each in_valid cycle compares in_sf with the running maximum.
// max_sf is registered (one cycle after the last in_valid it is final).
// The document names the unit and its result; the running-maximum register is this design's.
module sf_compare #(
  parameter int SFW = gm_pkg::SFW
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           clr,
  input  logic           in_valid,
  input  logic [SFW-1:0] in_sf,
  output logic [SFW-1:0] max_sf
);

  always_ff @(posedge clk) begin
    if (rst || clr)                      max_sf <= '0;
    else if (in_valid && in_sf > max_sf) max_sf <= in_sf;
  end

endmodule
