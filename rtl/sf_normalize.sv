// sf_normalize: reduces a wide two's complement number to a narrower mantissa plus a
// right-shift count (added to the scale-factor by the user). The shift is the smallest that
// makes the rounded magnitude fit below 2**(OW-1), so the result is symmetric: the mantissa
// never equals -2**(OW-1), which keeps the following signed product one bit narrower.
// Rounding is round half away from zero, on the magnitude. Purely combinational.
// This helper is this design's own; the widths it serves are the document's.
module sf_normalize #(
  parameter int IW  = gm_pkg::COEF_EW,
  parameter int OW  = gm_pkg::CW,
  parameter int SFW = gm_pkg::SFW
) (
  input  logic [IW-1:0]  in,
  output logic [OW-1:0]  mant,
  output logic [SFW-1:0] shift
);

  logic [IW-1:0] mag;
  logic [IW:0]   rounded;
  int            lead;
  int            k;

  always_comb begin
    mag  = in[IW-1] ? (~in + 1'b1) : in;
    lead = 0;
    for (int i = 0; i < IW; i++) if (mag[i]) lead = i;
    k = (lead > OW - 2) ? lead - (OW - 2) : 0;
    if (k == 0) rounded = {1'b0, mag};
    else        rounded = (({1'b0, mag} >> (k - 1)) + 1'b1) >> 1;
    if (rounded[OW-1]) begin          // rounding carried into bit OW-1
      rounded = rounded >> 1;
      k       = k + 1;
    end
    mant  = in[IW-1] ? (~rounded[OW-1:0] + 1'b1) : rounded[OW-1:0];
    shift = SFW'(k);
  end

endmodule
