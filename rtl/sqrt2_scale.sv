// sqrt2_scale: multiply a signed integer by sqrt(2) with shifts and adds.
//
// vo = 2*v - v/2 - v/16 - v/32 + v/128 = 1.4140625 * v (relative error
// 1.1e-4). The flow graph scales DCT outputs 3 and 5 by sqrt(2); building
// that constant from shifts and adds is this design's own choice, in the same
// multiplier-free spirit as the CORDIC rotators.
// Interface: combinational, W-bit two's complement in and out; the caller
// keeps one bit of headroom for the 1.41x growth. Right shifts truncate.
module sqrt2_scale
  import cordic_dct_pkg::*;
#(
  parameter int W = 16
) (
  input  logic signed [W-1:0] v,
  output logic signed [W-1:0] vo
);

  logic signed [W-1:0] acc;

  always_comb begin
    acc = v <<< 1;
    for (int j = 0; j < SQ2_N; j++) begin
      if (SQ2_SG[j] > 0) acc = acc + (v >>> SQ2_SH[j]);
      else               acc = acc - (v >>> SQ2_SH[j]);
    end
  end

  assign vo = acc;

endmodule
