// csd_const_mult: multiplier-less product y = x * C for a constant C.
//
// The constant is recoded into canonical signed digits (CSD) at elaboration,
// so the product is a sum of shifted copies of x, added for a +1 digit and
// subtracted for a -1 digit. A 16-bit coefficient has at most 8 non-zero CSD
// digits and so costs at most 7 adders. This is the shift-and-add coefficient
// realisation the channelizer uses for every fixed coefficient (prototype
// filter taps, FFT twiddles, rate-changer filter taps). Sharing partial sums
// between coefficients (a multiplier block) is not done here.
//
// Interface: purely combinational; OUT_W must hold the full product
// (IN_W plus the bit length of C is always enough). No clock, no latency.
module csd_const_mult #(
  parameter int     IN_W  = 16,
  parameter longint C     = 1,
  parameter int     OUT_W = IN_W + 18
) (
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);
  localparam logic [63:0] POS = msfb_pkg::csd_pos(C);
  localparam logic [63:0] NEG = msfb_pkg::csd_neg(C);
  localparam int          NB  = (OUT_W < 64) ? OUT_W : 64;

  logic signed [OUT_W-1:0] xe;
  assign xe = OUT_W'(x);

  always_comb begin
    y = '0;
    for (int i = 0; i < NB; i++) begin
      if (POS[i]) y = y + (xe <<< i);
      if (NEG[i]) y = y - (xe <<< i);
    end
  end
endmodule
