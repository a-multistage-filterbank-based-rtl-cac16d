// idft_radix2: K-point inverse DFT, Y[k] = sum_l X[l] * exp(+j*2*pi*k*l/K),
// without the 1/K scaling, as a fully parallel radix-2 decimation-in-time FFT.
//
// The inputs are taken in bit-reversed order into log2(K) butterfly stages.
// Every twiddle factor is a constant: W = 1 and W = +j need no arithmetic,
// every other twiddle is realised with four multiplier-less CSD constant
// products (csd_const_mult), rounded back to the data scale. Words grow to
// IN_W + log2(K) + 1 bits through the stages so that nothing overflows.
//
// K must be a power of two (the channel counts of both filter banks are).
// Interface: combinational; one whole transform per evaluation. The caller
// registers the result.
module idft_radix2 #(
  parameter int K     = 16,
  parameter int IN_W  = 24,
  parameter int TW_F  = 14,                    // twiddle fraction bits
  parameter int OUT_W = IN_W + $clog2(K) + 1
) (
  input  logic signed [IN_W-1:0]  x_re [K],
  input  logic signed [IN_W-1:0]  x_im [K],
  output logic signed [OUT_W-1:0] y_re [K],
  output logic signed [OUT_W-1:0] y_im [K]
);
  localparam int LK = $clog2(K);
  localparam int PW = OUT_W + TW_F + 2;        // product width


  function automatic int bitrev(int v);
    int r = 0;
    for (int b = 0; b < LK; b++) if (v[b]) r |= 1 << (LK - 1 - b);
    return r;
  endfunction

  for (genvar s = 0; s < LK; s++) begin : g_stage
    localparam int HALF = 1 << s;
    // a_*: stage input, o_*: stage output
    logic signed [OUT_W-1:0] a_re [K], a_im [K], o_re [K], o_im [K];
    if (s == 0) begin : g_first
      for (genvar i = 0; i < K; i++) begin : g_in
        assign a_re[i] = OUT_W'(x_re[bitrev(i)]);
        assign a_im[i] = OUT_W'(x_im[bitrev(i)]);
      end
    end else begin : g_next
      assign a_re = g_stage[s-1].o_re;
      assign a_im = g_stage[s-1].o_im;
    end
    for (genvar b = 0; b < K / 2; b++) begin : g_bfly
      localparam int  GRP = b / HALF;
      localparam int  POS = b % HALF;
      localparam int  I0  = GRP * 2 * HALF + POS;
      localparam int  I1  = I0 + HALF;
      localparam real ANG = 2.0 * msfb_pkg::PI * POS / (2.0 * HALF);
      localparam longint WC = msfb_pkg::qround($cos(ANG) * (2.0 ** TW_F));
      localparam longint WS = msfb_pkg::qround($sin(ANG) * (2.0 ** TW_F));

      logic signed [OUT_W-1:0] t_re, t_im;

      if (POS == 0) begin : g_one
        assign t_re = a_re[I1];
        assign t_im = a_im[I1];
      end else if (4 * POS == 2 * HALF) begin : g_plus_j
        assign t_re = -a_im[I1];
        assign t_im = a_re[I1];
      end else begin : g_mult
        logic signed [PW-1:0] rc, rs, ic, is_, sum_re, sum_im;
        csd_const_mult #(.IN_W(OUT_W), .C(WC), .OUT_W(PW)) u_rc (.x(a_re[I1]), .y(rc));
        csd_const_mult #(.IN_W(OUT_W), .C(WS), .OUT_W(PW)) u_rs (.x(a_re[I1]), .y(rs));
        csd_const_mult #(.IN_W(OUT_W), .C(WC), .OUT_W(PW)) u_ic (.x(a_im[I1]), .y(ic));
        csd_const_mult #(.IN_W(OUT_W), .C(WS), .OUT_W(PW)) u_is (.x(a_im[I1]), .y(is_));
        assign sum_re = rc - is_ + (PW'(1) <<< (TW_F - 1));
        assign sum_im = rs + ic + (PW'(1) <<< (TW_F - 1));
        assign t_re = OUT_W'(sum_re >>> TW_F);
        assign t_im = OUT_W'(sum_im >>> TW_F);
      end

      assign o_re[I0] = a_re[I0] + t_re;
      assign o_im[I0] = a_im[I0] + t_im;
      assign o_re[I1] = a_re[I0] - t_re;
      assign o_im[I1] = a_im[I0] - t_im;
    end
  end

  assign y_re = g_stage[LK-1].o_re;
  assign y_im = g_stage[LK-1].o_im;
endmodule
