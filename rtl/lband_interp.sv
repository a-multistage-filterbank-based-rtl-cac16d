// lband_interp: upsampler by L followed by the L-band filter H_L(z), the
// first two boxes of the programmable sample rate changer.
//
// Realised in polyphase form: for each input sample x[n] the block emits the
// L upsampled-and-filtered samples
//     v[n*L + rho] = sum_{p=0}^{PL-1} h[p*L + rho] * x[n - p],  rho = 0..L-1,
// so the filter never runs on the zero-stuffed samples. H_L is an L-th band
// (Nyquist) low-pass: a Kaiser-windowed sinc with cutoff pi/L, L*PL-1 taps,
// DC gain L (each phase has unity gain), so every L-th tap away from the
// centre is zero and one phase passes the input samples through unchanged.
// Tap count and window are this design's choices; a cascade of half-band
// filters is the alternative when L is a power of two. Products are CSD
// shift-and-add.
//
// Interface: one complex sample per in_valid. blk_valid pulses two clock
// edges later with the L output samples blk_re/blk_im[0..L-1] in time order,
// rounded and saturated to OUT_W bits at the input scale. Active-low
// synchronous reset.
module lband_interp #(
  parameter int  L      = 4,
  parameter int  PL     = 8,
  parameter real BETA   = 5.65,
  parameter int  COEF_W = 16,
  parameter int  IN_W   = 18,
  parameter int  OUT_W  = 18
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  output logic                    blk_valid,
  output logic signed [OUT_W-1:0] blk_re [L],
  output logic signed [OUT_W-1:0] blk_im [L]
);
  localparam int NL = L * PL;                   // tap slots, last one zero
  localparam int CF = COEF_W - 2;               // coefficient fraction bits
  localparam int PW = IN_W + COEF_W + 1;
  localparam int SW = PW + $clog2(PL) + 1;

  typedef longint coef_arr_t [NL];

  function automatic coef_arr_t design_coefs();
    coef_arr_t h;
    for (int i = 0; i < NL; i++) begin
      if (i == NL - 1) h[i] = 0;
      else h[i] = msfb_pkg::qround(L * msfb_pkg::ideal_lp(i, NL - 1, msfb_pkg::PI / L)
                                   * msfb_pkg::kaiser(i, NL - 1, BETA) * (2.0 ** CF));
    end
    return h;
  endfunction

  localparam coef_arr_t H = design_coefs();

  logic signed [IN_W-1:0] xd_re [PL];
  logic signed [IN_W-1:0] xd_im [PL];
  logic                   pend;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < PL; p++) begin
        xd_re[p] <= '0;
        xd_im[p] <= '0;
      end
      pend <= 1'b0;
    end else begin
      pend <= in_valid;
      if (in_valid) begin
        xd_re[0] <= in_re;
        xd_im[0] <= in_im;
        for (int p = 1; p < PL; p++) begin
          xd_re[p] <= xd_re[p-1];
          xd_im[p] <= xd_im[p-1];
        end
      end
    end
  end

  logic signed [PW-1:0] pr_re [NL];
  logic signed [PW-1:0] pr_im [NL];

  for (genvar i = 0; i < NL; i++) begin : g_tap
    localparam int PI_ = i / L;
    csd_const_mult #(.IN_W(IN_W), .C(H[i]), .OUT_W(PW)) u_mr (.x(xd_re[PI_]), .y(pr_re[i]));
    csd_const_mult #(.IN_W(IN_W), .C(H[i]), .OUT_W(PW)) u_mi (.x(xd_im[PI_]), .y(pr_im[i]));
  end

  function automatic logic signed [OUT_W-1:0] scale_sat(logic signed [SW-1:0] s);
    logic signed [SW-1:0] r;
    r = s >>> CF;
    if (r > SW'((2 ** (OUT_W - 1)) - 1)) return {1'b0, {(OUT_W-1){1'b1}}};
    if (r < -SW'(2 ** (OUT_W - 1)))      return {1'b1, {(OUT_W-1){1'b0}}};
    return OUT_W'(r);
  endfunction

  logic signed [SW-1:0] acc_re [L];
  logic signed [SW-1:0] acc_im [L];

  always_comb begin
    for (int rho = 0; rho < L; rho++) begin
      acc_re[rho] = SW'(1) <<< (CF - 1);
      acc_im[rho] = SW'(1) <<< (CF - 1);
      for (int p = 0; p < PL; p++) begin
        acc_re[rho] = acc_re[rho] + SW'(pr_re[p*L + rho]);
        acc_im[rho] = acc_im[rho] + SW'(pr_im[p*L + rho]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      blk_valid <= 1'b0;
      for (int rho = 0; rho < L; rho++) begin
        blk_re[rho] <= '0;
        blk_im[rho] <= '0;
      end
    end else begin
      blk_valid <= pend;
      if (pend) begin
        for (int rho = 0; rho < L; rho++) begin
          blk_re[rho] <= scale_sat(acc_re[rho]);
          blk_im[rho] <= scale_sat(acc_im[rho]);
        end
      end
    end
  end
endmodule
