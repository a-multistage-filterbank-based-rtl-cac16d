// dft_filterbank: oversampled uniform DFT filter-bank channelizer.
//
// Splits a complex input stream into K equally spaced channels centred at
// w_k = 2*pi*k/K and brings each to baseband at 1/M of the input rate:
//     y_k[m] = sum_r h0[r] * x[n_f - r] * exp(-j*w_k*(n_f - r)),
// n_f being the newest sample of frame m. The structure is the polyphase
// one: polyphase_filter forms the K branch outputs u_l, the output
// modulation exp(-j*M*n*w_k) is applied, and a K-point IDFT (radix-2 FFT)
// produces all channels at once. Because M*w_k*n is a multiple of 2*pi/K,
// the modulation is done exactly and without multipliers as a circular
// rotation of the IDFT input, v_l = u_((l + n_f) mod K), which equals
// multiplying the IDFT outputs by exp(-j*w_k*n_f).
//
// K and M are free (K a power of two, N a multiple of K); with M < K the bank
// is oversampled by T = K/M and neighbouring passbands may overlap
// (D_PERMIL sets the overlap factor d of the prototype).
//
// Interface: one complex input sample per in_valid cycle. After every M-th
// input, out_valid pulses for one cycle three clock edges after that input
// was accepted, with all K channel samples on out_re/out_im at the input's
// scale (round to nearest, saturated to OUT_W bits). Active-low synchronous
// reset.
module dft_filterbank #(
  parameter int  K        = 16,
  parameter int  M        = 2,
  parameter int  N        = 144,
  parameter int  D_PERMIL = 40,
  parameter real BETA     = msfb_pkg::kaiser_beta(N, K, D_PERMIL),
  parameter int  COEF_W   = 16,
  parameter int  IN_W     = 18,
  parameter int  OUT_W    = 18
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_re [K],
  output logic signed [OUT_W-1:0] out_im [K]
);
  localparam int LK     = $clog2(K);
  localparam int V_FRAC = LK + 4;
  localparam int V_W    = IN_W + V_FRAC + 1;
  localparam int Y_W    = V_W + LK + 1;

  logic                   u_valid;
  logic signed [V_W-1:0]  u_re [K];
  logic signed [V_W-1:0]  u_im [K];
  logic [LK-1:0]          u_rot;

  polyphase_filter #(
    .K(K), .M(M), .N(N), .D_PERMIL(D_PERMIL), .BETA(BETA), .COEF_W(COEF_W),
    .IN_W(IN_W), .V_FRAC(V_FRAC), .V_W(V_W)
  ) u_poly (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .u_valid, .u_re, .u_im, .u_rot
  );

  // Output modulation as a circular rotation of the IDFT input.
  logic signed [V_W-1:0] v_re [K];
  logic signed [V_W-1:0] v_im [K];
  always_comb begin
    for (int l = 0; l < K; l++) begin
      v_re[l] = u_re[LK'(l + int'(u_rot))];
      v_im[l] = u_im[LK'(l + int'(u_rot))];
    end
  end

  logic signed [Y_W-1:0] y_re [K];
  logic signed [Y_W-1:0] y_im [K];

  idft_radix2 #(.K(K), .IN_W(V_W), .OUT_W(Y_W)) u_idft (
    .x_re(v_re), .x_im(v_im), .y_re, .y_im
  );

  function automatic logic signed [OUT_W-1:0] scale_sat(logic signed [Y_W-1:0] y);
    logic signed [Y_W-1:0] r;
    r = (y + (Y_W'(1) <<< (V_FRAC - 1))) >>> V_FRAC;
    if (r > Y_W'((2 ** (OUT_W - 1)) - 1)) return {1'b0, {(OUT_W-1){1'b1}}};
    if (r < -Y_W'(2 ** (OUT_W - 1)))      return {1'b1, {(OUT_W-1){1'b0}}};
    return OUT_W'(r);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < K; k++) begin
        out_re[k] <= '0;
        out_im[k] <= '0;
      end
    end else begin
      out_valid <= u_valid;
      if (u_valid) begin
        for (int k = 0; k < K; k++) begin
          out_re[k] <= scale_sat(y_re[k]);
          out_im[k] <= scale_sat(y_im[k]);
        end
      end
    end
  end
endmodule
