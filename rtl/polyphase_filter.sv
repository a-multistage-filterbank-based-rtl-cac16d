// polyphase_filter: input delay chain and polyphase branch filters of an
// oversampled DFT filter bank (the part of the bank in front of the IDFT).
//
// The prototype low-pass h0[n] of length N is split into K polyphase
// components, E_l holding taps h0[p*K + l]. Samples enter a delay chain of N
// words; every M-th input sample ends a frame, and for that frame the block
// forms the K branch outputs
//     u_l = sum_{p=0}^{N/K-1} h0[p*K + l] * x[n_f - p*K - l],
// where n_f is the index of the newest sample. With M < K this is the
// oversampled form of the commutator-and-subfilter structure (oversampling
// T = K/M). Every coefficient product is a CSD shift-and-add (csd_const_mult).
//
// Prototype design (elaboration time): passband edge (1+d)*pi/K, stopband
// edge 2*pi/K, a Kaiser-windowed ideal low-pass with its cutoff midway
// between the two, unity DC gain, quantised to COEF_W bits with as many
// fraction bits as the largest tap allows. The band edges follow the
// channelizer configuration; the window method is this design's choice.
//
// Interface: in_valid/in_re/in_im, one complex sample per valid cycle.
// u_valid pulses one cycle per frame, two clock edges after the frame's last
// sample was accepted; u_re/u_im keep V_FRAC extra fraction bits relative to
// the input scale, u_rot = n_f mod K for the output modulation downstream.
// rst_n is an active-low synchronous reset that clears the delay chain.
module polyphase_filter #(
  parameter int  K        = 16,
  parameter int  M        = 2,
  parameter int  N        = 144,
  parameter int  D_PERMIL = 40,                 // overlap factor d in 1/1000
  parameter real BETA     = msfb_pkg::kaiser_beta(N, K, D_PERMIL),
  parameter int  COEF_W   = 16,
  parameter int  IN_W     = 18,
  parameter int  V_FRAC   = $clog2(K) + 4,
  parameter int  V_W      = IN_W + V_FRAC + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  output logic                    u_valid,
  output logic signed [V_W-1:0]   u_re [K],
  output logic signed [V_W-1:0]   u_im [K],
  output logic [$clog2(K)-1:0]    u_rot
);
  localparam int  P    = N / K;                 // taps per phase
  localparam int  LK   = $clog2(K);
  localparam int  PW   = IN_W + COEF_W + 1;     // product width
  localparam int  SW   = PW + $clog2(P) + 1;    // branch sum width
  localparam real WC   = ((1.0 + D_PERMIL / 1000.0) * msfb_pkg::PI / K
                          + 2.0 * msfb_pkg::PI / K) / 2.0;

  typedef longint coef_arr_t [N];

  function automatic real dc_sum();
    real s = 0.0;
    for (int i = 0; i < N; i++)
      s += msfb_pkg::ideal_lp(i, N, WC) * msfb_pkg::kaiser(i, N, BETA);
    return s;
  endfunction

  localparam real DC = dc_sum();

  function automatic real h_real(int n);
    return msfb_pkg::ideal_lp(n, N, WC) * msfb_pkg::kaiser(n, N, BETA) / DC;
  endfunction

  // The largest tap of a symmetric low-pass sits at the centre.
  function automatic int coef_frac();
    real pk = h_real(N / 2);
    int  f  = 0;
    while (pk * (2.0 ** (f + 1)) < (2.0 ** (COEF_W - 1)) - 1.0) f++;
    return f;
  endfunction

  localparam int CF = coef_frac();

  function automatic coef_arr_t design_coefs();
    coef_arr_t h;
    for (int i = 0; i < N; i++) h[i] = msfb_pkg::qround(h_real(i) * (2.0 ** CF));
    return h;
  endfunction

  localparam coef_arr_t H = design_coefs();

  // ------------------------------------------------------------ delay chain
  logic signed [IN_W-1:0] buf_re [N];
  logic signed [IN_W-1:0] buf_im [N];
  logic [$clog2(M+1)-1:0] phase;
  logic [LK-1:0]          n_idx;                // index of next sample mod K
  logic [LK-1:0]          rot_q;
  logic                   frame_pend;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        buf_re[i] <= '0;
        buf_im[i] <= '0;
      end
      phase      <= '0;
      n_idx      <= '0;
      rot_q      <= '0;
      frame_pend <= 1'b0;
    end else begin
      frame_pend <= 1'b0;
      if (in_valid) begin
        buf_re[0] <= in_re;
        buf_im[0] <= in_im;
        for (int i = 1; i < N; i++) begin
          buf_re[i] <= buf_re[i-1];
          buf_im[i] <= buf_im[i-1];
        end
        n_idx <= n_idx + 1'b1;
        if (int'(phase) == M - 1) begin
          phase      <= '0;
          frame_pend <= 1'b1;
          rot_q      <= n_idx;
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------------ branch filters E_l
  logic signed [PW-1:0] prod_re [N];
  logic signed [PW-1:0] prod_im [N];

  for (genvar i = 0; i < N; i++) begin : g_tap
    csd_const_mult #(.IN_W(IN_W), .C(H[i]), .OUT_W(PW)) u_mr (.x(buf_re[i]), .y(prod_re[i]));
    csd_const_mult #(.IN_W(IN_W), .C(H[i]), .OUT_W(PW)) u_mi (.x(buf_im[i]), .y(prod_im[i]));
  end

  logic signed [SW-1:0] sum_re [K];
  logic signed [SW-1:0] sum_im [K];

  always_comb begin
    for (int l = 0; l < K; l++) begin
      sum_re[l] = SW'(1) <<< (CF - V_FRAC - 1);  // rounding offset
      sum_im[l] = SW'(1) <<< (CF - V_FRAC - 1);
      for (int p = 0; p < P; p++) begin
        sum_re[l] = sum_re[l] + SW'(prod_re[p*K + l]);
        sum_im[l] = sum_im[l] + SW'(prod_im[p*K + l]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      u_valid <= 1'b0;
      u_rot   <= '0;
      for (int l = 0; l < K; l++) begin
        u_re[l] <= '0;
        u_im[l] <= '0;
      end
    end else begin
      u_valid <= frame_pend;
      if (frame_pend) begin
        u_rot <= rot_q;
        for (int l = 0; l < K; l++) begin
          u_re[l] <= V_W'(sum_re[l] >>> (CF - V_FRAC));
          u_im[l] <= V_W'(sum_im[l] >>> (CF - V_FRAC));
        end
      end
    end
  end

  initial begin
    assert (N % K == 0) else $error("N must be a multiple of K");
    assert (CF > V_FRAC) else $error("coefficient scale too small for V_FRAC");
  end
endmodule
