// tb_polyphase_filter: checks the polyphase branch outputs of the 16-channel,
// decimate-by-2, 144-tap configuration.
//
// The testbench designs its own copy of the prototype (Kaiser-windowed ideal
// low-pass, cutoff midway between (1+d)pi/K and 2pi/K, unity DC gain,
// quantised to 16 bits) and recomputes every branch output
//   u_l = round( sum_p h[pK+l] x[n_f-pK-l] / 2^(CF-V_FRAC) )
// with ordinary integer arithmetic, so the CSD products, the folding and the
// frame timing are all checked bit-exactly. Input samples arrive with random
// gaps. It also checks the frame rotation index n_f mod K, that a frame comes
// every M accepted samples two clock edges after the last one, and the DC
// gain of the prototype with a constant input.
module tb_polyphase_filter;
  localparam int  K = 16, M = 2, N = 144, D = 40, P = N / K;
  localparam int  IN_W = 18, V_FRAC = 8, V_W = IN_W + V_FRAC + 1;
  localparam real BETA = 7.857;
  localparam real PI = 3.14159265358979323846;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [IN_W-1:0] in_re = 0, in_im = 0;
  logic u_valid;
  logic signed [V_W-1:0] u_re [K], u_im [K];
  logic [3:0] u_rot;

  polyphase_filter #(.K(K), .M(M), .N(N), .D_PERMIL(D), .BETA(BETA), .IN_W(IN_W),
                     .V_FRAC(V_FRAC), .V_W(V_W)) dut (.*);

  always #5 clk = ~clk;

  // ---------------------------------------------------- reference prototype
  function automatic real i0(real x);
    real s = 1.0, t = 1.0;
    for (int k = 1; k < 50; k++) begin t = t * (x / (2.0 * k)) ** 2; s += t; end
    return s;
  endfunction
  function automatic real proto(int n);
    real wc = ((1.0 + D / 1000.0) * PI / K + 2.0 * PI / K) / 2.0;
    real t = n - (N - 1) / 2.0;
    real a = 2.0 * n / (N - 1) - 1.0;
    return $sin(wc * t) / (PI * t) * i0(BETA * $sqrt(1.0 - a * a)) / i0(BETA);
  endfunction

  longint h [N];
  int     cf;
  initial begin
    automatic real hr [N];
    automatic real s = 0.0;
    for (int n = 0; n < N; n++) begin hr[n] = proto(n); s += hr[n]; end
    cf = 0;
    while (hr[N/2] / s * (2.0 ** (cf + 1)) < 32767.0) cf++;
    for (int n = 0; n < N; n++) h[n] = longint'($floor(hr[n] / s * (2.0 ** cf) + 0.5));
  end

  // ----------------------------------------------------------- stimulus log
  longint xs_re [$], xs_im [$];
  int     accepted = 0;
  int     frame_at [$];                         // cycle of each frame's last sample
  int     cyc = 0;
  int     frames = 0;
  bit     dc_phase = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid) begin
      xs_re.push_back(longint'(in_re));
      xs_im.push_back(longint'(in_im));
      accepted++;
      if (accepted % M == 0) frame_at.push_back(cyc);
    end
  end

  always @(posedge clk) if (rst_n && u_valid) begin
    automatic int nf = (frames + 1) * M - 1;
    automatic int at = frame_at.pop_front();
    checks++;
    if (cyc - at != 2) begin
      failures++;
      $display("frame %0d latency %0d", frames, cyc - at);
    end
    checks++;
    if (int'(u_rot) != nf % K) begin
      failures++;
      $display("frame %0d rot %0d exp %0d", frames, u_rot, nf % K);
    end
    for (int l = 0; l < K; l++) begin
      automatic longint sr = 0, si = 0, er, ei;
      for (int p = 0; p < P; p++) begin
        automatic int idx = nf - p * K - l;
        if (idx >= 0) begin
          sr += h[p*K + l] * xs_re[idx];
          si += h[p*K + l] * xs_im[idx];
        end
      end
      er = (sr + (longint'(1) << (cf - V_FRAC - 1))) >>> (cf - V_FRAC);
      ei = (si + (longint'(1) << (cf - V_FRAC - 1))) >>> (cf - V_FRAC);
      checks++;
      if (er != longint'(u_re[l]) || ei != longint'(u_im[l])) begin
        failures++;
        if (failures < 10) $display("frame %0d l=%0d got (%0d,%0d) exp (%0d,%0d)",
                                    frames, l, u_re[l], u_im[l], er, ei);
      end
    end
    if (dc_phase) begin
      automatic longint tot = 0;
      for (int l = 0; l < K; l++) tot += longint'(u_re[l]);
      // constant input 50000 -> sum of all taps * 50000 * 2^V_FRAC
      checks++;
      if (tot < 50000 * 256 * 0.999 || tot > 50000 * 256 * 1.001) begin
        failures++;
        $display("DC gain off: %0d", tot);
      end
    end
    frames <= frames + 1;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 1200; t++) begin
      @(posedge clk);
      in_valid <= ($urandom_range(0, 3) != 0);
      in_re    <= IN_W'($urandom_range(0, 2**18 - 1));
      in_im    <= IN_W'($urandom_range(0, 2**18 - 1));
    end
    // constant input long enough to fill the delay chain
    for (int t = 0; t < N + 20; t++) begin
      @(posedge clk);
      in_valid <= 1;
      in_re    <= 50000;
      in_im    <= -50000;
      if (t == N + 4) dc_phase = 1;
    end
    @(posedge clk);
    in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (frames != accepted / M) begin
      failures++;
      $display("frames %0d accepted %0d", frames, accepted);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
