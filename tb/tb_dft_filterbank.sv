// tb_dft_filterbank: checks the oversampled DFT filter bank (16 channels,
// decimation 2, 144-tap prototype with overlap d = 0.04) against the direct
// definition of each channel,
//   y_k[m] = sum_r h[r] x[n_f - r] exp(-j 2 pi k (n_f - r) / K),
// evaluated in floating point with the testbench's own copy of the quantised
// prototype. This exercises the polyphase folding, the circular rotation
// that realises the output modulation, the IDFT and the output rounding
// together. Random complex input with random gaps is used first, then a
// complex tone on the centre of channel 3, which must come out of channel 3
// at full amplitude and be at least 70 dB down in channels two or more
// away. The output frame rate (one per M inputs) and the three-edge latency
// are checked as well.
module tb_dft_filterbank;
  localparam int  K = 16, M = 2, N = 144, D = 40;
  localparam int  IN_W = 18, OUT_W = 18;
  localparam real BETA = 7.857;
  localparam real PI = 3.14159265358979323846;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [IN_W-1:0] in_re = 0, in_im = 0;
  logic out_valid;
  logic signed [OUT_W-1:0] out_re [K], out_im [K];

  dft_filterbank #(.K(K), .M(M), .N(N), .D_PERMIL(D), .BETA(BETA),
                   .IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;

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

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  real h [N];
  initial begin
    automatic real hr [N];
    automatic real s = 0.0;
    automatic int  cf = 0;
    for (int n = 0; n < N; n++) begin hr[n] = proto(n); s += hr[n]; end
    while (hr[N/2] / s * (2.0 ** (cf + 1)) < 32767.0) cf++;
    for (int n = 0; n < N; n++) h[n] = $floor(hr[n] / s * (2.0 ** cf) + 0.5) / (2.0 ** cf);
  end

  real xs_re [$], xs_im [$];
  int  accepted = 0, frames = 0, cyc = 0;
  int  frame_at [$];
  bit  tone_phase = 0;
  int  tone_frames = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid) begin
      xs_re.push_back(real'(in_re));
      xs_im.push_back(real'(in_im));
      accepted++;
      if (accepted % M == 0) frame_at.push_back(cyc);
    end
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int nf = (frames + 1) * M - 1;
    automatic int at = frame_at.pop_front();
    checks++;
    if (cyc - at != 3) begin
      failures++;
      $display("frame %0d latency %0d", frames, cyc - at);
    end
    for (int k = 0; k < K; k++) begin
      automatic real er = 0.0, ei = 0.0;
      for (int r = 0; r < N; r++) begin
        if (nf - r >= 0) begin
          automatic real ph = -2.0 * PI * k * ((nf - r) % K) / K;
          automatic real xr = xs_re[nf - r], xi = xs_im[nf - r];
          er += h[r] * (xr * $cos(ph) - xi * $sin(ph));
          ei += h[r] * (xr * $sin(ph) + xi * $cos(ph));
        end
      end
      checks++;
      if (fabs(er - out_re[k]) > 24.0 || fabs(ei - out_im[k]) > 24.0) begin
        failures++;
        if (failures < 10) $display("frame %0d k=%0d got (%0d,%0d) exp (%f,%f)",
                                    frames, k, out_re[k], out_im[k], er, ei);
      end
    end
    if (tone_phase) begin
      automatic real mag3 = $sqrt(real'(out_re[3]) ** 2 + real'(out_im[3]) ** 2);
      tone_frames++;
      checks++;
      if (mag3 < 59000.0 || mag3 > 61000.0) begin
        failures++;
        $display("tone channel 3 magnitude %f", mag3);
      end
      for (int k = 0; k < K; k++) if (k < 2 || k > 4) begin
        checks++;
        if (fabs(real'(out_re[k])) > 20.0 || fabs(real'(out_im[k])) > 20.0) begin
          failures++;
          $display("tone leaks into channel %0d: (%0d,%0d)", k, out_re[k], out_im[k]);
        end
      end
    end
    frames <= frames + 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 600; t++) begin
      @(posedge clk);
      in_valid <= ($urandom_range(0, 3) != 0);
      in_re    <= IN_W'(int'($urandom_range(0, 200000)) - 100000);
      in_im    <= IN_W'(int'($urandom_range(0, 200000)) - 100000);
    end
    for (int t = 0; t < 400; t++) begin
      @(posedge clk);
      in_valid <= 1;
      in_re <= IN_W'(int'($floor(60000.0 * $cos(2.0 * PI * 3 * t / K) + 0.5)));
      in_im <= IN_W'(int'($floor(60000.0 * $sin(2.0 * PI * 3 * t / K) + 0.5)));
      if (t == N + 2) tone_phase = 1;
    end
    @(posedge clk);
    in_valid <= 0;
    repeat (6) @(posedge clk);
    checks++;
    if (frames != accepted / M || tone_frames < 100) begin
      failures++;
      $display("frames %0d accepted %0d tone frames %0d", frames, accepted, tone_frames);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
