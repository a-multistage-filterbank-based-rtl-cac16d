// tb_lband_interp: checks the upsample-by-4 polyphase L-band interpolator
// (8 taps per phase).
//   * Bit-exact comparison of every output block with a direct evaluation of
//     v[4n + rho] = sum_p h[4p + rho] x[n - p] using the testbench's own copy
//     of the windowed-sinc taps, on random input with gaps.
//   * The Nyquist property: phase 3 holds the centre tap (gain 1, all other
//     taps of that phase zero), so it must return x[n-3] exactly.
//   * A constant input gives the same constant in all four phases (DC gain
//     of every phase = 1) within 0.1 %.
//   * One block per input, two clock edges after it.
module tb_lband_interp;
  localparam int  L = 4, PL = 8, NL = L * PL, W = 18, CF = 14;
  localparam real BETA = 5.65;
  localparam real PI = 3.14159265358979323846;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] in_re = 0, in_im = 0;
  logic blk_valid;
  logic signed [W-1:0] blk_re [L], blk_im [L];

  lband_interp #(.L(L), .PL(PL), .BETA(BETA), .IN_W(W), .OUT_W(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic real i0(real x);
    real s = 1.0, t = 1.0;
    for (int k = 1; k < 50; k++) begin t = t * (x / (2.0 * k)) ** 2; s += t; end
    return s;
  endfunction

  longint h [NL];
  initial begin
    for (int i = 0; i < NL; i++) begin
      automatic real t = i - (NL - 2) / 2.0;
      automatic real a = 2.0 * i / (NL - 2) - 1.0;
      automatic real s = (t == 0.0) ? 1.0 / L : $sin(PI / L * t) / (PI * t);
      h[i] = (i == NL - 1) ? 0 :
             longint'($floor(L * s * i0(BETA * $sqrt(1.0 - a * a)) / i0(BETA) * (2.0 ** CF) + 0.5));
    end
  end

  longint xs_re [$], xs_im [$];
  int     acc_at [$];
  int     cyc = 0, blocks = 0;
  bit     dc_phase = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid) begin
      xs_re.push_back(longint'(in_re));
      xs_im.push_back(longint'(in_im));
      acc_at.push_back(cyc);
    end
  end

  function automatic longint sat(longint v);
    if (v > 131071) return 131071;
    if (v < -131072) return -131072;
    return v;
  endfunction

  always @(posedge clk) if (rst_n && blk_valid) begin
    automatic int n  = blocks;
    automatic int at = acc_at.pop_front();
    checks++;
    if (cyc - at != 2) begin
      failures++;
      $display("block %0d latency %0d", n, cyc - at);
    end
    for (int rho = 0; rho < L; rho++) begin
      automatic longint sr = longint'(1) << (CF - 1), si = longint'(1) << (CF - 1);
      for (int p = 0; p < PL; p++) if (n - p >= 0) begin
        sr += h[p*L + rho] * xs_re[n - p];
        si += h[p*L + rho] * xs_im[n - p];
      end
      checks++;
      if (sat(sr >>> CF) != longint'(blk_re[rho]) || sat(si >>> CF) != longint'(blk_im[rho])) begin
        failures++;
        if (failures < 10) $display("block %0d rho %0d got (%0d,%0d) exp (%0d,%0d)", n, rho,
                                    blk_re[rho], blk_im[rho], sat(sr >>> CF), sat(si >>> CF));
      end
    end
    if (n >= 3) begin
      checks++;
      if (longint'(blk_re[3]) != xs_re[n - 3] || longint'(blk_im[3]) != xs_im[n - 3]) begin
        failures++;
        $display("phase 3 is not x[n-3] at block %0d", n);
      end
    end
    if (dc_phase) for (int rho = 0; rho < L; rho++) begin
      checks++;
      if (blk_re[rho] < 39960 || blk_re[rho] > 40040) begin
        failures++;
        $display("DC phase %0d = %0d", rho, blk_re[rho]);
      end
    end
    blocks <= blocks + 1;
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
    for (int t = 0; t < 800; t++) begin
      @(posedge clk);
      in_valid <= ($urandom_range(0, 2) != 0);
      in_re    <= W'(int'($urandom_range(0, 160000)) - 80000);
      in_im    <= W'(int'($urandom_range(0, 160000)) - 80000);
    end
    for (int t = 0; t < 40; t++) begin
      @(posedge clk);
      in_valid <= 1;
      in_re    <= 40000;
      in_im    <= 0;
      if (t == PL + 3) dc_phase = 1;
    end
    @(posedge clk);
    in_valid <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (blocks != xs_re.size()) begin
      failures++;
      $display("blocks %0d inputs %0d", blocks, xs_re.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
