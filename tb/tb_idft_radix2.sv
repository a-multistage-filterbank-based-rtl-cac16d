// tb_idft_radix2: compares the radix-2 IDFT with a direct evaluation of
// Y[k] = sum_l X[l] exp(+j 2 pi k l / K) in floating point, for K = 16 and
// K = 32, on random inputs and on single impulses (whose transform is a pure
// rotating phasor). The tolerance covers the 14-fraction-bit twiddle
// rounding: 8 LSB plus 2^-13 of the summed input magnitudes.
module tb_idft_radix2;
  localparam int W = 24;
  int checks = 0, failures = 0;

  logic signed [W-1:0]   a_re [16], a_im [16];
  logic signed [W+4:0]   ya_re [16], ya_im [16];
  logic signed [W-1:0]   b_re [32], b_im [32];
  logic signed [W+5:0]   yb_re [32], yb_im [32];

  idft_radix2 #(.K(16), .IN_W(W)) dut16 (.x_re(a_re), .x_im(a_im), .y_re(ya_re), .y_im(ya_im));
  idft_radix2 #(.K(32), .IN_W(W)) dut32 (.x_re(b_re), .x_im(b_im), .y_re(yb_re), .y_im(yb_im));

  localparam real PI = 3.14159265358979323846;

  task automatic check(int k, int kk, real xr[], real xi[], longint gr, longint gi);
    real er = 0.0, ei = 0.0, tol = 8.0;
    for (int l = 0; l < kk; l++) begin
      tol += ((xr[l] < 0.0 ? -xr[l] : xr[l]) + (xi[l] < 0.0 ? -xi[l] : xi[l])) / 8192.0;
      er += xr[l] * $cos(2.0 * PI * k * l / kk) - xi[l] * $sin(2.0 * PI * k * l / kk);
      ei += xr[l] * $sin(2.0 * PI * k * l / kk) + xi[l] * $cos(2.0 * PI * k * l / kk);
    end
    checks++;
    if ((er - gr) > tol || (gr - er) > tol || (ei - gi) > tol || (gi - ei) > tol) begin
      failures++;
      if (failures < 10) $display("K=%0d k=%0d got (%0d,%0d) exp (%f,%f)", kk, k, gr, gi, er, ei);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic real xr16 [] = new[16];
    automatic real xi16 [] = new[16];
    automatic real xr32 [] = new[32];
    automatic real xi32 [] = new[32];
    for (int t = 0; t < 200; t++) begin
      for (int l = 0; l < 32; l++) begin
        int vr, vi;
        if (t < 32) begin
          vr = (l == t) ? 1000000 : 0;
          vi = (l == t) ? -300000 : 0;
        end else begin
          vr = int'($urandom_range(0, 2**22)) - 2**21;
          vi = int'($urandom_range(0, 2**22)) - 2**21;
        end
        if (l < 16) begin
          a_re[l] = W'(vr); a_im[l] = W'(vi);
          xr16[l] = vr;     xi16[l] = vi;
        end
        b_re[l] = W'(vr); b_im[l] = W'(vi);
        xr32[l] = vr;     xi32[l] = vi;
      end
      #1;
      for (int k = 0; k < 16; k++) check(k, 16, xr16, xi16, longint'(ya_re[k]), longint'(ya_im[k]));
      for (int k = 0; k < 32; k++) check(k, 32, xr32, xi32, longint'(yb_re[k]), longint'(yb_im[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
