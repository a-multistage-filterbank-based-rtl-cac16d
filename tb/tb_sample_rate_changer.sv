// tb_sample_rate_changer: runs the two rate changers of the channelizer on a
// complex tone sampled at 40 Msps (one input every other clock, as after the
// front end):
//   * GSM:    ratio 4/25, no upsampling        -> 6.4 Msps
//   * W-CDMA: ratio 12/125, upsampling by 4    -> 3.84 Msps
// Each output sample is compared with the ideal tone at the output instant:
// t_k = k * 25/4 input samples for GSM, and t_k = k * 125/12 - 15/4 for
// W-CDMA, the 15/4 being the delay of the 31-tap L-band filter. Tolerance:
// 0.25 % of the amplitude (interpolation and filter ripple). The number of
// outputs per input must be exactly the conversion ratio.
module tb_sample_rate_changer;
  localparam int  W = 18;
  localparam real PI = 3.14159265358979323846;
  localparam real A  = 30000.0;
  localparam real W0 = 2.0 * PI * 0.7 / 40.0;     // 0.7 MHz at 40 Msps

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] in_re = 0, in_im = 0;
  logic gv, wv;
  logic signed [W-1:0] g_re, g_im, w_re, w_im;

  sample_rate_changer dut_gsm (.clk, .rst_n, .in_valid, .in_re, .in_im,
                               .out_valid(gv), .out_re(g_re), .out_im(g_im));
  sample_rate_changer #(.R_NUM(12), .R_DEN(125), .L(4)) dut_wcdma (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(wv), .out_re(w_re), .out_im(w_im));

  always #5 clk = ~clk;

  int  n_in = 0, n_g = 0, n_w = 0;
  real max_err_g = 0.0, max_err_w = 0.0;

  task automatic cmp(string what, int k, real t, logic signed [W-1:0] re, logic signed [W-1:0] im,
                     inout real max_err);
    automatic real er = A * $cos(W0 * t), ei = A * $sin(W0 * t);
    automatic real e  = $sqrt((er - re) ** 2 + (ei - im) ** 2);
    if (e > max_err) max_err = e;
    checks++;
    if (e > 0.0025 * A) begin
      failures++;
      if (failures < 10) $display("%s out %0d got (%0d,%0d) exp (%f,%f)", what, k, re, im, er, ei);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (gv) begin
      cmp("gsm", n_g, n_g * 25.0 / 4.0, g_re, g_im, max_err_g);
      n_g++;
    end
    if (wv) begin
      if (n_w >= 2) cmp("wcdma", n_w, n_w * 125.0 / 12.0 - 3.75, w_re, w_im, max_err_w);
      n_w++;
    end
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
    for (int t = 0; t < 2500; t++) begin
      @(posedge clk);
      in_valid <= 1;
      in_re <= W'(int'($floor(A * $cos(W0 * t) + 0.5)));
      in_im <= W'(int'($floor(A * $sin(W0 * t) + 0.5)));
      n_in++;
      @(posedge clk);
      in_valid <= 0;
    end
    repeat (6) @(posedge clk);
    $display("max error: gsm %f, wcdma %f (A = %f)", max_err_g, max_err_w, A);
    // 2500 inputs: GSM outputs at t = 6.25 k with t + 1 <= 2499
    checks++;
    if (n_g != 400) begin failures++; $display("gsm outputs %0d, expected 400", n_g); end
    // W-CDMA: upsampled grid of 10000 samples, step 125/3, t + 1 <= 9999
    checks++;
    if (n_w != 240) begin failures++; $display("wcdma outputs %0d, expected 240", n_w); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
