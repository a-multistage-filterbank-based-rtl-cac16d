// tb_wcdma_band: W-CDMA workload at the default size.
//
// Four tones spread over the W-CDMA band (front-end channel 6, centre 30 MHz,
// offsets -1.8, -0.9, +0.3 and +1.5 MHz) pass through the front end and the
// 12/125 rate changer with upsampling by 4. 384 chip-rate output samples
// (3.84 Msps, 10 kHz DFT bins, so every tone sits on a bin) are collected
// after settling and transformed at selected bins. Each tone must come out at
// half its ADC amplitude within 0.1 dB; bins without a tone (-1.2, 0, +0.9
// and +1.9 MHz) must stay 50 dB below a tone, the distortion target of the
// rate changer. The measured figures are printed.
module tb_wcdma_band;
  localparam real PI = 3.14159265358979323846;
  localparam real FS = 80.0e6;
  localparam real A  = 6000.0;
  localparam int  NS = 384;
  localparam real TONES [4] = '{-1.8e6, -0.9e6, 0.3e6, 1.5e6};
  localparam real EMPTY [4] = '{-1.2e6, 0.0, 0.9e6, 1.9e6};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, adc_valid = 0;
  logic signed [15:0] adc_data = 0;
  logic [3:0] gsm_fe_sel = 0, wcdma_fe_sel = 6;
  logic fe_valid, gsm_valid, wcdma_valid;
  logic signed [17:0] fe_re [16], fe_im [16];
  logic signed [17:0] gsm_re [32], gsm_im [32];
  logic signed [17:0] wcdma_re, wcdma_im;

  msfb_channelizer dut (.*);

  always #6.25ns clk = ~clk;

  int t_adc = 0;
  always @(posedge clk) if (rst_n) begin
    automatic real t = t_adc / FS;
    automatic real v = 0.0;
    for (int i = 0; i < 4; i++) v += A * $cos(2.0 * PI * (30.0e6 + TONES[i]) * t + 0.7 * i);
    adc_valid <= 1;
    adc_data  <= 16'(int'($floor(v + 0.5)));
    t_adc <= t_adc + 1;
  end

  real ys_re [$], ys_im [$];
  int  n_out = 0;
  always @(posedge clk) if (wcdma_valid) begin
    n_out++;
    if (n_out > 200 && ys_re.size() < NS) begin
      ys_re.push_back(real'(wcdma_re));
      ys_im.push_back(real'(wcdma_im));
    end
  end

  function automatic real bin_db(real f);
    real sr = 0.0, si = 0.0;
    for (int n = 0; n < NS; n++) begin
      automatic real ph = -2.0 * PI * f / 3.84e6 * n;
      sr += ys_re[n] * $cos(ph) - ys_im[n] * $sin(ph);
      si += ys_re[n] * $sin(ph) + ys_im[n] * $cos(ph);
    end
    return 20.0 * $log10($sqrt(sr * sr + si * si) / NS / (A / 2.0) + 1.0e-12);
  endfunction

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1;
    wait (ys_re.size() == NS);
    for (int i = 0; i < 4; i++) begin
      automatic real g = bin_db(TONES[i]);
      $display("tone %0.1f MHz: %0.3f dB", TONES[i] / 1.0e6, g);
      checks++;
      if (g < -0.1 || g > 0.1) failures++;
    end
    for (int i = 0; i < 4; i++) begin
      automatic real g = bin_db(EMPTY[i]);
      $display("empty bin %0.1f MHz: %0.1f dB", EMPTY[i] / 1.0e6, g);
      checks++;
      if (g > -50.0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
