// tb_backend_channelizer: drives the 32-channel back end with complex tones
// at 6.4 Msps and checks the channel outputs (800 ksps, 200 kHz spacing).
//   * A tone on the centre of channel 5 (+1.0 MHz) comes out of channel 5 at
//     full amplitude and at least 60 dB down in channels two or more away.
//   * A tone at -0.6 MHz comes out of channel 29 (negative frequencies fill
//     channels 16..31).
//   * A tone 50 kHz above the centre of channel 5 appears in channel 5 as a
//     baseband phasor turning by 2*pi*50/800 rad per output frame.
//   * One frame per 8 input samples, inputs arriving every other clock.
module tb_backend_channelizer;
  localparam int  K = 32;
  localparam real PI = 3.14159265358979323846;
  localparam real FS = 6.4e6;
  localparam real A  = 30000.0;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [17:0] in_re = 0, in_im = 0;
  logic out_valid;
  logic signed [17:0] out_re [K], out_im [K];

  backend_channelizer dut (.*);

  always #5 clk = ~clk;

  real mag [K];
  real ph5, ph5_prev, dph5;
  int  frames = 0;
  always @(posedge clk) if (out_valid) begin
    for (int k = 0; k < K; k++) mag[k] = $sqrt(real'(out_re[k]) ** 2 + real'(out_im[k]) ** 2);
    ph5_prev = ph5;
    ph5 = $atan2(real'(out_im[5]), real'(out_re[5]));
    dph5 = ph5 - ph5_prev;
    if (dph5 > PI) dph5 -= 2.0 * PI;
    if (dph5 < -PI) dph5 += 2.0 * PI;
    frames++;
  end

  task automatic play(real f, int n);
    for (int t = 0; t < n; t++) begin
      @(posedge clk);
      in_valid <= 1;
      in_re <= 18'(int'($floor(A * $cos(2.0 * PI * f / FS * t) + 0.5)));
      in_im <= 18'(int'($floor(A * $sin(2.0 * PI * f / FS * t) + 0.5)));
      @(posedge clk);
      in_valid <= 0;
    end
  endtask

  task automatic expect_range(string what, real v, real lo, real hi);
    checks++;
    if (v < lo || v > hi) begin
      failures++;
      $display("%s = %f outside [%f, %f]", what, v, lo, hi);
    end
  endtask

  function automatic real db(real v);
    return 20.0 * $log10(v / A + 1.0e-12);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    play(1.0e6, 600);
    $display("ch5 tone: ch5 %0.3f dB, ch4 %0.1f, ch3 %0.1f, ch7 %0.1f dB", db(mag[5]), db(mag[4]), db(mag[3]), db(mag[7]));
    expect_range("ch5 gain dB", db(mag[5]), -0.05, 0.05);
    for (int k = 0; k < K; k++)
      if (k < 4 || k > 6) expect_range($sformatf("ch%0d dB", k), db(mag[k]), -300.0, -60.0);
    play(-0.6e6, 600);
    expect_range("ch29 gain dB", db(mag[29]), -0.05, 0.05);
    expect_range("ch3 dB", db(mag[3]), -300.0, -60.0);
    play(1.05e6, 600);
    expect_range("ch5 offset-tone gain dB", db(mag[5]), -0.05, 0.05);
    expect_range("ch5 phase step", dph5, 2.0 * PI * 50.0 / 800.0 - 0.01, 2.0 * PI * 50.0 / 800.0 + 0.01);
    f0 = frames;
    play(1.0e6, 160);
    expect_range("frames per 160 inputs", real'(frames - f0), 19.0, 21.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
