// tb_frontend_channelizer: drives the 16-channel front end with real tones at
// one sample per clock (80 Msps) and checks the channel magnitudes.
//   * A tone on the centre of channel 3 (15 MHz) must appear at half its
//     amplitude in channel 3 and in its mirror channel 13, and be at least
//     65 dB down in channels 2 and 4 (whose centres are one channel spacing
//     away, at the stopband edge) and 70 dB down elsewhere.
//   * A tone midway between channels 3 and 4 (17.5 MHz) must be passed by
//     both channels within 0.1 dB: this is what the passband overlap d buys.
//   * Channels must come out at 40 Msps: one frame every two clocks.
module tb_frontend_channelizer;
  localparam int  K = 16;
  localparam real PI = 3.14159265358979323846;
  localparam real FS = 80.0e6;
  localparam real A  = 20000.0;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, adc_valid = 0;
  logic signed [15:0] adc_data = 0;
  logic out_valid;
  logic signed [17:0] out_re [K], out_im [K];

  frontend_channelizer dut (.*);

  always #5 clk = ~clk;

  real    mag [K];
  int     frames = 0;
  always @(posedge clk) if (out_valid) begin
    for (int k = 0; k < K; k++) mag[k] = $sqrt(real'(out_re[k]) ** 2 + real'(out_im[k]) ** 2);
    frames++;
  end

  task automatic play(real f, int n);
    for (int t = 0; t < n; t++) begin
      @(posedge clk);
      adc_valid <= 1;
      adc_data  <= 16'(int'($floor(A * $cos(2.0 * PI * f / FS * t) + 0.5)));
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
    return 20.0 * $log10(v / (A / 2.0) + 1.0e-12);
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
    // channel-centre tone
    play(15.0e6, 400);
    $display("centre tone: ch3 %0.2f dB, ch13 %0.2f dB, ch2 %0.1f dB, ch4 %0.1f dB, ch5 %0.1f dB, ch8 %0.1f dB",
             db(mag[3]), db(mag[13]), db(mag[2]), db(mag[4]), db(mag[5]), db(mag[8]));
    expect_range("ch3 gain dB", db(mag[3]), -0.05, 0.05);
    expect_range("ch13 gain dB", db(mag[13]), -0.05, 0.05);
    expect_range("ch2 dB", db(mag[2]), -300.0, -65.0);
    expect_range("ch4 dB", db(mag[4]), -300.0, -65.0);
    for (int k = 0; k < K; k++)
      if (k != 2 && k != 3 && k != 4 && k != 12 && k != 13 && k != 14)
        expect_range($sformatf("ch%0d dB", k), db(mag[k]), -300.0, -70.0);
    // midway tone, inside the overlap of channels 3 and 4
    play(17.5e6, 400);
    $display("midway tone: ch3 %0.3f dB, ch4 %0.3f dB", db(mag[3]), db(mag[4]));
    expect_range("midway ch3 dB", db(mag[3]), -0.1, 0.1);
    expect_range("midway ch4 dB", db(mag[4]), -0.1, 0.1);
    // passband edge (1+d)*pi/K -> 2.6 MHz from the centre: report only
    play(17.6e6, 400);
    $display("passband-edge tone: ch3 %0.3f dB", db(mag[3]));
    // rate: one frame every two clocks
    f0 = frames;
    play(1.0e6, 200);
    expect_range("frames per 200 clocks", real'(frames - f0), 99.0, 101.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
