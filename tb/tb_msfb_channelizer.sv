// tb_msfb_channelizer: end-to-end test of the dual-mode channelizer at its
// full default size, one ADC sample per clock (80 Msps).
//
// The ADC sees three real carriers:
//   16.0 MHz  GSM carrier, front-end channel 3 + 1.0 MHz  -> back-end channel 5
//   17.4 MHz  GSM carrier, front-end channel 3 + 2.4 MHz  -> back-end channel 12
//             (the outermost GSM slot, only passed thanks to the overlap d)
//   30.5 MHz  W-CDMA test tone, front-end channel 6 + 0.5 MHz
// Phase 1 selects front-end channel 3 for GSM and 6 for W-CDMA. Phase 2
// switches both paths to the mirror channels (13 and 10), where the same
// carriers appear at negative frequencies: back-end channels 27 and 20, and a
// W-CDMA phasor turning the other way.
// Checks, after the filters have settled in each phase: the magnitudes of the
// GSM channels carrying a carrier (half the ADC amplitude), the emptiness of
// the other GSM channels, the W-CDMA sample magnitude and phase step
// (2*pi*0.5/3.84 rad per chip), and the three output rates (front end
// 40 Msps, GSM 800 ksps per channel, W-CDMA 3.84 Msps). Each mechanism
// (GSM channel recovery, W-CDMA conversion, overlap-slot recovery, channel
// switch) is counted and must have happened.
module tb_msfb_channelizer;
  localparam real PI = 3.14159265358979323846;
  localparam real FS = 80.0e6;
  localparam real A1 = 8000.0, A2 = 8000.0, A3 = 6000.0;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, adc_valid = 0;
  logic signed [15:0] adc_data = 0;
  logic [3:0] gsm_fe_sel = 3, wcdma_fe_sel = 6;
  logic fe_valid, gsm_valid, wcdma_valid;
  logic signed [17:0] fe_re [16], fe_im [16];
  logic signed [17:0] gsm_re [32], gsm_im [32];
  logic signed [17:0] wcdma_re, wcdma_im;

  msfb_channelizer dut (.*);

  always #6.25ns clk = ~clk;

  // --------------------------------------------------------------- checking
  int  cyc = 0;
  bit  measure = 0;
  int  phase = 1;
  int  n_fe = 0, n_gsm = 0, n_wcdma = 0;
  int  mech_gsm = 0, mech_edge = 0, mech_wcdma = 0, mech_switch = 0;
  real w_ph = 0.0;
  bit  w_have = 0;

  task automatic expect_range(string what, real v, real lo, real hi);
    checks++;
    if (v < lo || v > hi) begin
      failures++;
      if (failures < 20) $display("[cyc %0d] %s = %f outside [%f, %f]", cyc, what, v, lo, hi);
    end
  endtask

  function automatic real cmag(logic signed [17:0] re, logic signed [17:0] im);
    return $sqrt(real'(re) ** 2 + real'(im) ** 2);
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (fe_valid) n_fe++;
    if (wcdma_valid) n_wcdma++;
    if (gsm_valid) begin
      n_gsm++;
      if (measure) begin
        automatic int ch_a = (phase == 1) ? 5 : 27;
        automatic int ch_e = (phase == 1) ? 12 : 20;
        expect_range($sformatf("GSM ch%0d magnitude", ch_a), cmag(gsm_re[ch_a], gsm_im[ch_a]),
                     0.99 * A1 / 2.0, 1.01 * A1 / 2.0);
        expect_range($sformatf("GSM ch%0d magnitude", ch_e), cmag(gsm_re[ch_e], gsm_im[ch_e]),
                     0.97 * A3 / 2.0, 1.03 * A3 / 2.0);
        for (int k = 0; k < 32; k++)
          if ((k < ch_a - 1 || k > ch_a + 1) && (k < ch_e - 1 || k > ch_e + 1))
            expect_range($sformatf("GSM ch%0d empty", k), cmag(gsm_re[k], gsm_im[k]), 0.0, 60.0);
        mech_gsm++;
        mech_edge++;
      end
    end
    if (wcdma_valid) begin
      automatic real ph = $atan2(real'(wcdma_im), real'(wcdma_re));
      if (measure && w_have) begin
        automatic real d   = ph - w_ph;
        automatic real exp_d = ((phase == 1) ? 1.0 : -1.0) * 2.0 * PI * 0.5 / 3.84;
        if (d > PI) d -= 2.0 * PI;
        if (d < -PI) d += 2.0 * PI;
        expect_range("W-CDMA magnitude", cmag(wcdma_re, wcdma_im), 0.99 * A2 / 2.0, 1.01 * A2 / 2.0);
        expect_range("W-CDMA phase step", d, exp_d - 0.01, exp_d + 0.01);
        mech_wcdma++;
      end
      w_ph   = ph;
      w_have = 1;
    end
  end

  // --------------------------------------------------------------- stimulus
  int t_adc = 0;
  always @(posedge clk) if (rst_n) begin
    automatic real t = t_adc / FS;
    adc_valid <= 1;
    adc_data  <= 16'(int'($floor(A1 * $cos(2.0 * PI * 16.0e6 * t)
                               + A3 * $cos(2.0 * PI * 17.4e6 * t + 1.0)
                               + A2 * $cos(2.0 * PI * 30.5e6 * t + 2.0) + 0.5)));
    t_adc <= t_adc + 1;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0, g0, w0, f0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    // phase 1: settle (front end 144 taps, back end 256 taps at 6.4 Msps)
    repeat (4400) @(posedge clk);
    measure = 1;
    c0 = cyc; g0 = n_gsm; w0 = n_wcdma; f0 = n_fe;
    repeat (2500) @(posedge clk);
    measure = 0;
    expect_range("front-end frames per 2500 clocks", real'(n_fe - f0), 1249.0, 1251.0);
    expect_range("GSM frames per 2500 clocks", real'(n_gsm - g0), 24.0, 26.0);
    expect_range("W-CDMA samples per 2500 clocks", real'(n_wcdma - w0), 119.0, 121.0);
    // phase 2: switch both paths to the mirror channels
    @(posedge clk);
    gsm_fe_sel   <= 13;
    wcdma_fe_sel <= 10;
    phase        = 2;
    w_have       = 0;
    mech_switch++;
    repeat (4000) @(posedge clk);
    measure = 1;
    repeat (1500) @(posedge clk);
    measure = 0;
    $display("events: gsm frames checked %0d, edge-slot %0d, wcdma samples checked %0d, switches %0d",
             mech_gsm, mech_edge, mech_wcdma, mech_switch);
    expect_range("GSM recovery events", real'(mech_gsm), 1.0, 1.0e9);
    expect_range("overlap-slot events", real'(mech_edge), 1.0, 1.0e9);
    expect_range("W-CDMA events", real'(mech_wcdma), 1.0, 1.0e9);
    expect_range("channel switches", real'(mech_switch), 1.0, 1.0e9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
