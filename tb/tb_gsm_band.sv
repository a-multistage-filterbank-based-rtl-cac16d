// tb_gsm_band: GSM workload for one front-end channel, at the default size.
//
// The 5 MHz front-end channel 3 (centre 15 MHz) holds 25 GSM slots at
// 200 kHz spacing, offsets -2.4 .. +2.4 MHz. Carriers (plain tones, random
// phases) are placed on the 13 even slots -12, -10, .., +12, including both
// outermost slots that depend on the front-end passband overlap. After the
// back-end filter bank has settled, every occupied slot must come out of its
// back-end channel (slot s -> channel s mod 32) at half the carrier amplitude
// within 3 %, and every empty odd slot must stay 40 dB below a carrier. The
// empty slots catch leakage between neighbouring GSM channels and any aliasing
// from the rate changer. The worst figures are printed.
module tb_gsm_band;
  localparam real PI = 3.14159265358979323846;
  localparam real FS = 80.0e6;
  localparam real A  = 1800.0;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, adc_valid = 0;
  logic signed [15:0] adc_data = 0;
  logic [3:0] gsm_fe_sel = 3, wcdma_fe_sel = 0;
  logic fe_valid, gsm_valid, wcdma_valid;
  logic signed [17:0] fe_re [16], fe_im [16];
  logic signed [17:0] gsm_re [32], gsm_im [32];
  logic signed [17:0] wcdma_re, wcdma_im;

  msfb_channelizer dut (.*);

  always #6.25ns clk = ~clk;

  real phs [13];
  initial for (int i = 0; i < 13; i++) phs[i] = 2.0 * PI * $urandom_range(0, 999) / 1000.0;

  int t_adc = 0;
  always @(posedge clk) if (rst_n) begin
    automatic real t = t_adc / FS;
    automatic real v = 0.0;
    for (int i = 0; i < 13; i++)
      v += A * $cos(2.0 * PI * (15.0e6 + (2 * i - 12) * 200.0e3) * t + phs[i]);
    adc_valid <= 1;
    adc_data  <= 16'(int'($floor(v + 0.5)));
    t_adc <= t_adc + 1;
  end

  bit  measure = 0;
  int  frames = 0;
  real worst_gain_db = 0.0, worst_empty_db = -300.0;

  always @(posedge clk) if (gsm_valid && measure) begin
    frames++;
    for (int s = -12; s <= 12; s++) begin
      automatic int  ch = (s + 32) % 32;
      automatic real m  = $sqrt(real'(gsm_re[ch]) ** 2 + real'(gsm_im[ch]) ** 2);
      automatic real db = 20.0 * $log10(m / (A / 2.0) + 1.0e-9);
      checks++;
      if (s % 2 == 0) begin
        automatic real ad = (db < 0.0) ? -db : db;
        if (ad > worst_gain_db) worst_gain_db = ad;
        if (m < 0.97 * A / 2.0 || m > 1.03 * A / 2.0) begin
          failures++;
          if (failures < 10) $display("slot %0d magnitude %f", s, m);
        end
      end else begin
        if (db > worst_empty_db) worst_empty_db = db;
        if (db > -40.0) begin
          failures++;
          if (failures < 10) $display("empty slot %0d at %f dB", s, db);
        end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (4400) @(posedge clk);
    measure = 1;
    repeat (3000) @(posedge clk);
    $display("occupied slots: worst deviation %0.3f dB; empty slots: worst %0.1f dB", worst_gain_db, worst_empty_db);
    checks++;
    if (frames < 25) begin
      failures++;
      $display("only %0d GSM frames measured", frames);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
