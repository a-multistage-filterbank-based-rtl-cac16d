// msfb_channelizer: dual-mode GSM / W-CDMA two-stage filter-bank channelizer.
//
// A real IF signal sampled at Fs = 80 Msps is split by a 16-channel front-end
// DFT filter bank (5 MHz channels, output 40 Msps, overlapping passbands).
// Each receive path picks one front-end channel:
//   * GSM path: a 4/25 sample rate changer brings the channel to 6.4 Msps and
//     a 32-channel back-end DFT filter bank (decimation 8) separates the
//     200 kHz GSM carriers, each at 800 ksps.
//   * W-CDMA path: a 12/125 sample rate changer with upsampling by 4 takes the
//     front-end channel straight to the 3.84 Msps chip rate; no back-end bank
//     is needed.
// The two paths select their front-end channel independently (gsm_fe_sel,
// wcdma_fe_sel, sampled at each front-end frame), so one GSM band and one
// W-CDMA carrier are received at the same time. All front-end channels are
// also brought out. Baseband processing, including any final conversion to a
// multiple of the GSM symbol rate, is outside this block.
//
// Timing: one ADC sample per adc_valid (one per clock at full rate). The
// selected front-end sample enters a rate changer one clock edge after
// fe_valid. Active-low synchronous reset.
module msfb_channelizer #(
  parameter int ADC_W = msfb_pkg::ADC_W,
  parameter int CH_W  = msfb_pkg::CH_W,
  parameter int FE_K  = msfb_pkg::FE_K,
  parameter int BE_K  = msfb_pkg::BE_K
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   adc_valid,
  input  logic signed [ADC_W-1:0] adc_data,
  input  logic [$clog2(FE_K)-1:0] gsm_fe_sel,
  input  logic [$clog2(FE_K)-1:0] wcdma_fe_sel,
  // front-end filter bank outputs
  output logic                   fe_valid,
  output logic signed [CH_W-1:0] fe_re [FE_K],
  output logic signed [CH_W-1:0] fe_im [FE_K],
  // GSM channels from the back-end filter bank
  output logic                   gsm_valid,
  output logic signed [CH_W-1:0] gsm_re [BE_K],
  output logic signed [CH_W-1:0] gsm_im [BE_K],
  // W-CDMA channel at the chip rate
  output logic                   wcdma_valid,
  output logic signed [CH_W-1:0] wcdma_re,
  output logic signed [CH_W-1:0] wcdma_im
);
  frontend_channelizer #(.K(FE_K), .IN_W(ADC_W), .OUT_W(CH_W)) u_fe (
    .clk, .rst_n, .adc_valid, .adc_data,
    .out_valid(fe_valid), .out_re(fe_re), .out_im(fe_im)
  );

  // Channel selection for the two receive paths.
  logic                   gsel_valid, wsel_valid;
  logic signed [CH_W-1:0] gsel_re, gsel_im, wsel_re, wsel_im;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gsel_valid <= 1'b0;
      wsel_valid <= 1'b0;
      gsel_re    <= '0;
      gsel_im    <= '0;
      wsel_re    <= '0;
      wsel_im    <= '0;
    end else begin
      gsel_valid <= fe_valid;
      wsel_valid <= fe_valid;
      if (fe_valid) begin
        gsel_re <= fe_re[gsm_fe_sel];
        gsel_im <= fe_im[gsm_fe_sel];
        wsel_re <= fe_re[wcdma_fe_sel];
        wsel_im <= fe_im[wcdma_fe_sel];
      end
    end
  end

  // GSM path: 40 Msps -> 6.4 Msps -> 32 channels at 800 ksps.
  logic                   g_src_valid;
  logic signed [CH_W-1:0] g_src_re, g_src_im;

  sample_rate_changer #(
    .R_NUM(msfb_pkg::GSM_SRC_NUM), .R_DEN(msfb_pkg::GSM_SRC_DEN),
    .L(msfb_pkg::GSM_SRC_L), .W(CH_W)
  ) u_src_gsm (
    .clk, .rst_n, .in_valid(gsel_valid), .in_re(gsel_re), .in_im(gsel_im),
    .out_valid(g_src_valid), .out_re(g_src_re), .out_im(g_src_im)
  );

  backend_channelizer #(.K(BE_K), .IN_W(CH_W), .OUT_W(CH_W)) u_be (
    .clk, .rst_n, .in_valid(g_src_valid), .in_re(g_src_re), .in_im(g_src_im),
    .out_valid(gsm_valid), .out_re(gsm_re), .out_im(gsm_im)
  );

  // W-CDMA path: 40 Msps -> 3.84 Msps.
  sample_rate_changer #(
    .R_NUM(msfb_pkg::WCDMA_SRC_NUM), .R_DEN(msfb_pkg::WCDMA_SRC_DEN),
    .L(msfb_pkg::WCDMA_SRC_L), .W(CH_W)
  ) u_src_wcdma (
    .clk, .rst_n, .in_valid(wsel_valid), .in_re(wsel_re), .in_im(wsel_im),
    .out_valid(wcdma_valid), .out_re(wcdma_re), .out_im(wcdma_im)
  );
endmodule
