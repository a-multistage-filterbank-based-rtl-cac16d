// frontend_channelizer: the first stage of the two-stage channelizer.
//
// A 16-channel DFT filter bank on the real ADC samples (80 Msps in the
// dual-mode GSM/W-CDMA configuration), decimating by 2 (oversampling T = 8),
// so each channel leaves at 40 Msps with 5 MHz channel spacing. Its 144-tap
// prototype has passband edge (1+d)*pi/K with overlap factor d = 0.04 and
// stopband edge 2*pi/K: neighbouring passbands overlap, so a signal lying
// midway between two channel centres is still passed whole by a channel.
// The imaginary input of the generic bank is tied to zero; synthesis removes
// the unused half of its delay chain and products.
//
// Interface: adc_valid/adc_data real input; out_valid pulses once per two
// input samples (three clock edges after the second) with all K channels.
// Channel k is centred at k*Fs/K; for a real input channels K-k and k carry
// mirror images. Active-low synchronous reset.
module frontend_channelizer #(
  parameter int K        = msfb_pkg::FE_K,
  parameter int M        = msfb_pkg::FE_M,
  parameter int N        = msfb_pkg::FE_N,
  parameter int D_PERMIL = msfb_pkg::FE_D_PERMIL,
  parameter int IN_W     = msfb_pkg::ADC_W,
  parameter int OUT_W    = msfb_pkg::CH_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    adc_valid,
  input  logic signed [IN_W-1:0]  adc_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_re [K],
  output logic signed [OUT_W-1:0] out_im [K]
);
  dft_filterbank #(
    .K(K), .M(M), .N(N), .D_PERMIL(D_PERMIL), .BETA(msfb_pkg::kaiser_beta(N, K, D_PERMIL)),
    .COEF_W(msfb_pkg::COEF_W), .IN_W(IN_W), .OUT_W(OUT_W)
  ) u_fb (
    .clk, .rst_n,
    .in_valid(adc_valid), .in_re(adc_data), .in_im('0),
    .out_valid, .out_re, .out_im
  );
endmodule
