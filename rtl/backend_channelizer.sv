// backend_channelizer: the second stage of the two-stage channelizer.
//
// A 32-channel DFT filter bank on the complex output of the GSM rate changer
// (6.4 Msps), decimating by 8 (oversampling T = 4): 32 GSM channels at
// 200 kHz spacing, each delivered at 800 ksps. Its 256-tap prototype has no
// overlap: passband edge pi/K, stopband edge 2*pi/K.
//
// Interface: one complex sample per in_valid; out_valid pulses once per 8
// input samples (three clock edges after the 8th) with all 32 channels.
// Channel k is centred at k*200 kHz, channels 16..31 being the negative
// frequencies -3.2 MHz .. -0.2 MHz. Active-low synchronous reset.
module backend_channelizer #(
  parameter int K        = msfb_pkg::BE_K,
  parameter int M        = msfb_pkg::BE_M,
  parameter int N        = msfb_pkg::BE_N,
  parameter int D_PERMIL = msfb_pkg::BE_D_PERMIL,
  parameter int IN_W     = msfb_pkg::CH_W,
  parameter int OUT_W    = msfb_pkg::CH_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_re [K],
  output logic signed [OUT_W-1:0] out_im [K]
);
  dft_filterbank #(
    .K(K), .M(M), .N(N), .D_PERMIL(D_PERMIL), .BETA(msfb_pkg::kaiser_beta(N, K, D_PERMIL)),
    .COEF_W(msfb_pkg::COEF_W), .IN_W(IN_W), .OUT_W(OUT_W)
  ) u_fb (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid, .out_re, .out_im
  );
endmodule
