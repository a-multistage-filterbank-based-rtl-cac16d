// sample_rate_changer: rational sample rate changer, output rate =
// input rate * R_NUM / R_DEN, built as upsampling by L, an L-band
// interpolation filter H_L(z) and a linear (second-order) interpolator.
//
// Upsampling by the number of subfilters L narrows the signal relative to
// the new sampling grid so that plain linear interpolation reaches the
// required signal-to-distortion ratio. With L = 1 (GSM, ratio 4/25) the
// interpolator works on the input samples directly; with L = 4 (W-CDMA,
// ratio 12/125) lband_interp first produces four filtered samples per input.
// The interpolator then steps through the upsampled grid by
// S = L * R_DEN / R_NUM samples per output, reduced to S_NUM / S_DEN.
//
// Interface: one complex sample per in_valid; out_valid pulses at the
// converted rate (exactly R_NUM outputs per R_DEN inputs). Latency from the
// input that completes an output: one clock edge for L = 1, three for L > 1.
// Active-low synchronous reset.
module sample_rate_changer #(
  parameter int R_NUM = msfb_pkg::GSM_SRC_NUM,
  parameter int R_DEN = msfb_pkg::GSM_SRC_DEN,
  parameter int L     = msfb_pkg::GSM_SRC_L,
  parameter int PL    = 8,
  parameter int W     = msfb_pkg::CH_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  localparam int G     = msfb_pkg::gcd(L * R_DEN, R_NUM);
  localparam int S_NUM = L * R_DEN / G;
  localparam int S_DEN = R_NUM / G;

  logic                blk_valid;
  logic signed [W-1:0] blk_re [L];
  logic signed [W-1:0] blk_im [L];

  if (L == 1) begin : g_direct
    assign blk_valid = in_valid;
    assign blk_re[0] = in_re;
    assign blk_im[0] = in_im;
  end else begin : g_interp
    lband_interp #(.L(L), .PL(PL), .IN_W(W), .OUT_W(W)) u_lband (
      .clk, .rst_n, .in_valid, .in_re, .in_im,
      .blk_valid, .blk_re, .blk_im
    );
  end

  linear_interp #(.L(L), .S_NUM(S_NUM), .S_DEN(S_DEN), .W(W)) u_interp (
    .clk, .rst_n, .blk_valid, .blk_re, .blk_im,
    .out_valid, .out_re, .out_im
  );
endmodule
