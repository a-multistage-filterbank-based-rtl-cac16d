// linear_interp: second-order (linear) interpolator that resamples a stream
// onto a new, rational sampling grid; the last box of the sample rate changer.
//
// The input arrives in blocks of L consecutive samples (one block per input
// sample of the rate changer, L being its upsampling factor). Output k is
// taken at position t_k = k * S_NUM / S_DEN on the input grid:
//     y_k = v[i] + mu * (v[i+1] - v[i]),  i = floor(t_k), mu = t_k - i.
// Position is tracked exactly: an integer offset c (index of v[i+1] within
// the current block) and a remainder r in 0..S_DEN-1, mu = r / S_DEN, turned
// into an MU_F-bit fraction by one constant scaling. The interpolation
// weight depends on the data position, so the two (b - a) * mu products use
// ordinary multipliers. The step S_NUM/S_DEN must be at least L (a
// decimating converter), so at most one output falls in a block.
//
// Interface: blk_valid with blk_re/blk_im[0..L-1]; out_valid pulses one clock
// edge after the block that completes an output. Exactly S_DEN outputs are
// produced per S_NUM input-grid samples. The first output equals the first
// input sample after reset. Active-low synchronous reset.
module linear_interp #(
  parameter int L     = 1,
  parameter int S_NUM = 25,
  parameter int S_DEN = 4,
  parameter int W     = 18,
  parameter int MU_F  = 20
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                blk_valid,
  input  logic signed [W-1:0] blk_re [L],
  input  logic signed [W-1:0] blk_im [L],
  output logic                out_valid,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  localparam int S_INT    = S_NUM / S_DEN;
  localparam int S_FRAC   = S_NUM % S_DEN;
  localparam int MU_SCALE = int'(msfb_pkg::qround((2.0 ** MU_F) / S_DEN));
  localparam int RW       = (S_DEN > 1) ? $clog2(S_DEN) : 1;
  localparam int CW       = $clog2(S_INT + L + 2) + 2;

  logic signed [CW-1:0] c;                      // index of v[i+1] in block
  logic [RW-1:0]        r;                      // mu * S_DEN
  logic signed [W-1:0]  prev_re, prev_im;       // last sample of previous block

  logic                 hit;
  logic signed [W-1:0]  a_re, a_im, b_re, b_im;
  logic signed [W:0]    d_re, d_im;
  logic [MU_F:0]        mu_q;
  logic signed [W+MU_F+2:0] p_re, p_im;
  logic [RW:0]          r_sum;
  logic                 carry;

  always_comb begin
    hit  = (c >= 0) && (c < CW'(L));
    a_re = prev_re;
    a_im = prev_im;
    b_re = blk_re[0];
    b_im = blk_im[0];
    for (int i = 0; i < L; i++) begin
      if (int'(c) == i) begin
        b_re = blk_re[i];
        b_im = blk_im[i];
        if (i > 0) begin
          a_re = blk_re[i-1];
          a_im = blk_im[i-1];
        end
      end
    end
    d_re  = (W+1)'(b_re) - (W+1)'(a_re);
    d_im  = (W+1)'(b_im) - (W+1)'(a_im);
    mu_q  = (MU_F+1)'(r) * (MU_F+1)'(MU_SCALE);
    p_re  = (W+MU_F+3)'(d_re) * $signed({1'b0, mu_q}) + ((W+MU_F+3)'(1) <<< (MU_F - 1));
    p_im  = (W+MU_F+3)'(d_im) * $signed({1'b0, mu_q}) + ((W+MU_F+3)'(1) <<< (MU_F - 1));
    r_sum = (RW+1)'(r) + (RW+1)'(S_FRAC);
    carry = r_sum >= (RW+1)'(S_DEN);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c         <= CW'(1);
      r         <= '0;
      prev_re   <= '0;
      prev_im   <= '0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= 1'b0;
      if (blk_valid) begin
        prev_re <= blk_re[L-1];
        prev_im <= blk_im[L-1];
        if (hit) begin
          out_valid <= 1'b1;
          out_re    <= W'(a_re + W'(p_re >>> MU_F));
          out_im    <= W'(a_im + W'(p_im >>> MU_F));
          c         <= c + CW'(S_INT) + CW'(carry) - CW'(L);
          r         <= carry ? RW'(r_sum - (RW+1)'(S_DEN)) : RW'(r_sum);
        end else begin
          c <= c - CW'(L);
        end
      end
    end
  end

  initial assert (S_NUM >= L * S_DEN) else $error("step must be at least L");
endmodule
