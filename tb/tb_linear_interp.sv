// tb_linear_interp: checks the linear interpolator in the two configurations
// the channelizer uses: L = 1 with step 25/4 (GSM, 40 -> 6.4 Msps) and L = 4
// with step 125/3 (W-CDMA, 160 -> 3.84 Msps on the upsampled grid).
// Random grid samples are fed in blocks of L, with random gaps. Output k must
// equal v[i] + mu (v[i+1] - v[i]) at t_k = k * S_NUM / S_DEN,
// i = floor(t_k), mu = t_k - i, computed here in floating point (tolerance
// 2 LSB for the fixed-point mu), and must appear one clock edge after the
// block holding v[i+1]. The number of outputs must match the number of grid
// positions passed, i.e. the exact conversion ratio.
module tb_linear_interp;
  localparam int W = 18;
  localparam int NCFG = 2;
  localparam int LS   [NCFG] = '{1, 4};
  localparam int SNUM [NCFG] = '{25, 125};
  localparam int SDEN [NCFG] = '{4, 3};

  int checks = 0, failures = 0;
  int done = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int L = LS[g], S_NUM = SNUM[g], S_DEN = SDEN[g];
    logic blk_valid = 0;
    logic signed [W-1:0] blk_re [L], blk_im [L];
    logic out_valid;
    logic signed [W-1:0] out_re, out_im;

    linear_interp #(.L(L), .S_NUM(S_NUM), .S_DEN(S_DEN), .W(W)) dut (
      .clk, .rst_n, .blk_valid, .blk_re, .blk_im, .out_valid, .out_re, .out_im);

    real vs_re [$], vs_im [$];
    int  blk_at [$];
    int  cyc = 0, outs = 0;

    always @(posedge clk) begin
      cyc <= cyc + 1;
      if (rst_n && blk_valid) begin
        for (int i = 0; i < L; i++) begin
          vs_re.push_back(real'(blk_re[i]));
          vs_im.push_back(real'(blk_im[i]));
        end
        blk_at.push_back(cyc);
      end
    end

    always @(posedge clk) if (rst_n && out_valid) begin
      automatic real t  = real'(outs) * S_NUM / S_DEN;
      automatic int  i  = int'($floor(t + 1.0e-9));
      automatic real mu = t - i;
      automatic real er = vs_re[i] + mu * (vs_re[i+1] - vs_re[i]);
      automatic real ei = vs_im[i] + mu * (vs_im[i+1] - vs_im[i]);
      checks++;
      if (er - out_re > 2.0 || out_re - er > 2.0 || ei - out_im > 2.0 || out_im - ei > 2.0) begin
        failures++;
        if (failures < 10) $display("cfg %0d out %0d got (%0d,%0d) exp (%f,%f)", g, outs, out_re, out_im, er, ei);
      end
      checks++;
      if (cyc - blk_at[(i + 1) / L] != 1) begin
        failures++;
        $display("cfg %0d out %0d timing %0d", g, outs, cyc - blk_at[(i + 1) / L]);
      end
      outs <= outs + 1;
    end

    initial begin
      automatic int expect_outs = 0;
      @(posedge rst_n);
      for (int b = 0; b < 3000; b++) begin
        @(posedge clk);
        blk_valid <= ($urandom_range(0, 3) != 0);
        for (int i = 0; i < L; i++) begin
          blk_re[i] <= W'(int'($urandom_range(0, 200000)) - 100000);
          blk_im[i] <= W'(int'($urandom_range(0, 200000)) - 100000);
        end
      end
      @(posedge clk);
      blk_valid <= 0;
      repeat (3) @(posedge clk);
      // outputs whose second sample index floor(t_k) + 1 lies in the fed data
      while ((longint'(expect_outs) * S_NUM) / longint'(S_DEN) + 1 < longint'(vs_re.size())) expect_outs++;
      checks++;
      if (outs != expect_outs) begin
        failures++;
        $display("cfg %0d: %0d outputs, expected %0d", g, outs, expect_outs);
      end
      done++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (done == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
