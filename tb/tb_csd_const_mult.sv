// tb_csd_const_mult: checks the CSD shift-and-add constant multiplier against
// the ordinary product x * C for a set of constants (positive, negative,
// powers of two, long runs of ones that CSD recodes) and random inputs,
// including the extreme input values.
module tb_csd_const_mult;
  localparam int NC = 8;
  localparam longint CS [NC] = '{1, -1, 12345, -32768, 21845, 32767, -2047, 7};

  int checks = 0, failures = 0;
  logic signed [15:0] x;
  logic signed [33:0] y [NC];

  for (genvar i = 0; i < NC; i++) begin : g_dut
    csd_const_mult #(.IN_W(16), .C(CS[i]), .OUT_W(34)) dut (.x(x), .y(y[i]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      if (t == 0) x = 16'sh8000;
      else if (t == 1) x = 16'sh7fff;
      else if (t == 2) x = -16'sd1;
      else x = 16'($urandom);
      #1;
      for (int i = 0; i < NC; i++) begin
        automatic longint exp_v = longint'(x) * CS[i];
        checks++;
        if (longint'(y[i]) != exp_v) begin
          failures++;
          if (failures < 10) $display("mismatch C=%0d x=%0d got %0d exp %0d", CS[i], x, y[i], exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
