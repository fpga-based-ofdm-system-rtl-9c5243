// tb_twiddle_mul: checks all eight twiddle multipliers (W^0..W^3, forward and
// inverse) against a full complex product with the twiddle table
// round(256 * exp(-+j*2*pi*k/8)) = (256,0) (181,-181) (0,-256) (-181,-181)
// (conjugated for the inverse), exhaustively over a 6-bit input.
module tb_twiddle_mul;
  localparam int W = 6;
  logic signed [W-1:0] in_re, in_im;
  logic signed [W+8:0] o_re [8], o_im [8];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < 8; g++) begin : g_dut
    twiddle_mul #(.W(W), .K(g % 4), .INVERSE(g / 4)) dut (
      .in_re, .in_im, .out_re(o_re[g]), .out_im(o_im[g]));
  end

  int tw_re [4] = '{256, 181, 0, -181};
  int tw_im [4] = '{0, -181, -256, -181};

  initial begin
    for (int a = -(1 <<< (W-1)); a < (1 <<< (W-1)); a++)
      for (int b = -(1 <<< (W-1)); b < (1 <<< (W-1)); b++) begin
        in_re = W'(a); in_im = W'(b);
        #1;
        for (int g = 0; g < 8; g++) begin
          int c, d, er, ei;
          c  = tw_re[g % 4];
          d  = (g / 4) ? -tw_im[g % 4] : tw_im[g % 4];
          er = a * c - b * d;
          ei = a * d + b * c;
          checks++;
          if (o_re[g] != er || o_im[g] != ei) begin
            failures++;
            if (failures < 10)
              $display("FAIL k=%0d inv=%0d in=(%0d,%0d) got=(%0d,%0d) exp=(%0d,%0d)",
                       g % 4, g / 4, a, b, o_re[g], o_im[g], er, ei);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
