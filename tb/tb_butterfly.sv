// tb_butterfly: checks the radix-2 butterfly against integer sums and
// differences, on the extreme values of the input range and on random ones.
module tb_butterfly;
  localparam int W = 16;
  logic signed [W-1:0] a_re, a_im, b_re, b_im;
  logic signed [W:0]   sum_re, sum_im, diff_re, diff_im;
  int checks = 0, failures = 0;

  butterfly #(.W(W)) dut (.*);

  task automatic check(input int ar, ai, br, bi);
    a_re = W'(ar); a_im = W'(ai); b_re = W'(br); b_im = W'(bi);
    #1;
    checks++;
    if (sum_re != ar + br || sum_im != ai + bi || diff_re != ar - br || diff_im != ai - bi) begin
      failures++;
      $display("FAIL a=(%0d,%0d) b=(%0d,%0d) sum=(%0d,%0d) diff=(%0d,%0d)",
               ar, ai, br, bi, sum_re, sum_im, diff_re, diff_im);
    end
  endtask

  initial begin
    int lo = -(1 <<< (W-1)), hi = (1 <<< (W-1)) - 1;
    check(lo, lo, lo, lo);
    check(hi, hi, hi, hi);
    check(lo, hi, hi, lo);
    check(hi, lo, lo, hi);
    for (int i = 0; i < 500; i++)
      check(int'($signed(W'($urandom))), int'($signed(W'($urandom))),
            int'($signed(W'($urandom))), int'($signed(W'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
