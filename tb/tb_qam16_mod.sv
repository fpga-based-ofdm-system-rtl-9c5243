// tb_qam16_mod: all 16 inputs of the 16-QAM mapper against a hand-written
// constellation table (gray code, upper pair -> Q, lower pair -> I,
// 00 -> -3, 01 -> -1, 11 -> +1, 10 -> +3), plus the worked example
// 1100 -> (+3, +3).
module tb_qam16_mod;
  logic        [3:0] data;
  logic signed [3:0] re, im;
  int checks = 0, failures = 0;

  qam16_mod dut (.*);

  // Expected (I, Q) for data = 0..15, written out by hand.
  int exp_re [16] = '{-3, -1,  1,  3,  3,  1, -1, -3, -3, -1,  1,  3,  3,  1, -1, -3};
  int exp_im [16] = '{-3, -3, -3, -3, -1, -1, -1, -1,  1,  1,  1,  1,  3,  3,  3,  3};

  initial begin
    for (int d = 0; d < 16; d++) begin
      data = 4'(d);
      #1;
      checks++;
      if (re != exp_re[d] || im != exp_im[d]) begin
        failures++;
        $display("FAIL data=%b got (%0d,%0d) exp (%0d,%0d)", data, re, im, exp_re[d], exp_im[d]);
      end
    end
    data = 4'b1100;
    #1;
    checks++;
    if (re != 4'sd3 || im != 4'sd3) begin
      failures++;
      $display("FAIL worked example 1100 -> (%0d,%0d)", re, im);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
