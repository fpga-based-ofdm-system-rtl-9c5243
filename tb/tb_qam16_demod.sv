// tb_qam16_demod: feeds every constellation point, scaled by the receiver
// gain 2^19 and disturbed by random noise below the decision distance, and
// checks that the demapper returns the data bits that produce that point.
// Also checks decisions just on either side of each threshold.
module tb_qam16_demod;
  localparam int IN_W = 28, S = 19;
  logic signed [IN_W-1:0] re, im;
  logic        [3:0]      data;
  int checks = 0, failures = 0;

  qam16_demod #(.IN_W(IN_W), .SCALE_LOG2(S)) dut (.*);

  // Constellation of data value d (same table as the mapper's test).
  int pt_re [16] = '{-3, -1,  1,  3,  3,  1, -1, -3, -3, -1,  1,  3,  3,  1, -1, -3};
  int pt_im [16] = '{-3, -3, -3, -3, -1, -1, -1, -1,  1,  1,  1,  1,  3,  3,  3,  3};

  function automatic int noise();
    return int'($urandom % (1 << S)) - (1 << (S - 1)) - int'($urandom % (1 << (S - 1)));
  endfunction

  task automatic check(input int r, input int i, input int d);
    re = IN_W'(r); im = IN_W'(i);
    #1;
    checks++;
    if (data != 4'(d)) begin
      failures++;
      $display("FAIL in=(%0d,%0d) got %b exp %b", r, i, data, 4'(d));
    end
  endtask

  initial begin
    int g = 1 << S;
    for (int rep = 0; rep < 20; rep++)
      for (int d = 0; d < 16; d++)
        check(pt_re[d] * g + (rep ? noise() : 0), pt_im[d] * g + (rep ? noise() : 0), d);
    // thresholds 2g, 0, -2g on the real axis with Q = +1:
    // I = +3 -> 1011, +1 -> 1010, -1 -> 1001, -3 -> 1000
    check( 2 * g,     g, 4'b1011);
    check( 2 * g - 1, g, 4'b1010);
    check( 0,         g, 4'b1010);
    check(-1,         g, 4'b1001);
    check(-2 * g,     g, 4'b1001);
    check(-2 * g - 1, g, 4'b1000);
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
