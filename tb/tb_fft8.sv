// tb_fft8: checks the 8-point transform in both directions.
//  * Inverse, 4-bit inputs: the published example input
//    (3+3j, 1-3j, 3-3j, 3+1j, 1-3j, -1-1j, -3-1j, 3+1j) must give the
//    published outputs (2560-1536j, 1748+3072j, 2560-512j, 0+724j,
//    -512-512j, 300+3072j, -512+2560j, 0-724j).
//  * Latency: a single transform appears exactly 3 cycles after it is taken.
//  * Random streams, forward (16-bit inputs, as in the receiver) and inverse
//    (4-bit QAM levels), with random valid and ready: every output must equal
//    a direct DFT sum_n x(n) T[(n k) mod 8] with the twiddle table
//    T[m] = round(256 exp(-+j 2 pi m / 8)), in order, with no loss or
//    duplication under back-pressure.
module tb_fft8;
  localparam int NPT = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  // inverse instance, 4-bit inputs
  logic               i_in_valid, i_in_ready, i_out_valid, i_out_ready;
  logic signed [3:0]  i_in_re [NPT], i_in_im [NPT];
  logic signed [15:0] i_out_re [NPT], i_out_im [NPT];
  fft8 #(.IN_W(4), .INVERSE(1'b1)) dut_i (
    .clk, .rst, .in_valid(i_in_valid), .in_ready(i_in_ready), .in_re(i_in_re), .in_im(i_in_im),
    .out_valid(i_out_valid), .out_ready(i_out_ready), .out_re(i_out_re), .out_im(i_out_im));

  // forward instance, 16-bit inputs
  logic               f_in_valid, f_in_ready, f_out_valid, f_out_ready;
  logic signed [15:0] f_in_re [NPT], f_in_im [NPT];
  logic signed [27:0] f_out_re [NPT], f_out_im [NPT];
  fft8 #(.IN_W(16), .INVERSE(1'b0)) dut_f (
    .clk, .rst, .in_valid(f_in_valid), .in_ready(f_in_ready), .in_re(f_in_re), .in_im(f_in_im),
    .out_valid(f_out_valid), .out_ready(f_out_ready), .out_re(f_out_re), .out_im(f_out_im));

  typedef struct { longint re [NPT]; longint im [NPT]; } vec_t;

  function automatic vec_t dft(input vec_t x, input bit inv);
    longint tr [8] = '{256, 181, 0, -181, -256, -181, 0, 181};
    longint ti [8] = '{0, -181, -256, -181, 0, 181, 256, 181};
    vec_t y;
    for (int k = 0; k < NPT; k++) begin
      y.re[k] = 0; y.im[k] = 0;
      for (int n = 0; n < NPT; n++) begin
        longint c = tr[(n * k) % 8];
        longint d = inv ? -ti[(n * k) % 8] : ti[(n * k) % 8];
        y.re[k] += x.re[n] * c - x.im[n] * d;
        y.im[k] += x.re[n] * d + x.im[n] * c;
      end
    end
    return y;
  endfunction

  function automatic vec_t rand_vec(input int w);
    vec_t v;
    for (int n = 0; n < NPT; n++) begin
      v.re[n] = longint'($signed(16'($urandom))) >>> (16 - w);
      v.im[n] = longint'($signed(16'($urandom))) >>> (16 - w);
    end
    return v;
  endfunction

  task automatic compare(input string tag, input vec_t e, input longint gr [NPT], input longint gi [NPT]);
    checks++;
    for (int k = 0; k < NPT; k++)
      if (gr[k] != e.re[k] || gi[k] != e.im[k]) begin
        failures++;
        $display("FAIL %s bin %0d got (%0d,%0d) exp (%0d,%0d)", tag, k, gr[k], gi[k], e.re[k], e.im[k]);
        break;
      end
  endtask

  vec_t qi[$], qf[$];
  longint gr [NPT], gi [NPT];
  int stalls_i = 0, stalls_f = 0;
  bit i_fire = 0, f_fire = 0;

  initial begin
    vec_t x, e;
    int t0, lat;
    i_in_valid = 0; i_out_ready = 1; f_in_valid = 0; f_out_ready = 1;
    for (int n = 0; n < NPT; n++) begin
      i_in_re[n] = '0; i_in_im[n] = '0; f_in_re[n] = '0; f_in_im[n] = '0;
    end
    repeat (3) @(negedge clk);
    rst = 0;

    // ---- published example and latency ----
    begin
      int pr [8] = '{3, 1, 3, 3, 1, -1, -3, 3};
      int pi [8] = '{3, -3, -3, 1, -3, -1, -1, 1};
      longint er [8] = '{2560, 1748, 2560, 0, -512, 300, -512, 0};
      longint ei [8] = '{-1536, 3072, -512, 724, -512, 3072, 2560, -724};
      @(negedge clk);
      for (int n = 0; n < NPT; n++) begin i_in_re[n] = 4'(pr[n]); i_in_im[n] = 4'(pi[n]); end
      i_in_valid = 1;
      t0 = 0;
      @(negedge clk);
      i_in_valid = 0;
      lat = 1;
      while (!i_out_valid && lat < 20) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 3) begin failures++; $display("FAIL latency %0d, expected 3", lat); end
      for (int k = 0; k < NPT; k++) begin e.re[k] = er[k]; e.im[k] = ei[k]; gr[k] = i_out_re[k]; gi[k] = i_out_im[k]; end
      compare("published", e, gr, gi);
      @(negedge clk);
    end

    // ---- random streams with back-pressure ----
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      if (!i_in_valid || i_fire) begin
        i_in_valid = ($urandom % 3) != 0;
        x = rand_vec(3);
        for (int n = 0; n < NPT; n++) begin i_in_re[n] = 4'(x.re[n]); i_in_im[n] = 4'(x.im[n]); end
        if (i_in_valid) qi.push_back(dft(x, 1));
      end
      if (!f_in_valid || f_fire) begin
        f_in_valid = ($urandom % 3) != 0;
        x = rand_vec(16);
        for (int n = 0; n < NPT; n++) begin f_in_re[n] = 16'(x.re[n]); f_in_im[n] = 16'(x.im[n]); end
        if (f_in_valid) qf.push_back(dft(x, 0));
      end
      i_out_ready = ($urandom % 4) != 0;
      f_out_ready = ($urandom % 4) != 0;
      #1;
      i_fire = i_in_valid && i_in_ready;
      f_fire = f_in_valid && f_in_ready;
      if (i_in_valid && !i_in_ready) stalls_i++;
      if (f_in_valid && !f_in_ready) stalls_f++;
      if (i_out_valid && i_out_ready) begin
        for (int k = 0; k < NPT; k++) begin gr[k] = i_out_re[k]; gi[k] = i_out_im[k]; end
        if (qi.size() == 0) begin failures++; $display("FAIL inverse: unexpected output"); end
        else compare("inverse", qi.pop_front(), gr, gi);
      end
      if (f_out_valid && f_out_ready) begin
        for (int k = 0; k < NPT; k++) begin gr[k] = f_out_re[k]; gi[k] = f_out_im[k]; end
        if (qf.size() == 0) begin failures++; $display("FAIL forward: unexpected output"); end
        else compare("forward", qf.pop_front(), gr, gi);
      end
    end
    // an input offered in the last cycle may still be pending in the queue
    checks++;
    if (qi.size() > 4 || qf.size() > 4 || stalls_i == 0 || stalls_f == 0) begin
      failures++;
      $display("FAIL pending i=%0d f=%0d stalls i=%0d f=%0d", qi.size(), qf.size(), stalls_i, stalls_f);
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
