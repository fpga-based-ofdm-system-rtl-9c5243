// tb_p2s: parallel to serial converter at its default width (256 bits).
// Random words are offered with random gaps and the serial side accepts
// bits with random delays. The bits must leave LSB first, in order. With the
// serial side always ready, back-to-back words must leave one bit per cycle
// with no gap, i.e. one word every 256 cycles, the first bit one cycle after
// the load.
module tb_p2s;
  localparam int N = 256;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic         s_valid, s_ready, m_valid, m_ready, m_bit;
  logic [N-1:0] s_data;
  p2s #(.N(N)) dut (.*);

  bit bits_q[$];
  bit fire = 0;
  int bits_out = 0, busy_cycles = 0;

  function automatic logic [N-1:0] rand_word();
    logic [N-1:0] w;
    for (int i = 0; i < N; i += 32) w[i +: 32] = $urandom;
    return w;
  endfunction

  task automatic take_bit();
    checks++;
    bits_out++;
    if (bits_q.size() == 0) begin
      failures++;
      $display("FAIL bit with nothing expected");
    end else if (m_bit != bits_q.pop_front()) begin
      failures++;
      if (failures < 10) $display("FAIL bit %0d wrong", bits_out);
    end
  endtask

  initial begin
    int first_load = -1, first_bit = -1;
    s_valid = 0; s_data = '0; m_ready = 0;
    repeat (3) @(negedge clk);
    rst = 0;

    // ---- full rate, four words back to back ----
    for (int cyc = 0; cyc < 4 * N + 4; cyc++) begin
      @(negedge clk);
      if (!s_valid || fire) begin
        s_valid = cyc < 3 * N;
        s_data  = rand_word();
      end
      m_ready = 1;
      #1;
      fire = s_valid && s_ready;
      if (m_valid) begin
        if (first_bit < 0) first_bit = cyc;
        busy_cycles++;
        take_bit();
      end
      if (fire) begin
        if (first_load < 0) first_load = cyc;
        for (int i = 0; i < N; i++) bits_q.push_back(s_data[i]);
      end
    end
    // 4 words accepted (one in the last stretch) -> 4*N bits without a gap
    checks++;
    if (first_bit != first_load + 1 || busy_cycles != 4 * N || bits_q.size() != 0) begin
      failures++;
      $display("FAIL full rate: load %0d first bit %0d busy %0d left %0d",
               first_load, first_bit, busy_cycles, bits_q.size());
    end

    // ---- random gaps and back-pressure ----
    s_valid = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      if (!s_valid || fire) begin
        s_valid = ($urandom % 8) == 0;
        s_data  = rand_word();
      end
      m_ready = ($urandom % 3) != 0;
      #1;
      fire = s_valid && s_ready;
      if (m_valid && m_ready) take_bit();
      if (fire) for (int i = 0; i < N; i++) bits_q.push_back(s_data[i]);
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
