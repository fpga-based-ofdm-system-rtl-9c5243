// tb_s2p: serial to parallel converter at its default width (32 bits).
// Random bits arrive with random gaps and the consumer takes words with
// random delays. Every word must hold the bits in arrival order, first bit
// in bit 0. Also checked: with input and output always ready a word appears
// exactly one cycle after its last bit and every 32 cycles, and a slow
// consumer does stall the serial input.
module tb_s2p;
  localparam int N = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic         s_valid, s_ready, s_bit, m_valid, m_ready;
  logic [N-1:0] m_data;
  s2p #(.N(N)) dut (.*);

  bit bits_q[$];
  int stalls = 0, words = 0;
  bit fire = 0;

  task automatic take_word();
    logic [N-1:0] e;
    for (int i = 0; i < N; i++) e[i] = bits_q.pop_front();
    checks++;
    words++;
    if (m_data != e) begin
      failures++;
      $display("FAIL word %0d got %h exp %h", words, m_data, e);
    end
  endtask

  initial begin
    int last_in, t_prev;
    s_valid = 0; s_bit = 0; m_ready = 0;
    repeat (3) @(negedge clk);
    rst = 0;

    // ---- full rate: latency and period ----
    t_prev = -1;
    for (int cyc = 0; cyc < 4 * N + 2; cyc++) begin
      @(negedge clk);
      s_valid = 1; s_bit = 1'($urandom); m_ready = 1;
      #1;
      if (m_valid) begin
        take_word();
        checks++;
        if (last_in != cyc - 1 || (t_prev >= 0 && cyc - t_prev != N)) begin
          failures++;
          $display("FAIL timing: word at %0d, last bit at %0d, previous word at %0d", cyc, last_in, t_prev);
        end
        t_prev = cyc;
      end
      if (s_valid && s_ready) begin
        bits_q.push_back(s_bit);
        if (bits_q.size() == N) last_in = cyc;
      end
    end
    @(negedge clk);
    s_valid = 0;
    #1;
    if (m_valid) take_word();
    @(negedge clk);
    // leftover bits of a partial word are flushed by a reset
    rst = 1; bits_q.delete();
    @(negedge clk);
    rst = 0;

    // ---- random gaps and back-pressure ----
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      if (!s_valid || fire) begin
        s_valid = ($urandom % 4) != 0;
        s_bit = 1'($urandom);
      end
      m_ready = ($urandom % 40) == 0;
      #1;
      fire = s_valid && s_ready;
      if (s_valid && !s_ready) stalls++;
      if (m_valid && m_ready) take_word();
      if (fire) bits_q.push_back(s_bit);
    end
    checks++;
    if (stalls == 0 || words < 20) begin
      failures++;
      $display("FAIL stalls=%0d words=%0d", stalls, words);
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
