// tb_ofdm_rx: OFDM receiver. Reference frames are built from random data
// words, disturbed by flipping low-order sample bits (small additive
// noise), and sent in serially with random gaps; the data bits out, taken
// with random back-pressure, must be the original words, LSB first.
module tb_ofdm_rx;
  import ofdm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid, in_ready, in_bit, out_valid, out_ready, out_bit;
  ofdm_rx dut (.*);

  bit in_q[$];
  bit exp_q[$];
  int out_bits = 0, flips = 0;
  bit fire = 0;

  task automatic add_frame();
    logic [31:0]  w = $urandom;
    logic [255:0] f = tx_frame(w);
    // noise: flip some of the 3 lowest bits of each 16-bit part
    for (int p = 0; p < 256; p++)
      if ((p % 16) < 3 && ($urandom % 4) == 0) begin
        f[p] = ~f[p];
        flips++;
      end
    for (int i = 0; i < 256; i++) in_q.push_back(f[i]);
    for (int i = 0; i < 32; i++) exp_q.push_back(w[i]);
  endtask

  initial begin
    in_valid = 0; in_bit = 0; out_ready = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 40000; cyc++) begin
      @(negedge clk);
      if (in_q.size() == 0) add_frame();
      if (!in_valid || fire) begin
        if (fire) void'(in_q.pop_front());
        in_valid = ($urandom % 5) != 0;
        in_bit   = in_q[0];
      end
      out_ready = ($urandom % 3) != 0;
      #1;
      fire = in_valid && in_ready;
      if (out_valid && out_ready) begin
        checks++;
        out_bits++;
        if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected bit"); end
        else if (out_bit != exp_q.pop_front()) begin
          failures++;
          if (failures < 10) $display("FAIL output bit %0d", out_bits);
        end
      end
    end
    checks++;
    if (out_bits < 32 * 100 || flips == 0) begin
      failures++;
      $display("FAIL only %0d bits out", out_bits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
