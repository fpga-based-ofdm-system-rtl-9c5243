// tb_ofdm_tx: OFDM transmitter. Random data bits go in with random gaps,
// the serial output is taken with random back-pressure, and every 256-bit
// frame that comes out must equal the reference frame computed from the
// 32 bits that went in. With the output always ready the transmitter must
// deliver one frame every 256 cycles and stall its input in between.
module tb_ofdm_tx;
  import ofdm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid, in_ready, in_bit, out_valid, out_ready, out_bit;
  ofdm_tx dut (.*);

  bit in_q[$];
  logic [255:0] exp_q[$];
  logic [255:0] rx_frame;
  int rx_cnt = 0, frames = 0, stalls = 0, busy = 0;
  bit fire = 0;

  task automatic got_bit(input bit b);
    rx_frame[rx_cnt] = b;
    rx_cnt++;
    if (rx_cnt == 256) begin
      rx_cnt = 0;
      frames++;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected frame"); end
      else if (rx_frame != exp_q.pop_front()) begin
        failures++;
        $display("FAIL frame %0d differs", frames);
      end
    end
  endtask

  task automatic run(input int cycles, input int gap_mod, input int ready_mod);
    for (int cyc = 0; cyc < cycles; cyc++) begin
      @(negedge clk);
      if (!in_valid || fire) begin
        in_valid = ($urandom % gap_mod) == 0;
        in_bit   = 1'($urandom);
      end
      out_ready = ($urandom % ready_mod) == 0;
      #1;
      fire = in_valid && in_ready;
      if (in_valid && !in_ready) stalls++;
      if (out_valid) busy++;
      if (out_valid && out_ready) got_bit(out_bit);
      if (fire) begin
        in_q.push_back(in_bit);
        if (in_q.size() == 32) begin
          logic [31:0] w;
          for (int i = 0; i < 32; i++) w[i] = in_q.pop_front();
          exp_q.push_back(tx_frame(w));
        end
      end
    end
  endtask

  initial begin
    in_valid = 0; in_bit = 0; out_ready = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // full rate: 20 frames in 20*256 + start-up cycles
    run(20 * 256 + 40, 1, 1);
    checks++;
    if (frames < 19 || busy < 20 * 256 - 1 || stalls == 0) begin
      failures++;
      $display("FAIL full rate: frames=%0d busy=%0d stalls=%0d", frames, busy, stalls);
    end
    // random gaps and back-pressure
    run(30000, 2, 2);
    checks++;
    if (frames < 40) begin failures++; $display("FAIL only %0d frames", frames); end
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
