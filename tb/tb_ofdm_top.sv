// tb_ofdm_top: end-to-end test of the OFDM link at its default sizes.
// The testbench plays the channel: it connects the transmitter output to
// the receiver input, can hold transfers for random cycles, and can flip
// low-order bits of the samples (small noise). Random data bits go in and
// must come out unchanged and in order.
// Phase 1 runs everything at full rate and checks the steady-state rate of
// one OFDM symbol (256 channel bits, 32 data bits) per 256 cycles.
// Phase 2 adds random input gaps, channel gaps, noise and output
// back-pressure; phase 3 drains the receiver slowly. Each mechanism of the design must be seen at least once:
// input stall of the serial-to-parallel stage, IFFT and FFT pipeline
// holds, back-to-back frames on the channel, channel gaps, noise corrected
// by the demapper slicer, output back-pressure, and all 16 QAM points.
module tb_ofdm_top;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic data_in_valid, data_in_ready, data_in_bit;
  logic chan_tx_valid, chan_tx_ready, chan_tx_bit;
  logic chan_rx_valid, chan_rx_ready, chan_rx_bit;
  logic data_out_valid, data_out_ready, data_out_bit;

  ofdm_top dut (.*);

  // channel model
  logic gate, flip;
  assign chan_rx_valid = chan_tx_valid && gate;
  assign chan_tx_ready = chan_rx_ready && gate;
  assign chan_rx_bit   = chan_tx_bit ^ flip;

  bit exp_q[$];
  bit fire = 0;
  int out_bits = 0, chan_bits = 0, chan_pos = 0;
  logic [3:0] nib;
  int nib_cnt = 0;
  int points [16];

  // mechanism counters
  int n_in_stall = 0, n_ifft_hold = 0, n_fft_hold = 0, n_chan_gap = 0;
  int n_noise = 0, n_out_bp = 0, n_b2b = 0;
  bit prev_chan_last = 0;

  task automatic cycle(input int gap_mod, input int chan_mod, input int noise_mod, input int ready_mod);
    @(negedge clk);
    if (!data_in_valid || fire) begin
      data_in_valid = ($urandom % gap_mod) == 0;
      data_in_bit   = 1'($urandom);
    end
    gate = ($urandom % chan_mod) == 0;
    // noise only on the 3 lowest bits of each 16-bit sample part
    flip = noise_mod != 0 && (chan_pos % 16) < 3 && ($urandom % noise_mod) == 0;
    data_out_ready = ($urandom % ready_mod) == 0;
    #1;
    fire = data_in_valid && data_in_ready;
    if (data_in_valid && !data_in_ready) n_in_stall++;
    if (dut.u_tx.u_ifft.in_valid && !dut.u_tx.u_ifft.in_ready) n_ifft_hold++;
    if (dut.u_rx.u_fft.out_valid && !dut.u_rx.u_fft.out_ready) n_fft_hold++;
    if (chan_tx_valid && !gate) n_chan_gap++;
    if (data_out_valid && !data_out_ready) n_out_bp++;
    // a new frame loaded in the same cycle as the previous one's last bit
    if (chan_tx_valid && chan_tx_ready) begin
      chan_bits++;
      if (flip) n_noise++;
      if (chan_pos == 255 && dut.u_tx.u_p2s.s_valid) n_b2b++;
      chan_pos = (chan_pos + 1) % 256;
    end
    if (fire) begin
      exp_q.push_back(data_in_bit);
      nib[nib_cnt] = data_in_bit;
      nib_cnt++;
      if (nib_cnt == 4) begin points[nib]++; nib_cnt = 0; end
    end
    if (data_out_valid && data_out_ready) begin
      checks++;
      out_bits++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output bit"); end
      else if (data_out_bit != exp_q.pop_front()) begin
        failures++;
        if (failures < 10) $display("FAIL output bit %0d", out_bits);
      end
    end
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("  %-32s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask

  initial begin
    int ob0, cb0, c0;
    data_in_valid = 0; data_in_bit = 0; data_out_ready = 0;
    repeat (3) @(negedge clk);
    rst = 0;

    // ---- phase 1: full rate, steady-state rate ----
    repeat (3 * 256) cycle(1, 1, 0, 1);
    ob0 = out_bits; cb0 = chan_bits;
    repeat (20 * 256) cycle(1, 1, 0, 1);
    checks++;
    if (chan_bits - cb0 != 20 * 256 || out_bits - ob0 != 20 * 32) begin
      failures++;
      $display("FAIL rate: %0d channel bits and %0d data bits in 20*256 cycles",
               chan_bits - cb0, out_bits - ob0);
    end

    // ---- phase 2: gaps, noise, back-pressure ----
    repeat (60000) cycle(2, 2, 3, 2);
    // ---- phase 3: a slow data sink, so the receiver FFT must hold ----
    repeat (20000) cycle(1, 1, 3, 16);
    // drain
    c0 = 0;
    while (exp_q.size() > 32 && c0 < 20000) begin cycle(1000000, 1, 0, 1); c0++; end

    $display("mechanisms:");
    need("input stall (S2P full)", n_in_stall);
    need("IFFT pipeline hold", n_ifft_hold);
    need("FFT pipeline hold", n_fft_hold);
    need("back-to-back channel frames", n_b2b);
    need("channel gap", n_chan_gap);
    need("noise bits corrected", n_noise);
    need("output back-pressure", n_out_bp);
    for (int p = 0; p < 16; p++) need($sformatf("QAM point %0d", p), points[p]);
    checks++;
    if (out_bits < 32 * 150) begin failures++; $display("FAIL only %0d bits out", out_bits); end
    $display("data bits through the link: %0d", out_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
