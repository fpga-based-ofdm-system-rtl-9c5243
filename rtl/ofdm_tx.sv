// ofdm_tx: OFDM transmitter, serial data bits in, serial OFDM samples out.
//
// Chain: s2p collects 32 data bits (one OFDM symbol), eight qam16_mod
// mappers turn bits [4k+3:4k] into the 16-QAM point of subcarrier k, fft8
// in inverse mode (IFFT) turns the eight points into eight complex time
// samples of 16 bits each, and p2s sends those 256 bits out serially.
// Frame layout on the serial output (LSB first): sample k occupies bits
// [32k+15:32k] (real part) and [32k+31:32k+16] (imaginary part), so the
// real part of sample 0 leaves first.
// Timing: every stage uses valid/ready. The serial output needs 256 cycles
// per OFDM symbol while the input needs only 32, so in steady state the
// input is stalled (in_ready low) and one OFDM symbol leaves every 256
// cycles. The block order follows the source's transmitter; the frame
// layout and handshake are this design's own. Synchronous active-high reset.
module ofdm_tx
  import ofdm_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,
  output logic out_valid,
  input  logic out_ready,
  output logic out_bit
);

  logic                          sp_valid, sp_ready;
  logic [FRAME_BITS-1:0]         sp_data;
  logic signed [LEVEL_W-1:0]     sym_re [NPT], sym_im [NPT];
  logic                          ifft_valid, ifft_ready;
  logic signed [TX_SAMPLE_W-1:0] t_re [NPT], t_im [NPT];
  logic [TX_FRAME_BITS-1:0]      frame;

  s2p #(.N(FRAME_BITS)) u_s2p (
    .clk, .rst,
    .s_valid(in_valid), .s_ready(in_ready), .s_bit(in_bit),
    .m_valid(sp_valid), .m_ready(sp_ready), .m_data(sp_data)
  );

  for (genvar k = 0; k < NPT; k++) begin : g_map
    qam16_mod u_mod (
      .data(sp_data[QAM_BITS*k +: QAM_BITS]),
      .re  (sym_re[k]),
      .im  (sym_im[k])
    );
    assign frame[2*TX_SAMPLE_W*k               +: TX_SAMPLE_W] = t_re[k];
    assign frame[2*TX_SAMPLE_W*k + TX_SAMPLE_W +: TX_SAMPLE_W] = t_im[k];
  end

  fft8 #(.IN_W(LEVEL_W), .INVERSE(1'b1)) u_ifft (
    .clk, .rst,
    .in_valid (sp_valid),   .in_ready (sp_ready),
    .in_re    (sym_re),     .in_im    (sym_im),
    .out_valid(ifft_valid), .out_ready(ifft_ready),
    .out_re   (t_re),       .out_im   (t_im)
  );

  p2s #(.N(TX_FRAME_BITS)) u_p2s (
    .clk, .rst,
    .s_valid(ifft_valid), .s_ready(ifft_ready), .s_data(frame),
    .m_valid(out_valid),  .m_ready(out_ready),  .m_bit(out_bit)
  );

endmodule
