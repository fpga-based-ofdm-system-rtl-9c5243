// ofdm_rx: OFDM receiver, serial OFDM samples in, serial data bits out.
//
// Chain: s2p collects the 256 bits of one OFDM symbol (eight complex
// samples of 16 bits, laid out as ofdm_tx sends them), fft8 in forward mode
// turns them back into eight subcarrier values, eight qam16_demod slicers
// recover 4 data bits per subcarrier, and p2s sends the 32 bits out LSB
// first, i.e. in the order the transmitter received them.
// Gain: the transmitter IFFT and this FFT each multiply by 256 (twiddle
// scale) and the FFT by 8 (no 1/N), so a QAM level L arrives as L * 2^19;
// the slicers use that gain. Each FFT output has 16 + 12 = 28 bits.
// Timing: valid/ready throughout; one OFDM symbol per 256 input bits, 32
// output bits per symbol. The source names the receiver blocks; their
// widths, gain handling and handshake are this design's own.
// Synchronous active-high reset.
module ofdm_rx
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

  localparam int unsigned RX_W = TX_SAMPLE_W + 12;

  logic                          sp_valid, sp_ready;
  logic [TX_FRAME_BITS-1:0]      sp_data;
  logic signed [TX_SAMPLE_W-1:0] r_re [NPT], r_im [NPT];
  logic                          fft_valid, fft_ready;
  logic signed [RX_W-1:0]        f_re [NPT], f_im [NPT];
  logic [FRAME_BITS-1:0]         bits;

  s2p #(.N(TX_FRAME_BITS)) u_s2p (
    .clk, .rst,
    .s_valid(in_valid), .s_ready(in_ready), .s_bit(in_bit),
    .m_valid(sp_valid), .m_ready(sp_ready), .m_data(sp_data)
  );

  for (genvar k = 0; k < NPT; k++) begin : g_bins
    assign r_re[k] = sp_data[2*TX_SAMPLE_W*k               +: TX_SAMPLE_W];
    assign r_im[k] = sp_data[2*TX_SAMPLE_W*k + TX_SAMPLE_W +: TX_SAMPLE_W];
    qam16_demod #(.IN_W(RX_W), .SCALE_LOG2(3 + 2 * TW_SHIFT)) u_demod (
      .re  (f_re[k]),
      .im  (f_im[k]),
      .data(bits[QAM_BITS*k +: QAM_BITS])
    );
  end

  fft8 #(.IN_W(TX_SAMPLE_W), .INVERSE(1'b0)) u_fft (
    .clk, .rst,
    .in_valid (sp_valid),  .in_ready (sp_ready),
    .in_re    (r_re),      .in_im    (r_im),
    .out_valid(fft_valid), .out_ready(fft_ready),
    .out_re   (f_re),      .out_im   (f_im)
  );

  p2s #(.N(FRAME_BITS)) u_p2s (
    .clk, .rst,
    .s_valid(fft_valid), .s_ready(fft_ready), .s_data(bits),
    .m_valid(out_valid), .m_ready(out_ready), .m_bit(out_bit)
  );

endmodule
