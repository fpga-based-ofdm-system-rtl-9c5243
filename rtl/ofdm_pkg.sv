// ofdm_pkg: constants and small helper functions shared by the OFDM blocks.
//
// The system is an 8-point OFDM link carrying 16-QAM symbols (4 bits per
// subcarrier, so 32 data bits per OFDM symbol). The FFT/IFFT works in fixed
// point with twiddle factors scaled by 2^8: 1 becomes 256 and
// 0.707 becomes 181, as in the design this follows. The gray-code mapping and
// the level table (00 -> -3, 01 -> -1, 11 -> +1, 10 -> +3) also follow it.
// The sample packing of the serial frame is this design's own choice.
package ofdm_pkg;

  // Points of the FFT/IFFT (subcarriers per OFDM symbol).
  localparam int unsigned NPT = 8;
  // Bits carried by one 16-QAM constellation point.
  localparam int unsigned QAM_BITS = 4;
  // Data bits per OFDM symbol.
  localparam int unsigned FRAME_BITS = NPT * QAM_BITS;
  // Width of one real or imaginary QAM level (-3..+3).
  localparam int unsigned LEVEL_W = 4;
  // Twiddle factors are scaled by 2^TW_SHIFT.
  localparam int unsigned TW_SHIFT = 8;
  // cos(pi/4) * 2^TW_SHIFT, rounded.
  localparam int TW_C45 = 181;
  // Width of one IFFT output component on the transmitter side.
  localparam int unsigned TX_SAMPLE_W = LEVEL_W + 12;
  // Serial bits per transmitted OFDM symbol: 8 complex samples.
  localparam int unsigned TX_FRAME_BITS = NPT * 2 * TX_SAMPLE_W;

  // Binary to gray code.
  function automatic logic [QAM_BITS-1:0] bin2gray(input logic [QAM_BITS-1:0] b);
    return b ^ (b >> 1);
  endfunction

  // Gray code back to binary.
  function automatic logic [QAM_BITS-1:0] gray2bin(input logic [QAM_BITS-1:0] g);
    logic [QAM_BITS-1:0] b;
    b[QAM_BITS-1] = g[QAM_BITS-1];
    for (int i = QAM_BITS - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // Two gray-coded bits to one amplitude level.
  function automatic logic signed [LEVEL_W-1:0] bits2level(input logic [1:0] g);
    unique case (g)
      2'b00:   return -4'sd3;
      2'b01:   return -4'sd1;
      2'b11:   return 4'sd1;
      default: return 4'sd3;   // 2'b10
    endcase
  endfunction

endpackage
