// ofdm_ref_pkg: reference model used by the transmitter, receiver and
// end-to-end testbenches. It computes an OFDM frame straight from the
// definitions: a hand-written 16-QAM table, a direct 8-point inverse DFT
// with the twiddle table round(256 exp(+j 2 pi m / 8)) and no 1/N, and the
// serial frame layout (sample k: real part in bits 32k..32k+15, imaginary
// part in bits 32k+16..32k+31).
package ofdm_ref_pkg;

  // 16-QAM point of data value d (I, Q).
  const int QAM_RE [16] = '{-3, -1,  1,  3,  3,  1, -1, -3, -3, -1,  1,  3,  3,  1, -1, -3};
  const int QAM_IM [16] = '{-3, -3, -3, -3, -1, -1, -1, -1,  1,  1,  1,  1,  3,  3,  3,  3};
  // 256 * exp(-j 2 pi m / 8), rounded
  const int TW_RE [8] = '{256, 181, 0, -181, -256, -181, 0, 181};
  const int TW_IM [8] = '{0, -181, -256, -181, 0, 181, 256, 181};

  // 32 data bits (4 per subcarrier, subcarrier k in bits 4k..4k+3) to the
  // 256-bit transmitted frame.
  function automatic logic [255:0] tx_frame(input logic [31:0] bits);
    logic [255:0] f;
    for (int k = 0; k < 8; k++) begin
      int yr = 0, yi = 0;
      for (int n = 0; n < 8; n++) begin
        int d = int'(bits[4*n +: 4]);
        int c = TW_RE[(n * k) % 8];
        int s = -TW_IM[(n * k) % 8];     // conjugate: inverse transform
        yr += QAM_RE[d] * c - QAM_IM[d] * s;
        yi += QAM_RE[d] * s + QAM_IM[d] * c;
      end
      f[32*k +: 16]      = 16'(yr);
      f[32*k + 16 +: 16] = 16'(yi);
    end
    return f;
  endfunction

endpackage
