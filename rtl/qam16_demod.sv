// qam16_demod: 16-QAM demapper, one FFT output bin to 4 data bits.
//
// The receiver FFT delivers each bin multiplied by a known gain of
// 2^SCALE_LOG2 (8 points x 256 x 256 = 2^19 for the default chain, since
// neither transform divides by N and both scale twiddles by 2^8). Each of
// the real and imaginary parts is sliced to the nearest level of
// {-3, -1, +1, +3} with decision thresholds at 0 and +-2 * 2^SCALE_LOG2,
// mapped back to its two gray bits (-3 -> 00, -1 -> 01, +1 -> 11, +3 -> 10),
// and the 4 gray bits {Q bits, I bits} are converted back to binary. This is
// the exact inverse of qam16_mod. The slicer is this design's own choice;
// the source only names the demodulator. Purely combinational.
module qam16_demod
  import ofdm_pkg::*;
#(
  parameter int unsigned IN_W       = 28,
  parameter int unsigned SCALE_LOG2 = 19
) (
  input  logic signed [IN_W-1:0]     re,
  input  logic signed [IN_W-1:0]     im,
  output logic        [QAM_BITS-1:0] data
);

  localparam logic signed [IN_W-1:0] THR = IN_W'(2) <<< SCALE_LOG2;

  function automatic logic [1:0] slice(input logic signed [IN_W-1:0] v);
    if (v >= THR)     return 2'b10;   // +3
    else if (v >= 0)  return 2'b11;   // +1
    else if (v >= -THR) return 2'b01; // -1
    else              return 2'b00;   // -3
  endfunction

  always_comb data = gray2bin({slice(im), slice(re)});

endmodule
