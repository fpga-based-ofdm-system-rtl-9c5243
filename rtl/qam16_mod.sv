// qam16_mod: 16-QAM mapper, 4 data bits to one complex constellation point.
//
// The 4 bits are first converted from binary to gray code. The two upper
// gray bits select the imaginary (Q) level and the two lower bits the real
// (I) level, each through the table 00 -> -3, 01 -> -1, 11 -> +1, 10 -> +3.
// Example: data 1100 -> gray 1010 -> I = +3, Q = +3. The mapping and the
// example follow the design this is built from; the 4-bit two's-complement
// level format matches its simulation traces. Purely combinational.
module qam16_mod
  import ofdm_pkg::*;
(
  input  logic        [QAM_BITS-1:0] data,
  output logic signed [LEVEL_W-1:0]  re,
  output logic signed [LEVEL_W-1:0]  im
);

  logic [QAM_BITS-1:0] gray;

  always_comb begin
    gray = bin2gray(data);
    re   = bits2level(gray[1:0]);
    im   = bits2level(gray[3:2]);
  end

endmodule
