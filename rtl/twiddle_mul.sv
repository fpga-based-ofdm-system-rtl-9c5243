// twiddle_mul: multiply a complex value by one fixed 8-point twiddle factor.
//
// The factor is W^K = exp(-j*2*pi*K/8) for the FFT, or its conjugate for the
// IFFT (INVERSE = 1), scaled by 2^8 so that 1 is 256 and 0.707 is 181.
//   K = 0: the factor is 256, a plain left shift by 8.
//   K = 2: the factor is -j (FFT) or +j (IFFT): real and imaginary parts are
//          exchanged and one of them negated, then shifted left by 8.
//   K = 1, 3: the real and the imaginary part are each multiplied by 181
//          (two real multipliers) and the two products are added or
//          subtracted, e.g. FFT W^1: re = 181a + 181b, im = 181b - 181a.
// This is the multiplier-saving scheme the design is built around: only the
// W^1 and W^3 factors cost multipliers. Input W bits signed, output W+9 bits
// signed, exact (no rounding). Purely combinational.
module twiddle_mul
  import ofdm_pkg::*;
#(
  parameter int unsigned W       = 6,
  parameter int unsigned K       = 1,
  parameter bit          INVERSE = 1'b0
) (
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W+8:0] out_re,
  output logic signed [W+8:0] out_im
);

  localparam int unsigned OW = W + 9;

  logic signed [OW-1:0] a, b, pa, pb;

  always_comb begin
    a  = OW'(in_re);
    b  = OW'(in_im);
    pa = '0;
    pb = '0;
    unique case (K % 8)
      0: begin
        out_re = a <<< TW_SHIFT;
        out_im = b <<< TW_SHIFT;
      end
      2: begin
        if (INVERSE) begin            // * (+j): (a + jb) j = -b + ja
          out_re = (-b) <<< TW_SHIFT;
          out_im = a <<< TW_SHIFT;
        end else begin                // * (-j): (a + jb)(-j) = b - ja
          out_re = b <<< TW_SHIFT;
          out_im = (-a) <<< TW_SHIFT;
        end
      end
      1, 3: begin
        pa = a * OW'(TW_C45);
        pb = b * OW'(TW_C45);
        if (K == 1 && !INVERSE) begin // (1 - j)/sqrt2
          out_re = pa + pb;
          out_im = pb - pa;
        end else if (K == 1) begin    // (1 + j)/sqrt2
          out_re = pa - pb;
          out_im = pa + pb;
        end else if (!INVERSE) begin  // (-1 - j)/sqrt2
          out_re = pb - pa;
          out_im = -(pa + pb);
        end else begin                // (-1 + j)/sqrt2
          out_re = -(pa + pb);
          out_im = pa - pb;
        end
      end
      default: begin
        out_re = '0;
        out_im = '0;
      end
    endcase
  end

endmodule
