// butterfly: radix-2 complex butterfly, the add/subtract cell of the FFT.
//
// Computes sum = a + b and diff = a - b on complex inputs. The twiddle factor
// of the lower branch is applied before this cell (see twiddle_mul), so the
// cell itself needs no multiplier: one complex addition is two real additions.
// Inputs are W bits signed; outputs are one bit wider so nothing overflows.
// Purely combinational; the pipeline registers live in fft8.
module butterfly #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] a_re,
  input  logic signed [W-1:0] a_im,
  input  logic signed [W-1:0] b_re,
  input  logic signed [W-1:0] b_im,
  output logic signed [W:0]   sum_re,
  output logic signed [W:0]   sum_im,
  output logic signed [W:0]   diff_re,
  output logic signed [W:0]   diff_im
);

  always_comb begin
    sum_re  = (W+1)'(a_re) + (W+1)'(b_re);
    sum_im  = (W+1)'(a_im) + (W+1)'(b_im);
    diff_re = (W+1)'(a_re) - (W+1)'(b_re);
    diff_im = (W+1)'(a_im) - (W+1)'(b_im);
  end

endmodule
