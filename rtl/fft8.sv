// fft8: 8-point radix-2 decimation-in-time FFT / IFFT, three pipelined stages.
//
// Inputs x(0)..x(7) in natural order; internally they enter the butterfly
// network in bit-reversed order (x0 x4 x2 x6 x1 x5 x3 x7), and the results
// X(0)..X(7) leave in natural order.
//   Stage I  : four butterflies, no multiplication (all factors are W^0).
//   Stage II : two groups of two butterflies; the lower branch of the second
//              butterfly of each group is multiplied by W^2 = -j (or +j for
//              the IFFT), done by swapping real/imaginary parts and negating.
//   Stage III: the lower half is multiplied by W^0..W^3 in twiddle_mul, where
//              only W^1 and W^3 use multipliers (2 each, 4 in total), then
//              four butterflies.
// Twiddles are scaled by 2^8, so the result is 256 times the exact
// unnormalised transform: X(k) = 256 * sum_n x(n) exp(-+j 2 pi n k / 8)
// (minus sign for INVERSE = 0, plus sign for INVERSE = 1), with 0.707 taken
// as 181/256. No 1/N scaling is applied, matching the published IFFT output
// values. Output width is IN_W + 12, so 4-bit QAM levels give 16-bit samples.
//
// Each stage ends in a register: latency 3 cycles, one transform accepted per
// cycle. Handshake is valid/ready on both sides; the whole pipeline holds
// when its last stage is full and out_ready is low (in_ready is then low).
// The stage layout follows the published butterfly diagram; the pipelining,
// handshake and exact bit growth are this design's own choices.
module fft8
  import ofdm_pkg::*;
#(
  parameter int unsigned IN_W    = 4,
  parameter bit          INVERSE = 1'b1,
  localparam int unsigned OUT_W  = IN_W + 12
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  in_re  [NPT],
  input  logic signed [IN_W-1:0]  in_im  [NPT],
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [OUT_W-1:0] out_re [NPT],
  output logic signed [OUT_W-1:0] out_im [NPT]
);

  localparam int unsigned W1 = IN_W + 1;   // after stage I
  localparam int unsigned W2 = IN_W + 2;   // after stage II
  localparam int unsigned WT = W2 + 9;     // after the stage III twiddles

  function automatic int unsigned bitrev3(input int unsigned i);
    return ((i & 1) << 2) | (i & 2) | ((i >> 2) & 1);
  endfunction

  logic adv;
  logic v1, v2, v3;

  assign adv       = !v3 || out_ready;
  assign in_ready  = adv;
  assign out_valid = v3;

  // ---------------- Stage I ----------------
  logic signed [W1-1:0] s1_re_d [NPT], s1_im_d [NPT];
  logic signed [W1-1:0] s1_re   [NPT], s1_im   [NPT];

  for (genvar m = 0; m < NPT / 2; m++) begin : g_st1
    butterfly #(.W(IN_W)) u_bf (
      .a_re   (in_re[bitrev3(2*m)]),
      .a_im   (in_im[bitrev3(2*m)]),
      .b_re   (in_re[bitrev3(2*m+1)]),
      .b_im   (in_im[bitrev3(2*m+1)]),
      .sum_re (s1_re_d[2*m]),
      .sum_im (s1_im_d[2*m]),
      .diff_re(s1_re_d[2*m+1]),
      .diff_im(s1_im_d[2*m+1])
    );
  end

  // ---------------- Stage II ----------------
  // s1[4g+3] is a stage I difference, so each part lies in
  // [-(2^IN_W - 1), 2^IN_W - 1] and its negation still fits W1 bits.
  logic signed [W1-1:0] rot_re [2], rot_im [2];
  logic signed [W2-1:0] s2_re_d [NPT], s2_im_d [NPT];
  logic signed [W2-1:0] s2_re   [NPT], s2_im   [NPT];

  for (genvar g = 0; g < 2; g++) begin : g_st2
    always_comb begin
      if (INVERSE) begin               // * (+j)
        rot_re[g] = -s1_im[4*g+3];
        rot_im[g] =  s1_re[4*g+3];
      end else begin                   // * (-j)
        rot_re[g] =  s1_im[4*g+3];
        rot_im[g] = -s1_re[4*g+3];
      end
    end
    butterfly #(.W(W1)) u_bf_even (
      .a_re   (s1_re[4*g]),   .a_im   (s1_im[4*g]),
      .b_re   (s1_re[4*g+2]), .b_im   (s1_im[4*g+2]),
      .sum_re (s2_re_d[4*g]),   .sum_im (s2_im_d[4*g]),
      .diff_re(s2_re_d[4*g+2]), .diff_im(s2_im_d[4*g+2])
    );
    butterfly #(.W(W1)) u_bf_odd (
      .a_re   (s1_re[4*g+1]), .a_im   (s1_im[4*g+1]),
      .b_re   (rot_re[g]),    .b_im   (rot_im[g]),
      .sum_re (s2_re_d[4*g+1]), .sum_im (s2_im_d[4*g+1]),
      .diff_re(s2_re_d[4*g+3]), .diff_im(s2_im_d[4*g+3])
    );
  end

  // ---------------- Stage III ----------------
  logic signed [WT-1:0] tw_re [NPT/2], tw_im [NPT/2];
  logic signed [WT-1:0] up_re [NPT/2], up_im [NPT/2];
  logic signed [WT:0]   s3_re_d [NPT], s3_im_d [NPT];

  for (genvar k = 0; k < NPT / 2; k++) begin : g_st3
    twiddle_mul #(.W(W2), .K(k), .INVERSE(INVERSE)) u_tw (
      .in_re (s2_re[k+4]),
      .in_im (s2_im[k+4]),
      .out_re(tw_re[k]),
      .out_im(tw_im[k])
    );
    // The upper branch is scaled by the same 2^8 as the twiddles.
    assign up_re[k] = WT'(s2_re[k]) <<< TW_SHIFT;
    assign up_im[k] = WT'(s2_im[k]) <<< TW_SHIFT;
    butterfly #(.W(WT)) u_bf (
      .a_re   (up_re[k]), .a_im   (up_im[k]),
      .b_re   (tw_re[k]), .b_im   (tw_im[k]),
      .sum_re (s3_re_d[k]),   .sum_im (s3_im_d[k]),
      .diff_re(s3_re_d[k+4]), .diff_im(s3_im_d[k+4])
    );
  end

  // ---------------- Pipeline registers ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      v3 <= 1'b0;
    end else if (adv) begin
      v1 <= in_valid;
      v2 <= v1;
      v3 <= v2;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_re  <= '{default: '0};
      s1_im  <= '{default: '0};
      s2_re  <= '{default: '0};
      s2_im  <= '{default: '0};
      out_re <= '{default: '0};
      out_im <= '{default: '0};
    end else if (adv) begin
      s1_re  <= s1_re_d;
      s1_im  <= s1_im_d;
      s2_re  <= s2_re_d;
      s2_im  <= s2_im_d;
      out_re <= s3_re_d;
      out_im <= s3_im_d;
    end
  end

  // Output data must hold while it waits for out_ready.
  a_valid_hold: assert property (@(posedge clk) disable iff (rst)
                                 out_valid && !out_ready |=> out_valid);
  for (genvar i = 0; i < NPT; i++) begin : g_hold
    a_data_hold: assert property (@(posedge clk) disable iff (rst)
                                  out_valid && !out_ready |=> $stable(out_re[i]) && $stable(out_im[i]));
  end

endmodule
