// fixed_width_rpr: the reduced-precision replica (RPR) of the ANT multiplier,
// an M x M unsigned fixed-width multiplier that keeps only the M most
// significant bits of the 2M-bit product and compensates for the bits it
// drops.
//
// How it works: the partial products a[i] & b[j] fall into four groups by
// column c = i + j. Columns M..2M-1 are the most significant part (MSP) and
// are summed exactly. Column M-1, the input correction vector (ICV), and
// column M-2, the minor input correction vector (MICV), are the heaviest
// terms of the truncated part; they are injected into the sum with their own
// weights instead of being summed into a low half. Columns below M-2, the
// least significant part (LSP), are dropped. A constant BIAS (in units of
// 2^(M-2)) stands in for the expected value of the dropped LSP and for
// rounding; the result is the sum divided by 2^M. The grouping into MSP, ICV,
// MICV and LSP follows the source; the exact formula and BIAS = 3 are this
// design's own, BIAS picked by evaluating all 8 x 8 inputs (mean error -15.25
// and range -192..+321, in units of the LSB of the exact product a*b). The
// compensation terms only add width to the low end of the sum, keeping them
// off the path that forms the top bits in a carry-save implementation.
//
// Interface: a, b (M bits) in, p (M bits) out with p * 2^M ~ a * b.
// Timing: combinational. The result saturates at all ones, which cannot
// happen for the default M = 8, BIAS = 3.
module fixed_width_rpr #(
  parameter int unsigned M    = ant_pkg::ANT_M,
  parameter int unsigned BIAS = ant_pkg::ANT_BIAS
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] p
);
  localparam int unsigned SW = M + 4;   // sum of columns >= M-2, in units of 2^(M-2)

  logic [SW-1:0] msp_sum;     // MSP terms
  logic [SW-1:0] icv_sum;     // number of ICV terms set
  logic [SW-1:0] micv_sum;    // number of MICV terms set
  logic [SW-1:0] total;

  always_comb begin
    msp_sum  = '0;
    icv_sum  = '0;
    micv_sum = '0;
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < M; j++) begin
        if (a[i] && b[j]) begin
          if (i + j >= M)           msp_sum  = msp_sum + (SW'(1) << (i + j - (M - 2)));
          else if (i + j == M - 1)  icv_sum  = icv_sum + SW'(1);
          else if (i + j == M - 2)  micv_sum = micv_sum + SW'(1);
        end
      end
    end
    total = msp_sum + (icv_sum << 1) + micv_sum + SW'(BIAS);
    if (total[SW-1:M+2] != '0) p = '1;
    else                       p = total[M+1:2];
  end
endmodule
