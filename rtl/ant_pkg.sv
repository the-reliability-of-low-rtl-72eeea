// ant_pkg: sizes shared by the blocks of the algorithmic-noise-tolerant (ANT)
// multiplier. The 16-bit main multiplier and the 8-bit fixed-width replica are
// the sizes of the published configuration; the decision threshold is this
// design's own choice, set just above the largest difference the replica can
// show against an error-free main product (about 5.44e7 for 16/8 bits), so a
// correct main result is never replaced.
package ant_pkg;
  parameter int unsigned ANT_N  = 16;          // main block operand width
  parameter int unsigned ANT_M  = 8;           // replica operand and result width
  parameter int unsigned ANT_BIAS = 3;         // replica compensation constant, units of 2^(M-2)
  parameter longint unsigned ANT_TH = 64'd67108864; // 2^26, decision threshold
endpackage
