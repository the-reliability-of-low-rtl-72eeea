// error_correction: the decision stage of the ANT multiplier. It compares the
// main product ya with the replica's estimate yr and passes ya unless the two
// differ by more than the threshold TH, in which case the main result is
// taken as corrupted (by voltage-over-scaling timing errors) and the replica's
// estimate is output instead.
//
// How it works: yr carries the top M bits of the product, so it is aligned by
// appending 2N-M zero bits. A (2N+1)-bit subtractor forms ya - yr_aligned, its
// magnitude is compared with TH (strictly greater, as in the block diagram's
// "|.| > Th"), and a 2:1 multiplexer picks the output. The structure follows
// the source's block diagram; the alignment and TH = 2^26 are this design's
// choices (TH sits above the largest fault-free replica error, about 5.44e7).
//
// Interface: ya (2N bits), yr (M bits) in; y_hat (2N bits) and use_rpr (1 when
// the replica value was selected) out. Timing: combinational.
module error_correction #(
  parameter int unsigned    N  = ant_pkg::ANT_N,
  parameter int unsigned    M  = ant_pkg::ANT_M,
  parameter longint unsigned TH = ant_pkg::ANT_TH
) (
  input  logic [2*N-1:0] ya,
  input  logic [M-1:0]   yr,
  output logic [2*N-1:0] y_hat,
  output logic           use_rpr
);
  logic [2*N-1:0] yr_al;
  logic [2*N:0]   diff;       // two's complement ya - yr_al
  logic [2*N-1:0] mag;

  assign yr_al = {yr, {(2*N-M){1'b0}}};

  always_comb begin
    diff    = {1'b0, ya} - {1'b0, yr_al};
    mag     = diff[2*N] ? (2*N)'(-diff) : diff[2*N-1:0];
    use_rpr = 64'(mag) > TH;
    y_hat   = use_rpr ? yr_al : ya;
  end
endmodule
