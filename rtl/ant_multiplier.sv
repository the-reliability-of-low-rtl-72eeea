// ant_multiplier: N x N algorithmic-noise-tolerant (ANT) multiplier with a
// fixed-width reduced-precision replica (RPR). The main block computes the
// exact product and may be run at a supply below its critical voltage to save
// energy, which makes it produce occasional large timing errors. An M-bit
// fixed-width replica on the top bits of the operands computes a cheap
// estimate of the product's top M bits in parallel. Both results are
// registered; the error correction block then outputs the main product unless
// it differs from the estimate by more than TH, in which case it outputs the
// estimate.
//
// Interface: clk, rst_n (asynchronous, active low); operands x, y (N bits);
// vos_err (2N bits) is XORed onto the main product before its register and
// stands for the timing errors that voltage over-scaling causes (tie it to 0
// in normal use); y_hat (2N bits) is the corrected product and use_rpr flags
// a cycle in which the replica's estimate was output.
// Timing: one operand pair per cycle; y_hat and use_rpr refer to the operands
// presented one clock edge earlier. The two registers and the block structure
// follow the source's architecture diagram; the reset, the error input and the
// unsigned operands are this design's choices.
module ant_multiplier #(
  parameter int unsigned     N  = ant_pkg::ANT_N,
  parameter int unsigned     M  = ant_pkg::ANT_M,
  parameter longint unsigned TH = ant_pkg::ANT_TH
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  input  logic [2*N-1:0] vos_err,
  output logic [2*N-1:0] y_hat,
  output logic           use_rpr
);
  logic [2*N-1:0] ya_comb, ya_q;
  logic [M-1:0]   yr_comb, yr_q;

  main_block #(.N(N)) u_main (
    .x(x),
    .y(y),
    .p(ya_comb)
  );

  fixed_width_rpr #(.M(M)) u_rpr (
    .a(x[N-1 -: M]),
    .b(y[N-1 -: M]),
    .p(yr_comb)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ya_q <= '0;
      yr_q <= '0;
    end else begin
      ya_q <= ya_comb ^ vos_err;
      yr_q <= yr_comb;
    end
  end

  error_correction #(.N(N), .M(M), .TH(TH)) u_ec (
    .ya(ya_q),
    .yr(yr_q),
    .y_hat(y_hat),
    .use_rpr(use_rpr)
  );
endmodule
