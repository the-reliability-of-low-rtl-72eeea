// main_block: the full-precision N x N unsigned array multiplier of the ANT
// architecture (the "main DSP block"). It is the part that would run with its
// supply scaled below the critical voltage; here it is plain exact logic.
//
// How it works: partial products pp[i][j] = x[j] & y[i] feed a carry-save
// array of full adders, one row per multiplier bit, as in the triangular cell
// array of the published block diagram. Row i adds partial-product row i to
// the sum and carry vectors of row i-1; the lowest sum bit of each row is a
// finished product bit. A ripple-carry row then merges the last sum and carry
// vectors into the upper N product bits. Operands are unsigned (this design's
// reading of the source); the cell choice (full adders) is this design's own.
//
// Interface: x, y (N bits) in, p (2N bits) out. Timing: combinational, the
// critical path runs through N-1 array rows and the N-bit ripple row.
module main_block #(
  parameter int unsigned N = ant_pkg::ANT_N
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  // sum[i][j] has weight 2^(i+j); carry[i][j] has weight 2^(i+j+1)
  logic [N-1:0] sum   [N];
  logic [N-1:0] carry [N];
  logic [N:0]   rc;            // ripple carries of the final row; rc[N] is
                               // always 0 since the product fits in 2N bits

  // row 0: the first partial-product row, nothing to add yet
  assign sum[0]   = x & {N{y[0]}};
  assign carry[0] = '0;
  assign p[0]     = sum[0][0];

  for (genvar i = 1; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_cell
      logic s_in;
      if (j == N-1) begin : g_top
        assign s_in = 1'b0;
      end else begin : g_mid
        assign s_in = sum[i-1][j+1];
      end
      full_adder u_fa (
        .a (x[j] & y[i]),
        .b (s_in),
        .ci(carry[i-1][j]),
        .s (sum[i][j]),
        .co(carry[i][j])
      );
    end
    assign p[i] = sum[i][0];
  end

  // final ripple-carry row: weights 2^(N+j)
  assign rc[0] = 1'b0;
  for (genvar j = 0; j < N; j++) begin : g_final
    logic s_in;
    if (j == N-1) begin : g_top
      assign s_in = 1'b0;
    end else begin : g_mid
      assign s_in = sum[N-1][j+1];
    end
    full_adder u_fa (
      .a (s_in),
      .b (carry[N-1][j]),
      .ci(rc[j]),
      .s (p[N+j]),
      .co(rc[j+1])
    );
  end
endmodule
