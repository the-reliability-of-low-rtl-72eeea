// tb_ant_multiplier: end-to-end test of the ANT multiplier at its default
// sizes (16 x 16 main block, 8-bit replica, threshold 2^26). A new random
// operand pair enters every cycle. On some cycles a voltage-over-scaling
// error is injected into the main block's result: either a flip of one high
// product bit (large error, must be caught and replaced by the replica
// estimate) or of one low bit (small error, below the threshold, passes
// through). Each output is checked one cycle after its operands against
// independently computed values: the exact product, the replica estimate
// (reference formula below) and the error mask. The test counts how often
// the main result was passed, how often the replica replaced a corrupted
// result and how often a small error went through, and fails if any of these
// never happened. It also checks that the outputs are cleared by reset.
module tb_ant_multiplier;
  localparam int unsigned N = 16;
  localparam int unsigned M = 8;
  localparam longint unsigned TH = 64'd67108864;
  localparam int unsigned BIAS = 3;

  logic           clk = 1'b0, rst_n;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] vos_err, y_hat;
  logic           use_rpr;
  int checks = 0, failures = 0;
  int n_pass = 0, n_corrected = 0, n_small = 0, cycles = 0;

  ant_multiplier dut (
    .clk(clk), .rst_n(rst_n), .x(x), .y(y), .vos_err(vos_err),
    .y_hat(y_hat), .use_rpr(use_rpr));

  always #5 clk = ~clk;

  // reference for the replica: top M bits of each operand, partial products
  // of columns >= M-2 kept, bias added, divided by 2^M
  function automatic logic [M-1:0] rpr_ref(input logic [N-1:0] xv, input logic [N-1:0] yv);
    int unsigned ah, bh, low;
    ah = int'(xv[N-1 -: M]);
    bh = int'(yv[N-1 -: M]);
    low = 0;
    for (int k = 0; k < M - 2; k++)
      if (bh[k]) low += (ah << k) & ((1 << (M - 2)) - 1);
    return M'((ah * bh - low + BIAS * (1 << (M - 2))) >> M);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*N-1:0] exp_prod, exp_main, exp_y, rpr_al;
    logic [N-1:0]   xs, ys;
    logic [2*N-1:0] es;
    logic           exp_sel;
    longint         d;
    int             kind;

    x = '0; y = '0; vos_err = '0; rst_n = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (y_hat !== '0 || use_rpr !== 1'b0) begin
      failures++;
      $display("FAIL outputs not cleared by reset");
    end
    rst_n = 1'b1;

    for (int t = 0; t < 30000; t++) begin
      // drive the next operands and error pattern after the clock edge
      xs = N'($urandom);
      ys = N'($urandom);
      kind = $urandom_range(0, 9);
      if (kind == 0)      es = (2*N)'(1) << $urandom_range(27, 2*N-1);  // large error
      else if (kind == 1) es = (2*N)'(1) << $urandom_range(0, 15);      // small error
      else                es = '0;
      x = xs; y = ys; vos_err = es;
      @(posedge clk);
      cycles++;
      #1;
      // outputs now belong to xs, ys, es: one cycle of latency
      exp_prod = (2*N)'(xs) * (2*N)'(ys);
      exp_main = exp_prod ^ es;
      rpr_al   = {rpr_ref(xs, ys), {(2*N-M){1'b0}}};
      d = longint'(exp_main) - longint'(rpr_al);
      if (d < 0) d = -d;
      exp_sel = d > longint'(TH);
      exp_y   = exp_sel ? rpr_al : exp_main;
      checks++;
      if (y_hat !== exp_y || use_rpr !== exp_sel) begin
        failures++;
        if (failures < 10) $display("FAIL %h*%h err %h: got %h/%b expected %h/%b",
                                    xs, ys, es, y_hat, use_rpr, exp_y, exp_sel);
      end
      // without an error the exact product must come through
      if (es == '0) begin
        checks++;
        if (y_hat !== exp_prod) begin
          failures++;
          if (failures < 10) $display("FAIL error-free %h*%h gave %h", xs, ys, y_hat);
        end
        n_pass++;
      end else if (exp_sel) begin
        n_corrected++;
        // a corrected output stays within the replica's error bound
        d = longint'(exp_prod) - longint'(y_hat);
        checks++;
        if (d > 54400000 || d < -12600000) begin
          failures++;
          $display("FAIL corrected output %h too far from %h", y_hat, exp_prod);
        end
      end else begin
        n_small++;
      end
    end

    if (n_pass == 0)      begin failures++; $display("FAIL no error-free pass"); end
    if (n_corrected == 0) begin failures++; $display("FAIL no correction by the replica"); end
    if (n_small == 0)     begin failures++; $display("FAIL no small error passed through"); end
    $display("cycles %0d: passed %0d, corrected by replica %0d, small errors passed %0d",
             cycles, n_pass, n_corrected, n_small);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
