// tb_fixed_width_rpr: exhaustive self-checking test of the 8-bit fixed-width
// replica multiplier. The expected value is formed differently from the
// block: the exact product a*b minus the partial products of the dropped
// columns (below M-2), plus the bias, divided by 2^M. The test also checks
// the error statistics against the exact product over all 65536 inputs:
// range -192..+321 and a mean within +-16 (units of the product's LSB).
module tb_fixed_width_rpr;
  localparam int unsigned M = 8;
  localparam int unsigned BIAS = 3;
  logic [M-1:0] a, b, p;
  int checks = 0, failures = 0;
  int     err, err_min, err_max, err_sum;
  logic   range_ok;

  fixed_width_rpr #(.M(M), .BIAS(BIAS)) dut (.a(a), .b(b), .p(p));

  function automatic int unsigned reference(input int unsigned ai, input int unsigned bi);
    int unsigned low;
    low = 0;
    // value of the dropped least significant part
    for (int k = 0; k < M - 2; k++)
      if (bi[k]) low += (ai * (1 << k)) & ((1 << (M - 2)) - 1) & ~((1 << k) - 1);
    return (ai * bi - low + BIAS * (1 << (M - 2))) >> M;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    err_min = 0; err_max = 0; err_sum = 0;
    for (int i = 0; i < (1 << M); i++) begin
      for (int j = 0; j < (1 << M); j++) begin
        a = M'(i); b = M'(j);
        #1;
        checks++;
        if (int'(p) != int'(reference(i, j))) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d: got %0d expected %0d", i, j, p, reference(i, j));
        end
        err = i * j - int'(p) * (1 << M);
        if (err < err_min) err_min = err;
        if (err > err_max) err_max = err;
        err_sum += err;
      end
    end
    #1;
    checks++;
    range_ok = (err_min == -192) && (err_max == 321);
    if (!range_ok) begin
      failures++;
      $display("FAIL error range %0d..%0d, expected -192..321", err_min, err_max);
    end
    checks++;
    if (err_sum > 16 * 65536 || err_sum < -16 * 65536) begin
      failures++;
      $display("FAIL mean error %0d/65536", err_sum);
    end
    $display("error range %0d..%0d, mean %f", err_min, err_max, real'(err_sum) / 65536.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
