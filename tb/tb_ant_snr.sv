// tb_ant_snr: signal-to-noise workload for the ANT multiplier at its default
// sizes. Random operand pairs stream through at one per cycle while
// voltage-over-scaling errors are injected into the main block's result at a
// rate of about 5% of cycles: timing errors under a scaled supply hit the
// long carry paths, so each error flips one of the upper product bits
// (weights 2^20..2^31). For the same stream the test measures, against the
// exact products, the SNR of the uncorrected main output, of the replica
// estimate alone and of the corrected ANT output, each as
// 10*log10(sum(exact^2) / sum(error^2)). It checks that the corrected output
// beats both the corrupted main output and the replica alone, and that every
// error-free cycle delivered the exact product.
module tb_ant_snr;
  localparam int unsigned N = 16;
  localparam int unsigned M = 8;
  localparam int unsigned SAMPLES = 50000;

  logic           clk = 1'b0, rst_n;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] vos_err, y_hat;
  logic           use_rpr;
  int checks = 0, failures = 0;
  int n_err = 0, n_corrected = 0;
  real sig = 0.0, noise_main = 0.0, noise_ant = 0.0, noise_rpr = 0.0;
  real snr_main, snr_ant, snr_rpr;

  ant_multiplier dut (
    .clk(clk), .rst_n(rst_n), .x(x), .y(y), .vos_err(vos_err),
    .y_hat(y_hat), .use_rpr(use_rpr));

  always #5 clk = ~clk;

  function automatic real db(input real s, input real n);
    return 10.0 * $log10(s / n);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0]   xs, ys;
    logic [2*N-1:0] es, exact;
    real            e, r;

    x = '0; y = '0; vos_err = '0; rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < SAMPLES; t++) begin
      xs = N'($urandom);
      ys = N'($urandom);
      es = ($urandom_range(0, 99) < 5) ? (2*N)'(1) << $urandom_range(20, 2*N-1) : '0;
      x = xs; y = ys; vos_err = es;
      @(posedge clk);
      #1;
      exact = (2*N)'(xs) * (2*N)'(ys);
      if (es != '0) n_err++;
      if (use_rpr) n_corrected++;
      sig        += real'(exact) * real'(exact);
      e           = real'(exact ^ es) - real'(exact);
      noise_main += e * e;
      e           = real'(y_hat) - real'(exact);
      noise_ant  += e * e;
      // replica estimate alone, from its definition: partial products of the
      // operands' top 8 bits in columns >= 6, plus 3 * 2^6, divided by 2^8,
      // aligned to bit 24 of the product
      r = 0.0;
      for (int i = 0; i < M; i++)
        for (int j = 0; j < M; j++)
          if (xs[N-M+i] && ys[N-M+j] && i + j >= M - 2) r += real'(longint'(1) << (i + j));
      r = $floor((r + 3.0 * 64.0) / 256.0) * 16777216.0;
      e = r - real'(exact);
      noise_rpr += e * e;
      if (es == '0) begin
        checks++;
        if (y_hat !== exact) begin
          failures++;
          if (failures < 10) $display("FAIL error-free %h*%h gave %h", xs, ys, y_hat);
        end
      end
    end
    snr_main = db(sig, noise_main);
    snr_ant  = db(sig, noise_ant);
    snr_rpr  = db(sig, noise_rpr);
    $display("%0d samples, %0d with injected errors, %0d replaced by the replica",
             SAMPLES, n_err, n_corrected);
    $display("SNR: main with errors %0.2f dB, replica alone %0.2f dB, ANT output %0.2f dB",
             snr_main, snr_rpr, snr_ant);
    checks++;
    if (!(snr_ant > snr_main + 3.0)) begin
      failures++;
      $display("FAIL ANT output does not improve on the corrupted main output");
    end
    checks++;
    if (!(snr_ant > snr_rpr)) begin
      failures++;
      $display("FAIL ANT output does not improve on the replica alone");
    end
    checks++;
    if (n_err == 0 || n_corrected == 0) begin
      failures++;
      $display("FAIL no error injected or none corrected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
