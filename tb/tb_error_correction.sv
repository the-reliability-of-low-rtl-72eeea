// tb_error_correction: self-checking test of the ANT decision stage. It drives
// main products and replica estimates whose difference lies just below, at
// and just above the threshold (both signs), plus random pairs, and checks
// which value is passed on and the use_rpr flag against a reference that
// works on 64-bit signed integers.
module tb_error_correction;
  localparam int unsigned    N  = 16;
  localparam int unsigned    M  = 8;
  localparam longint unsigned TH = 64'd67108864;
  logic [2*N-1:0] ya, y_hat;
  logic [M-1:0]   yr;
  logic           use_rpr;
  int checks = 0, failures = 0;
  int n_main = 0, n_rpr = 0;

  error_correction #(.N(N), .M(M), .TH(TH)) dut (
    .ya(ya), .yr(yr), .y_hat(y_hat), .use_rpr(use_rpr));

  task automatic check(input logic [2*N-1:0] va, input logic [M-1:0] vr);
    longint d;
    logic   exp_sel;
    logic [2*N-1:0] exp_y;
    ya = va; yr = vr;
    #1;
    d = longint'(va) - longint'(vr) * (longint'(1) << (2*N - M));
    if (d < 0) d = -d;
    exp_sel = d > longint'(TH);
    exp_y   = exp_sel ? {vr, {(2*N-M){1'b0}}} : va;
    if (exp_sel) n_rpr++; else n_main++;
    checks++;
    if (y_hat !== exp_y || use_rpr !== exp_sel) begin
      failures++;
      if (failures < 10) $display("FAIL ya=%h yr=%h: got %h/%b expected %h/%b",
                                  va, vr, y_hat, use_rpr, exp_y, exp_sel);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] r;
    // differences of TH-1, TH, TH+1 above and below the aligned estimate
    for (int k = 0; k < 40; k++) begin
      r = M'($urandom_range(1, (1 << M) - 2));
      for (int o = -1; o <= 1; o++) begin
        longint base;
        base = longint'(r) << (2*N - M);
        if (base + longint'(TH) + longint'(o) < (longint'(1) << (2*N)))
          check((2*N)'(base + longint'(TH) + longint'(o)), r);
        if (base - longint'(TH) - longint'(o) >= 0)
          check((2*N)'(base - longint'(TH) - longint'(o)), r);
      end
    end
    check('0, '0);
    check('1, '0);
    check('0, '1);
    check('1, '1);
    for (int i = 0; i < 20000; i++) begin
      logic [2*N-1:0] v;
      v = (2*N)'($urandom);
      // half the cases near the estimate, half anywhere
      if (i % 2 == 0) check(v, M'($urandom));
      else            check(v, v[2*N-1 -: M] + M'($urandom_range(0, 8)) - M'(4));
    end
    if (n_main == 0 || n_rpr == 0) begin
      failures++;
      $display("FAIL a selection never happened: main %0d rpr %0d", n_main, n_rpr);
    end
    $display("selected main %0d times, replica %0d times", n_main, n_rpr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
