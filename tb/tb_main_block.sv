// tb_main_block: self-checking test of the N x N array multiplier. It applies
// corner operands (zero, one, all ones, single bits) and random operands and
// compares the product with the simulator's own multiplication.
module tb_main_block;
  localparam int unsigned N = 16;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  main_block #(.N(N)) dut (.x(x), .y(y), .p(p));

  task automatic check(input logic [N-1:0] a, input logic [N-1:0] b);
    logic [2*N-1:0] exp_p;
    x = a; y = b;
    #1;
    exp_p = (2*N)'(a) * (2*N)'(b);
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h: got %h expected %h", a, b, p, exp_p);
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
    check('0, '0);
    check('1, '1);
    check('1, 1);
    check(1, '1);
    check('1, '0);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) check(N'(1) << i, N'(1) << j);
    for (int i = 0; i < 20000; i++) check(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
