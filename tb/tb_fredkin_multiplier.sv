// tb_fredkin_multiplier: the 12 x 4 -> 16 bit multiplier against integer
// products: every 4-bit multiplier with corner multiplicands, then random.
module tb_fredkin_multiplier;
  int checks = 0, failures = 0;
  logic [11:0] a;
  logic [3:0]  b;
  logic [15:0] p;

  fredkin_multiplier dut (.a(a), .b(b), .p(p));

  task automatic check(input logic [11:0] ta, input logic [3:0] tb_);
    a = ta; b = tb_;
    #1;
    checks++;
    if (p !== 16'(int'(ta) * int'(tb_))) begin
      failures++;
      $display("FAIL %0d * %0d -> %0d", ta, tb_, p);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 16; m++) begin
      check(12'hfff, 4'(m));
      check(12'h000, 4'(m));
      check(12'h001, 4'(m));
      check(12'ha5a, 4'(m));
    end
    for (int i = 0; i < 1000; i++) check(12'($urandom), 4'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
