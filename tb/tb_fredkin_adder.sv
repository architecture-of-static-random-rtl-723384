// tb_fredkin_adder: the default 15-bit + 16-bit -> 17-bit adder against the
// integer sum, on corner values and random operands; also an 8-bit adder
// whose carry out must fire.
module tb_fredkin_adder;
  int checks = 0, failures = 0;
  logic [14:0] a;
  logic [15:0] b;
  logic [16:0] s;
  logic        cout;
  logic [7:0]  a8, b8, s8;
  logic        c8;

  fredkin_adder dut (.a(a), .b(b), .s(s), .cout(cout));
  fredkin_adder #(.A_W(8), .B_W(8), .S_W(8)) dut8 (.a(a8), .b(b8), .s(s8), .cout(c8));

  task automatic check(input logic [14:0] ta, input logic [15:0] tb_);
    a = ta; b = tb_;
    #1;
    checks++;
    if (s !== 17'(int'(ta) + int'(tb_)) || cout !== 1'b0) begin
      failures++;
      $display("FAIL %0d + %0d -> %0d (cout %b)", ta, tb_, s, cout);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0);
    check('1, '1);
    check(15'h7fff, 16'h0001);
    check(15'h0001, 16'hffff);
    check(15'h5555, 16'haaaa);
    for (int i = 0; i < 500; i++) check(15'($urandom), 16'($urandom));
    for (int i = 0; i < 200; i++) begin
      a8 = 8'($urandom); b8 = 8'($urandom);
      #1;
      checks++;
      if ({c8, s8} !== 9'(int'(a8) + int'(b8))) begin
        failures++;
        $display("FAIL 8-bit %0d + %0d -> %b %0d", a8, b8, c8, s8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
