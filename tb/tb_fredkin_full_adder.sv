// tb_fredkin_full_adder: exhaustive check of the one-bit full adder against
// the arithmetic sum a+b+cin, including the 0,1,1 case (sum 0, carry 1).
module tb_fredkin_full_adder;
  int checks = 0, failures = 0;
  logic a, b, cin, s, cout;

  fredkin_full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, cin} = 3'(v);
      total = int'(a) + int'(b) + int'(cin);
      #1;
      checks++;
      if ({cout, s} !== 2'(total)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b -> cout=%b s=%b", a, b, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
