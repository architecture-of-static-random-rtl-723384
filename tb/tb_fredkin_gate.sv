// tb_fredkin_gate: exhaustive check of the 3x3 Fredkin gate (WIDTH=1) and a
// random check of a 5-wide bank.  Expected values come from the controlled
// swap rule: a=0 passes b,c straight, a=1 exchanges them.
module tb_fredkin_gate;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;
  logic       a5;
  logic [4:0] b5, c5, q5, r5;
  logic       p5;

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  fredkin_gate #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .c(c5), .p(p5), .q(q5), .r(r5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (p !== a || q !== (a ? c : b) || r !== (a ? b : c)) begin
        failures++;
        $display("FAIL abc=%b%b%b -> pqr=%b%b%b", a, b, c, p, q, r);
      end
    end
    // 5-wide bank: same rule bit by bit, one shared control
    for (int i = 0; i < 50; i++) begin
      a5 = 1'($urandom); b5 = 5'($urandom); c5 = 5'($urandom);
      #1;
      checks++;
      if (p5 !== a5 || q5 !== (a5 ? c5 : b5) || r5 !== (a5 ? b5 : c5)) begin
        failures++;
        $display("FAIL bank a=%b b=%h c=%h q=%h r=%h", a5, b5, c5, q5, r5);
      end
      checks++;
      if (({q5, r5} ^ {b5, c5}) != 0 && !a5) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
