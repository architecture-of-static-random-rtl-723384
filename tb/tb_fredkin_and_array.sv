// tb_fredkin_and_array: 12-bit word AND one bit, random words with b=0 and b=1.
module tb_fredkin_and_array;
  int checks = 0, failures = 0;
  logic [11:0] a, p;
  logic        b;

  fredkin_and_array dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      a = (i == 0) ? 12'hfff : 12'($urandom);
      b = 1'(i);
      #1;
      checks++;
      if (p !== (b ? a : 12'h000)) begin
        failures++;
        $display("FAIL a=%h b=%b p=%h", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
