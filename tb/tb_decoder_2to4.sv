// tb_decoder_2to4: exhaustive check, enable low gives all zeros.
module tb_decoder_2to4;
  int checks = 0, failures = 0;
  logic       en;
  logic [1:0] a;
  logic [3:0] y;

  decoder_2to4 dut (.en(en), .a(a), .y(y));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {en, a} = 3'(v);
      #1;
      checks++;
      if (y !== (en ? 4'(1 << a) : 4'h0)) begin
        failures++;
        $display("FAIL en=%b a=%0d y=%b", en, a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
