// tb_fredkin_dff: an 8-bit Fredkin flip-flop against a reference register:
// reset clears it, en=1 loads on the rising edge (one-cycle latency), en=0
// holds.
module tb_fredkin_dff;
  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0, en = 0;
  logic [7:0] d = '0, q, model;

  fredkin_dff #(.WIDTH(8)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== 8'h00) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      en = (i % 3 != 0);
      d  = 8'($urandom);
      if (en) model = d;
      @(posedge clk);
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d en=%b d=%h q=%h exp=%h", i, en, d, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
