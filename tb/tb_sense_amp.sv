// tb_sense_amp: differential pairs latch on a sensing edge (1-cycle latency),
// the output holds when not sensing, and reset clears it.
module tb_sense_amp;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sae = 0, bl = 0, blb = 0, dout;
  logic model = 0;

  sense_amp dut (.clk(clk), .rst_n(rst_n), .sae(sae), .bl(bl), .blb(blb), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (dout !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      sae = 1'($urandom);
      bl  = 1'($urandom);
      blb = ~bl;
      if (!sae && ($urandom % 2)) blb = bl;   // idle lines may be anything
      @(posedge clk);
      if (sae) model = bl;
      #1;
      checks++;
      if (dout !== model) begin
        failures++;
        $display("FAIL i=%0d sae=%b bl=%b blb=%b dout=%b exp=%b", i, sae, bl, blb, dout, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
