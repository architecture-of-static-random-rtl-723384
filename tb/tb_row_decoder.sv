// tb_row_decoder: all 16 addresses with enable high and low; the word lines
// must be one-hot at the addressed row, or all zero.
module tb_row_decoder;
  int checks = 0, failures = 0;
  logic        en;
  logic [3:0]  addr;
  logic [15:0] wl;

  row_decoder dut (.en(en), .addr(addr), .wl(wl));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {en, addr} = 5'(v);
      #1;
      checks++;
      if (wl !== (en ? 16'(1 << addr) : 16'h0)) begin
        failures++;
        $display("FAIL en=%b addr=%0d wl=%b", en, addr, wl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
