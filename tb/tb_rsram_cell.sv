// tb_rsram_cell: one reversible SRAM bit against a one-bit reference:
// writes only when wl_in and we are high, reads drive bl/blb only when wl_in
// and re are high, wl_out always follows wl_in.
module tb_rsram_cell;
  int checks = 0, failures = 0;
  logic clk = 0, wl_in = 0, we = 0, re = 0, bit_in = 0;
  logic wl_out, bl, blb;
  logic model;
  bit   known = 0;

  rsram_cell dut (.clk(clk), .wl_in(wl_in), .we(we), .re(re), .bit_in(bit_in),
                  .wl_out(wl_out), .bl(bl), .blb(blb));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // first cycle writes a known value
    @(negedge clk);
    wl_in = 1; we = 1; bit_in = 1; model = 1; known = 1;
    @(posedge clk);
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      wl_in  = 1'($urandom);
      we     = 1'($urandom);
      re     = 1'($urandom);
      bit_in = 1'($urandom);
      #1;
      checks++;
      if (wl_out !== wl_in) begin failures++; $display("FAIL wl_out"); end
      checks++;
      if (bl !== (wl_in & re & model) || blb !== (wl_in & re & ~model)) begin
        failures++;
        $display("FAIL read i=%0d wl=%b re=%b model=%b bl=%b blb=%b", i, wl_in, re, model, bl, blb);
      end
      @(posedge clk);
      if (wl_in && we) model = bit_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
