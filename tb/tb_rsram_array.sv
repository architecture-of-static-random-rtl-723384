// tb_rsram_array: the 16 x 8 reversible SRAM against a reference array.
// Writes every word, reads every word back (dout one edge after the read,
// with dout_valid), then runs random reads and writes, including a read of
// a word written on the immediately preceding edge, and checks that dout
// holds between reads.
module tb_rsram_array;
  import rlogic_pkg::*;
  int checks = 0, failures = 0;
  logic                   clk = 0, rst_n = 0, we = 0, re = 0;
  logic [SRAM_ADDR_W-1:0] addr = '0;
  logic [SRAM_BITS-1:0]   din = '0, dout;
  logic                   dout_valid;
  logic [SRAM_BITS-1:0]   ref_mem [SRAM_WORDS];
  logic [SRAM_BITS-1:0]   last_read;

  rsram_array dut (.clk(clk), .rst_n(rst_n), .addr(addr), .we(we), .re(re),
                   .din(din), .dout(dout), .dout_valid(dout_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_write(input int a, input logic [SRAM_BITS-1:0] d);
    @(negedge clk);
    we = 1; re = 0; addr = SRAM_ADDR_W'(a); din = d;
    @(posedge clk);
    ref_mem[a] = d;
    #1;
    checks++;
    if (dout_valid !== 1'b0) begin failures++; $display("FAIL valid during write"); end
  endtask

  task automatic do_read(input int a);
    @(negedge clk);
    we = 0; re = 1; addr = SRAM_ADDR_W'(a); din = SRAM_BITS'($urandom);
    @(posedge clk);
    #1;
    checks++;
    if (dout_valid !== 1'b1 || dout !== ref_mem[a]) begin
      failures++;
      $display("FAIL read addr %0d: dout=%h valid=%b expected %h", a, dout, dout_valid, ref_mem[a]);
    end
    last_read = ref_mem[a];
  endtask

  task automatic do_idle();
    @(negedge clk);
    we = 0; re = 0; addr = SRAM_ADDR_W'($urandom);
    @(posedge clk);
    #1;
    checks++;
    if (dout_valid !== 1'b0 || dout !== last_read) begin
      failures++;
      $display("FAIL idle: dout=%h valid=%b expected hold %h", dout, dout_valid, last_read);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < SRAM_WORDS; a++) do_write(a, SRAM_BITS'(8'h11 * a ^ 8'h5a));
    for (int a = 0; a < SRAM_WORDS; a++) do_read(a);
    for (int a = 0; a < SRAM_WORDS; a++) begin   // walking ones / zeros
      do_write(a, SRAM_BITS'(1 << (a % SRAM_BITS)));
      do_read(a);
      do_write(a, ~SRAM_BITS'(1 << (a % SRAM_BITS)));
      do_read(a);
    end
    for (int i = 0; i < 1000; i++) begin
      case ($urandom % 3)
        0: do_write(int'($urandom % SRAM_WORDS), SRAM_BITS'($urandom));
        1: do_read(int'($urandom % SRAM_WORDS));
        default: do_idle();
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
