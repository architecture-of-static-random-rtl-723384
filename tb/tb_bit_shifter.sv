// tb_bit_shifter: default 12-bit shifter (shift up to 2, 14-bit output) in
// both directions and every amount, plus a 12-bit/3-place instance as used by
// the multiplier.  Expected values are integer multiplications and divisions.
module tb_bit_shifter;
  import rlogic_pkg::*;
  int checks = 0, failures = 0;
  logic [11:0] d;
  logic [1:0]  amt;
  shift_dir_e  dir;
  logic [13:0] q;
  logic [14:0] q3;

  bit_shifter dut (.d(d), .amt(amt), .dir(dir), .q(q));
  bit_shifter #(.IN_W(12), .MAX_SHIFT(3)) dut3 (.d(d), .amt(amt), .dir(dir), .q(q3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      int a_eff, exp_l, exp_r;
      d   = (i == 0) ? 12'hfff : 12'($urandom);
      amt = 2'(i);
      dir = (i % 8 < 4) ? SHIFT_LEFT : SHIFT_RIGHT;
      #1;
      a_eff = (amt > 2) ? 2 : int'(amt);
      exp_l = int'(d) * (1 << a_eff);
      exp_r = int'(d) / (1 << a_eff);
      checks++;
      if (q !== 14'((dir == SHIFT_LEFT) ? exp_l : exp_r)) begin
        failures++;
        $display("FAIL d=%h amt=%0d dir=%0d q=%h", d, amt, dir, q);
      end
      checks++;
      if (q3 !== 15'((dir == SHIFT_LEFT) ? int'(d) * (1 << amt) : int'(d) / (1 << amt))) begin
        failures++;
        $display("FAIL3 d=%h amt=%0d dir=%0d q=%h", d, amt, dir, q3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
