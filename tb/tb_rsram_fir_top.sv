// tb_rsram_fir_top: end-to-end test of the top level at its default sizes
// (16 x 8 SRAM, four-tap 12-bit FIR filter).
//
// Two processes run at the same time on the shared clock:
//   * memory: fills all 16 words, reads them back, then random reads,
//     writes and idle cycles, checked against a reference array; includes
//     reads of a word written on the previous edge and output hold between
//     reads.
//   * filter: an impulse, then random samples with random stalls
//     (in_valid low), checked against an integer model of
//     y[n] = sum c_k x[n-k] and the two-cycle latency.
// Each mechanism is counted, and one that never happened is a failure.
module tb_rsram_fir_top;
  import rlogic_pkg::*;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_write = 0, n_read = 0, n_hold = 0, n_raw = 0, n_rows_read = 0;
  int n_sample = 0, n_stall = 0, n_fir_out = 0, n_overlap = 0;

  logic                   clk = 0, rst_n = 0;
  logic [SRAM_ADDR_W-1:0] mem_addr = '0;
  logic                   mem_we = 0, mem_re = 0;
  logic [SRAM_BITS-1:0]   mem_din = '0, mem_dout;
  logic                   mem_dout_valid;
  logic                   fir_in_valid = 0;
  logic [FIR_DATA_W-1:0]  fir_x = '0;
  logic [FIR_COEF_W-1:0]  fir_coef [FIR_TAPS];
  logic                   fir_out_valid;
  logic [FIR_OUT_W-1:0]   fir_y;

  rsram_fir_top dut (
    .clk(clk), .rst_n(rst_n),
    .mem_addr(mem_addr), .mem_we(mem_we), .mem_re(mem_re), .mem_din(mem_din),
    .mem_dout(mem_dout), .mem_dout_valid(mem_dout_valid),
    .fir_in_valid(fir_in_valid), .fir_x(fir_x), .fir_coef(fir_coef),
    .fir_out_valid(fir_out_valid), .fir_y(fir_y)
  );

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && (mem_we || mem_re) && fir_in_valid) n_overlap++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ memory side
  logic [SRAM_BITS-1:0] ref_mem [SRAM_WORDS];
  logic [SRAM_BITS-1:0] last_read = '0;
  int                   last_written = -1;
  bit                   mem_done = 0;

  task automatic mem_write(input int a, input logic [SRAM_BITS-1:0] d);
    @(negedge clk);
    mem_we = 1; mem_re = 0; mem_addr = SRAM_ADDR_W'(a); mem_din = d;
    @(posedge clk);
    ref_mem[a] = d;
    last_written = a;
    n_write++;
  endtask

  task automatic mem_read(input int a);
    @(negedge clk);
    if (a == last_written) n_raw++;
    mem_we = 0; mem_re = 1; mem_addr = SRAM_ADDR_W'(a); mem_din = SRAM_BITS'($urandom);
    @(posedge clk);
    #1;
    checks++;
    if (mem_dout_valid !== 1'b1 || mem_dout !== ref_mem[a]) begin
      failures++;
      $display("FAIL mem read %0d: %h (valid %b) expected %h", a, mem_dout, mem_dout_valid, ref_mem[a]);
    end
    last_read = ref_mem[a];
    last_written = -1;
    n_read++;
  endtask

  task automatic mem_idle();
    @(negedge clk);
    mem_we = 0; mem_re = 0;
    last_written = -1;
    @(posedge clk);
    #1;
    checks++;
    if (mem_dout_valid !== 1'b0 || mem_dout !== last_read) begin
      failures++;
      $display("FAIL mem hold: %h expected %h", mem_dout, last_read);
    end
    n_hold++;
  endtask

  initial begin : mem_proc
    wait (rst_n);
    for (int a = 0; a < SRAM_WORDS; a++) mem_write(a, SRAM_BITS'($urandom));
    for (int a = 0; a < SRAM_WORDS; a++) begin
      mem_read(a);
      n_rows_read++;
    end
    for (int i = 0; i < 600; i++) begin
      int a;
      a = int'($urandom % SRAM_WORDS);
      case ($urandom % 4)
        0: mem_write(a, SRAM_BITS'($urandom));
        1: mem_read(a);
        2: begin mem_write(a, SRAM_BITS'($urandom)); mem_read(a); end
        default: mem_idle();
      endcase
    end
    @(negedge clk);
    mem_we = 0; mem_re = 0;
    mem_done = 1;
  end

  // ------------------------------------------------------------ filter side
  int hist [FIR_TAPS];
  int exp_q [$];
  int sent_q [$];
  bit fir_done = 0;

  function automatic int fir_model(input int x);
    int y = 0;
    for (int k = FIR_TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = x;
    for (int k = 0; k < FIR_TAPS; k++) y += int'(fir_coef[k]) * hist[k];
    return y;
  endfunction

  task automatic fir_send(input logic [FIR_DATA_W-1:0] x, input bit allow_stall);
    @(negedge clk);
    if (allow_stall && ($urandom % 4 == 0)) begin
      fir_in_valid = 0;
      fir_x = FIR_DATA_W'($urandom);
      n_stall++;
      @(negedge clk);
    end
    fir_in_valid = 1;
    fir_x = x;
    exp_q.push_back(fir_model(int'(x)));
    sent_q.push_back(cyc);
    n_sample++;
  endtask

  always @(posedge clk) begin
    if (rst_n && fir_out_valid) begin
      int e, sc;
      checks++;
      n_fir_out++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected filter output");
      end else begin
        e  = exp_q.pop_front();
        sc = sent_q.pop_front();
        if (int'(fir_y) != e || cyc != sc + 2) begin
          failures++;
          $display("FAIL fir y=%0d expected %0d (latency %0d)", fir_y, e, cyc - sc);
        end
      end
    end
  end

  initial begin : fir_proc
    for (int k = 0; k < FIR_TAPS; k++) begin
      hist[k] = 0;
      fir_coef[k] = FIR_COEF_W'($urandom | 1);
    end
    wait (rst_n);
    fir_send(12'd2047, 0);
    for (int i = 0; i < FIR_TAPS; i++) fir_send(12'd0, 0);
    for (int i = 0; i < 800; i++) fir_send(FIR_DATA_W'($urandom), 1);
    @(negedge clk);
    fir_in_valid = 0;
    repeat (3) @(posedge clk);
    fir_done = 1;
  end

  // ------------------------------------------------------------ end
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (mem_done && fir_done);
    repeat (2) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d filter outputs missing", exp_q.size()); end
    $display("mechanisms: writes=%0d reads=%0d holds=%0d read_after_write=%0d rows_read=%0d",
             n_write, n_read, n_hold, n_raw, n_rows_read);
    $display("            fir_samples=%0d fir_stalls=%0d fir_outputs=%0d concurrent=%0d",
             n_sample, n_stall, n_fir_out, n_overlap);
    checks++; if (n_write == 0)   begin failures++; $display("FAIL no write"); end
    checks++; if (n_read == 0)    begin failures++; $display("FAIL no read"); end
    checks++; if (n_hold == 0)    begin failures++; $display("FAIL no output hold"); end
    checks++; if (n_raw == 0)     begin failures++; $display("FAIL no read after write"); end
    checks++; if (n_rows_read != SRAM_WORDS) begin failures++; $display("FAIL not all rows read"); end
    checks++; if (n_stall == 0)   begin failures++; $display("FAIL no filter stall"); end
    checks++; if (n_fir_out != n_sample) begin failures++; $display("FAIL filter output count"); end
    checks++; if (n_overlap == 0) begin failures++; $display("FAIL designs never active together"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
