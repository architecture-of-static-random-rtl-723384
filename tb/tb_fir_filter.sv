// tb_fir_filter: the default four-tap filter (12-bit samples, 4-bit
// coefficients, 18-bit output) against a reference model that keeps its own
// copy of the last four samples and computes sum c_k * x[n-k] in integers.
// Covers: impulse response (output sequence equals the coefficients times
// the impulse), all-maximum input (largest possible sum), random samples
// with random gaps in in_valid (the line must hold), a coefficient change,
// and the latency: out_valid exactly two edges after a sample is presented.
module tb_fir_filter;
  import rlogic_pkg::*;
  int checks = 0, failures = 0;
  int outputs_seen = 0, stalls = 0;

  logic                  clk = 0, rst_n = 0, in_valid = 0;
  logic [FIR_DATA_W-1:0] x_in = '0;
  logic [FIR_COEF_W-1:0] coef [FIR_TAPS];
  logic                  out_valid;
  logic [FIR_OUT_W-1:0]  y_out;

  int hist [FIR_TAPS];
  int exp_q [$];
  int cyc = 0;
  int sent_cyc [$];

  fir_filter dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
                  .coef(coef), .out_valid(out_valid), .y_out(y_out));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model: update on every accepted sample
  function automatic int model(input int x);
    int y = 0;
    for (int k = FIR_TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = x;
    for (int k = 0; k < FIR_TAPS; k++) y += int'(coef[k]) * hist[k];
    return y;
  endfunction

  // scoreboard
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int e, sc;
      outputs_seen++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %0d", y_out);
      end else begin
        e  = exp_q.pop_front();
        sc = sent_cyc.pop_front();
        if (int'(y_out) != e) begin
          failures++;
          $display("FAIL y=%0d expected %0d", y_out, e);
        end
        checks++;
        // presented before edge sc (cycle counter value sc), visible at edge sc+2
        if (cyc != sc + 2) begin
          failures++;
          $display("FAIL latency: sample of cycle %0d seen at %0d", sc, cyc);
        end
      end
    end
  end

  task automatic send(input logic [FIR_DATA_W-1:0] x);
    @(negedge clk);
    in_valid = 1;
    x_in     = x;
    exp_q.push_back(model(int'(x)));
    sent_cyc.push_back(cyc);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic send_burst(input int n, input bit gaps);
    for (int i = 0; i < n; i++) begin
      logic [FIR_DATA_W-1:0] x;
      x = FIR_DATA_W'($urandom);
      @(negedge clk);
      if (gaps && ($urandom % 3 == 0)) begin
        in_valid = 0;
        x_in     = FIR_DATA_W'($urandom);   // must be ignored
        stalls++;
        @(negedge clk);
      end
      in_valid = 1;
      x_in     = x;
      exp_q.push_back(model(int'(x)));
      sent_cyc.push_back(cyc);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    for (int k = 0; k < FIR_TAPS; k++) begin
      hist[k] = 0;
      coef[k] = FIR_COEF_W'(k + 3);    // 3,4,5,6
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // impulse response: 1000, 0, 0, 0, 0 -> c0*1000, c1*1000, ...
    send(12'd1000);
    for (int i = 0; i < FIR_TAPS; i++) send(12'd0);

    // maximum values (coefficients change only once the line has drained)
    repeat (3) @(posedge clk);
    for (int k = 0; k < FIR_TAPS; k++) coef[k] = '1;
    for (int i = 0; i < FIR_TAPS + 1; i++) send('1);

    // random back-to-back and with gaps
    repeat (3) @(posedge clk);
    for (int k = 0; k < FIR_TAPS; k++) coef[k] = FIR_COEF_W'($urandom);
    send_burst(200, 0);
    send_burst(200, 1);

    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", exp_q.size());
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall exercised"); end
    $display("outputs=%0d stalls=%0d", outputs_seen, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
