// Testbench for rrc_shaper: an impulse of 16384 on I (and -16384 on Q) must
// produce the 17 RRC taps, computed here from the raised-cosine formula for
// roll-off 0.22 (alpha_sel = 1) and 0.35 (alpha_sel = 0) and normalised to a
// sum of |h| of 32767, each output held for two clocks and out_valid
// following in_valid; a long run of full-scale samples must saturate
// nowhere (worst case stays inside 16 bits), and the filter is linear.
module tb_rrc_shaper;
  import cbsr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic in_step, in_valid, alpha_sel, out_valid;
  iq16_t in_sample;
  logic signed [15:0] out_i, out_q;
  rrc_shaper dut (.clk, .rst, .in_step, .in_valid, .in_sample, .alpha_sel, .out_i, .out_q, .out_valid);

  localparam real PI = 3.141592653589793;
  function automatic real h(input real t, input real b);
    real num, den;
    if (t == 0.0) return 1.0 - b + 4.0 * b / PI;
    num = $sin(PI * t * (1.0 - b)) + 4.0 * b * t * $cos(PI * t * (1.0 + b));
    den = PI * t * (1.0 - (4.0 * b * t) ** 2);
    return num / den;
  endfunction

  int taps [17];
  task automatic make_taps(input real b);
    real v [17];
    real s;
    s = 0.0;
    for (int k = 0; k < 17; k++) begin
      v[k] = h((real'(k) - 8.0) / 2.0, b);
      s += (v[k] < 0.0) ? -v[k] : v[k];
    end
    for (int k = 0; k < 17; k++) taps[k] = $rtoi($floor(v[k] / s * 32767.0 + 0.5));
  endtask

  function automatic bit close(input int a, input int e);
    return (a - e <= 1) && (e - a <= 1);
  endfunction

  task automatic impulse(input logic sel, input real b);
    make_taps(b);
    alpha_sel = sel;
    // one impulse sample, then zeros; outputs sampled on both clocks of each step
    for (int n = 0; n < 20; n++) begin
      @(negedge clk); in_step = 1; in_valid = 1;
      in_sample.i = (n == 0) ? 16'sd16384 : 16'sd0;
      in_sample.q = (n == 0) ? -16'sd16384 : 16'sd0;
      @(negedge clk); in_step = 0;
      if (n < 17) begin
        checks++;
        if (!close(int'(out_i), taps[n]) || !close(int'(out_q), -taps[n]) || !out_valid) begin
          failures++; $display("FAIL alpha_sel %0d tap %0d: %0d vs %0d", sel, n, out_i, taps[n]);
        end
      end
      @(negedge clk);   // second clock of the same sample: must be held
      checks++;
      if (n < 17 && !close(int'(out_i), taps[n])) begin failures++; $display("FAIL hold %0d", n); end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_step = 0; in_valid = 0; in_sample = '0; alpha_sel = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    impulse(1'b1, 0.22);
    impulse(1'b0, 0.35);
    // in_valid low: zeros enter and out_valid follows
    for (int n = 0; n < 20; n++) begin
      @(negedge clk); in_step = 1; in_valid = 0; in_sample.i = 16'sd16384;
      @(negedge clk); in_step = 0;
    end
    checks++;
    if (out_valid || out_i != 0) begin failures++; $display("FAIL invalid input not zeroed"); end
    // constant full-scale input: DC gain = sum of taps, no wrap-around
    make_taps(0.35);
    for (int n = 0; n < 20; n++) begin
      @(negedge clk); in_step = 1; in_valid = 1; in_sample.i = 16'sd16384; in_sample.q = 16'sd0;
      @(negedge clk); in_step = 0;
    end
    begin
      int dc;
      dc = 0;
      foreach (taps[k]) dc += taps[k];
      checks++;
      if (out_i - dc > 9 || dc - out_i > 9) begin failures++; $display("FAIL dc %0d vs %0d", out_i, dc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
