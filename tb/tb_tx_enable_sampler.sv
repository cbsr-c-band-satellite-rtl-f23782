// Testbench for tx_enable_sampler (4 subframes per frame): changes of the
// software enable must reach the output only while the subframe counter is
// 0, and the counter must wrap after num_subframes increments.
module tb_tx_enable_sampler;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic en_in, inc, en_out;
  logic [7:0] nsub, idx;
  tx_enable_sampler dut (.clk, .rst, .tx_enable_in(en_in), .inc_subframe(inc), .num_subframes(nsub),
    .tx_enable_out(en_out), .subframe_idx(idx));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse_inc();
    @(negedge clk); inc = 1; @(negedge clk); inc = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_idx;
    en_in = 0; inc = 0; nsub = 8'd4;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk); en_in = 1;
    @(negedge clk); @(negedge clk);
    check(en_out, "enable taken at counter 0");
    pulse_inc();
    check(idx == 8'd1, "counter 1");
    en_in = 0;
    repeat (4) @(negedge clk);
    check(en_out, "enable held inside frame");
    pulse_inc(); pulse_inc();
    check(idx == 8'd3 && en_out, "counter 3, still enabled");
    pulse_inc();
    @(negedge clk);
    check(idx == 8'd0, "counter wrapped");
    @(negedge clk);
    check(!en_out, "disable taken at frame boundary");
    en_in = 1;
    @(negedge clk); @(negedge clk);
    check(en_out, "re-enabled");
    exp_idx = 0;
    for (int k = 0; k < 9; k++) begin
      pulse_inc();
      exp_idx = (exp_idx + 1) % 4;
      check(idx == 8'(exp_idx), "counter sequence");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
