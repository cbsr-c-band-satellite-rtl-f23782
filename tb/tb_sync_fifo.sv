// Testbench for sync_fifo: random pushes and pops against a queue model,
// checking head data, empty/full flags and the fill count every cycle.
module tb_sync_fifo;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  localparam int W = 8, D = 8;
  logic push, pop, empty, full;
  logic [W-1:0] din, dout;
  logic [3:0] count;
  logic [W-1:0] model [$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst, .push, .din, .pop, .dout, .empty, .full, .count);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      check(count == 4'(model.size()), "count");
      if (model.size() != 0) check(dout == model[0], "head data");
      // bias towards filling in the first half, draining in the second
      push = ($urandom_range(0, 99) < ((n % 400 < 200) ? 70 : 30)) && (model.size() < D);
      pop  = ($urandom_range(0, 99) < 50) && (model.size() != 0);
      din  = W'($urandom);
      @(posedge clk);
      #1;
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
