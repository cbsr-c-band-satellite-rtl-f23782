// Testbench for oqpsk_mod: random bits, sometimes back to back, sometimes
// with gaps; every pair (a, b) must give the two samples (map(a), 0) and
// (0, map(b)) with map(0) = +1, map(1) = -1, on the two cycles after b.
module tb_oqpsk_mod;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic bit_in, valid_in, valid_out;
  logic [3:0] sample_out;
  oqpsk_mod dut (.clk, .rst, .clr(1'b0), .bit_in, .valid_in, .sample_out, .valid_out);

  logic [3:0] expq [$];
  int got;

  function automatic logic [1:0] m(input bit b);
    return b ? 2'b11 : 2'b01;
  endfunction

  always @(posedge clk) begin
    if (!rst && valid_out) begin
      checks++;
      got++;
      if (expq.size() == 0 || sample_out != expq[0]) begin
        failures++; $display("FAIL sample %0d: %h", got, sample_out);
      end
      if (expq.size() != 0) void'(expq.pop_front());
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit a, b;
    valid_in = 0; bit_in = 0; got = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int p = 0; p < 2000; p++) begin
      a = 1'($urandom); b = 1'($urandom);
      @(negedge clk); valid_in = 1; bit_in = a;
      if ($urandom_range(0, 2) == 0) begin @(negedge clk); valid_in = 0; end
      @(negedge clk); valid_in = 1; bit_in = b;
      expq.push_back({m(a), 2'b00});
      expq.push_back({2'b00, m(b)});
      @(negedge clk); valid_in = 0;
      if ($urandom_range(0, 1) == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (got != 4000 || expq.size() != 0) begin failures++; $display("FAIL %0d samples", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
